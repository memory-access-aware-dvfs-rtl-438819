// tb_priority_sa: directed ranking cases for the switch allocator.
// Checked: a memory non-intensive packet (low gamma_L1m) beats an intensive
// one; a high load ratio beats a low one; an older batch beats any score;
// within an input port the highest-ranked VC is chosen; equal ranks take
// turns round-robin; different outputs are granted in parallel; nothing
// advances the round-robin state while the enable is low.
module tb_priority_sa;
  import noc_pkg::*;
  localparam int NP = N_PORTS, NVC = N_VCS;
  logic clk = 0, rst_n = 0, en = 1;
  logic [NVC-1:0] req [NP];
  logic [PORT_W-1:0] rport [NP][NVC];
  logic [BATCH_W-1:0] rbatch [NP][NVC];
  logic [BATCH_W-1:0] cur = 2'd1;
  logic [NVC-1:0] mval [NP];
  mac_params_t mpar [NP][NVC];
  logic [NVC-1:0] gnt [NP];
  logic [NP-1:0] ov;
  logic [PORT_W-1:0] osel [NP];
  int checks = 0, failures = 0;

  priority_sa dut (.clk, .rst_n, .en, .req, .req_port(rport), .req_batch(rbatch), .cur_batch(cur),
                   .mac_valid(mval), .mac_params(mpar), .in_gnt(gnt), .out_valid(ov), .out_sel(osel));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic clear();
    for (int p = 0; p < NP; p++) begin
      req[p] = '0; mval[p] = '0;
      for (int k = 0; k < NVC; k++) begin
        rport[p][k] = '0; rbatch[p][k] = cur; mpar[p][k] = '0;
      end
    end
  endtask

  task automatic set(input int p, input int k, input int o, input int g1, input int gl, input bit v = 1);
    req[p][k] = 1; rport[p][k] = PORT_W'(o); mval[p][k] = v;
    mpar[p][k].gl1m = GAMMA_W'(g1); mpar[p][k].gload = GAMMA_W'(gl); mpar[p][k].rho = 8'd4;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // low L1 MPI wins, whatever the port order
    for (int r = 0; r < 2; r++) begin
      clear(); set(1, 0, 3, 200, 100); set(2, 0, 3, 20, 100); #1;
      check(ov[3] && osel[3] == 3'd2 && gnt[2][0] && !gnt[1][0], "low MPI preferred");
      @(negedge clk);
    end
    // high load ratio wins
    clear(); set(0, 2, 1, 50, 30); set(4, 1, 1, 50, 230); #1;
    check(ov[1] && osel[1] == 3'd4 && gnt[4][1], "high load ratio preferred");
    // older batch wins over a better score
    clear(); set(0, 2, 1, 0, 255); set(4, 1, 1, 255, 0); rbatch[4][1] = cur - 1'b1; #1;
    check(osel[1] == 3'd4, "older batch preferred");
    // invalid entry: middle score, loses to a critical one, beats a poor one
    clear(); set(0, 0, 2, 0, 0, 0); set(3, 0, 2, 10, 250); #1;
    check(osel[2] == 3'd3, "critical beats unknown");
    clear(); set(0, 0, 2, 0, 0, 0); set(3, 0, 2, 250, 10); #1;
    check(osel[2] == 3'd0, "unknown beats non-critical");
    // within an input port the best VC is chosen
    clear(); set(2, 1, 4, 100, 100); set(2, 4, 4, 30, 100); set(2, 5, 4, 120, 90); #1;
    check(gnt[2] == 6'b010000 && osel[4] == 3'd2, "best VC within the port");
    // parallel grants to different outputs
    clear(); for (int p = 0; p < NP; p++) set(p, p, (p + 1) % NP, 10, 10); #1;
    begin
      bit all; all = 1;
      for (int p = 0; p < NP; p++) all &= gnt[p][p];
      check(all && ov == '1, "parallel grants");
    end
    @(negedge clk);
    // equal ranks alternate
    clear(); set(1, 0, 0, 77, 77); set(3, 0, 0, 77, 77);
    begin
      int n1, n3; n1 = 0; n3 = 0;
      for (int c = 0; c < 10; c++) begin
        #1;
        if (gnt[1][0]) n1++;
        if (gnt[3][0]) n3++;
        @(negedge clk);
      end
      check(n1 == 5 && n3 == 5, $sformatf("round robin %0d/%0d", n1, n3));
      // disabled: the same winner stays
      en = 0;
      #1;
      begin
        logic [PORT_W-1:0] w; w = osel[0];
        repeat (3) @(negedge clk);
        check(osel[0] == w, "no rotation while disabled");
      end
      en = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
