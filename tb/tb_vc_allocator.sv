// tb_vc_allocator: heads of all input VCs ask for output ports; checked are
// one grant per output port per cycle, the lowest free downstream VC, no VC
// given twice before release, release on the tail, round-robin fairness and
// no progress while the enable is low.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int NP = N_PORTS, NVC = N_VCS;
  logic clk = 0, rst_n = 0, en = 1;
  logic [NVC-1:0] need [NP];
  logic [PORT_W-1:0] rport [NP][NVC];
  logic [NP-1:0] rel_valid = '0;
  logic [VC_W-1:0] rel_vc [NP];
  logic [NVC-1:0] gnt [NP];
  logic [VC_W-1:0] gvc [NP][NVC];
  int checks = 0, failures = 0;
  bit held [NP][NVC];
  int got [NP][NVC];

  vc_allocator dut (.clk, .rst_n, .en, .need_va(need), .req_port(rport),
                    .rel_valid, .rel_vc, .va_gnt(gnt), .va_vc(gvc));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      need[p] = '0; rel_vc[p] = '0;
      for (int k = 0; k < NVC; k++) begin rport[p][k] = '0; got[p][k] = 0; end
      for (int v = 0; v < NVC; v++) held[p][v] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 1: every input VC wants output port 1; 6 downstream VCs exist
    for (int p = 0; p < NP; p++) begin
      need[p] = '1;
      for (int k = 0; k < NVC; k++) rport[p][k] = PORT_W'(1);
    end
    for (int c = 0; c < 8; c++) begin
      int n;
      #1;
      n = 0;
      for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++) if (gnt[p][k]) begin
        n++;
        check(!held[1][gvc[p][k]], "downstream VC handed out twice");
        for (int v = 0; v < int'(gvc[p][k]); v++) check(held[1][v], "not the lowest free VC");
        held[1][gvc[p][k]] = 1;
        got[p][k]++;
      end
      check(n == (c < NVC ? 1 : 0), $sformatf("cycle %0d: %0d grants", c, n));
      @(negedge clk);
      // a granted head stops asking once the edge has taken its grant
      for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++) if (got[p][k] != 0) need[p][k] = 0;
    end
    // release VC 3 by a tail; exactly that one becomes available
    rel_valid[1] = 1; rel_vc[1] = 3'd3;
    @(negedge clk);
    rel_valid[1] = 0; held[1][3] = 0;
    #1;
    begin
      int n; n = 0;
      for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++) if (gnt[p][k]) begin
        n++; check(gvc[p][k] == 3'd3, "released VC reused");
      end
      check(n == 1, $sformatf("one grant after release, got %0d", n));
    end
    // enable low: grants are visible, but no VC is taken
    en = 0;
    @(negedge clk);
    #1;
    begin
      int n; n = 0;
      for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++) if (gnt[p][k]) n++;
      check(n == 1, "grant still offered while disabled");
    end
    en = 1;
    // phase 2: distinct ports in parallel
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      need[p] = '0;
      need[p][0] = 1;
      rport[p][0] = PORT_W'(p);
    end
    #1;
    for (int p = 0; p < NP; p++) check(gnt[p][0] && gvc[p][0] == '0, "parallel grants on distinct ports");
    @(negedge clk);
    // phase 3: fairness: all 30 VCs ask for port 2 repeatedly with release
    for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++) begin
      rport[p][k] = PORT_W'(2); got[p][k] = 0;
    end
    for (int p = 0; p < NP; p++) need[p] = '1;
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      logic [VC_W-1:0] nv;
      nv = '0;
      #1;
      for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++) if (gnt[p][k]) begin
        got[p][k]++; nv = gvc[p][k];
      end
      @(negedge clk);
      // the VC granted last cycle is released as the next one is granted
      rel_valid[2] = 1; rel_vc[2] = nv;
    end
    for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++)
      check(got[p][k] == 2, $sformatf("VC %0d.%0d served %0d times of 60", p, k, got[p][k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
