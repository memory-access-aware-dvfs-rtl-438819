// tb_cdc: random MAC-table contents; the registered demand must equal the
// sum over ports of the largest valid rho of each port (Eq. 1), one cycle
// after the table changes.
module tb_cdc;
  import noc_pkg::*;
  localparam int NP = N_PORTS, NVC = N_VCS, DW = RHO_W + $clog2(N_PORTS + 1);
  logic clk = 0, rst_n = 0;
  logic [NVC-1:0] ev [NP];
  mac_params_t    ep [NP][NVC];
  logic [DW-1:0]  demand;
  int checks = 0, failures = 0;

  cdc dut (.clk, .rst_n, .ent_valid(ev), .ent_params(ep), .demand);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      ev[p] = '0;
      for (int k = 0; k < NVC; k++) ep[p][k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int exp;
      exp = 0;
      for (int p = 0; p < NP; p++) begin
        int mx;
        mx = 0;
        ev[p] = NVC'($urandom);
        for (int k = 0; k < NVC; k++) begin
          ep[p][k] = MAC_W'($urandom);
          if (t % 5 == 0) ep[p][k].rho = '1;
          if (ev[p][k] && int'(ep[p][k].rho) > mx) mx = int'(ep[p][k].rho);
        end
        exp += mx;
      end
      @(negedge clk);
      checks++;
      if (int'(demand) != exp) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d demand=%0d exp=%0d", t, demand, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
