// tb_vf_clock_enable: counts enabled edges over 800 base cycles for each V/F
// level; the ratio must be 1.5/2.0, 1.75/2.0 and 2.0/2.0 of the base clock.
module tb_vf_clock_enable;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, en;
  logic [LEVEL_W-1:0] lvl = '0;
  int checks = 0, failures = 0;

  vf_clock_enable dut (.clk, .rst_n, .vf_level(lvl), .en);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp [3] = '{600, 700, 800};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 3; l++) begin
      int n;
      lvl = LEVEL_W'(l);
      n = 0;
      for (int c = 0; c < 800; c++) begin
        @(negedge clk);
        if (en) n++;
      end
      checks++;
      if (n != exp[l]) begin
        failures++;
        $display("FAIL level %0d: %0d enabled edges, exp %0d", l, n, exp[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
