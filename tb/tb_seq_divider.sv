// tb_seq_divider: random divisions checked against the / operator, including
// divide by zero (all-ones quotient) and the W-cycle latency.
module tb_seq_divider;
  localparam int W = 20;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] a, b, q;
  int checks = 0, failures = 0;

  seq_divider #(.W(W)) dut (.clk, .rst_n, .start, .dividend(a), .divisor(b), .busy, .done, .quotient(q));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int cyc;
      logic [W-1:0] exp;
      a = W'($urandom);
      case (t % 4)
        0: b = W'($urandom);
        1: b = W'($urandom_range(1, 300));
        2: b = (t % 16 == 2) ? '0 : W'($urandom_range(1, 20));
        default: b = W'($urandom_range(1, 5000));
      endcase
      exp = (b == 0) ? '1 : a / b;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (q != exp) begin
        failures++;
        if (failures < 5) $display("FAIL %0d / %0d = %0d exp %0d", a, b, q, exp);
      end
      checks++;
      if (cyc != W + 1) begin
        failures++;
        if (failures < 5) $display("FAIL latency %0d", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
