// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// A start pulse loads dividend and divisor; W+1 cycles later done pulses for one
// cycle with quotient = dividend / divisor (truncated). A zero divisor gives
// an all-ones quotient. busy is high while a division is in progress; a start
// while busy is ignored. Used for the ratios of the memory-access
// characterizer, which are needed once per epoch, so a small serial unit
// suffices. The divider structure is this design's own.
module seq_divider #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  localparam int CNT_W = $clog2(W + 1);

  logic [W-1:0]     rem, dvs, q;
  logic [CNT_W-1:0] cnt;
  logic [W:0]       trial;

  assign trial    = {rem, q[W-1]} - {1'b0, dvs};
  assign quotient = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dvs  <= '0;
      q    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem  <= '0;
          dvs  <= divisor;
          q    <= dividend;
          cnt  <= CNT_W'(W);
          busy <= 1'b1;
        end
      end else begin
        // shift the next dividend bit into the remainder, keep quotient bits in q
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
