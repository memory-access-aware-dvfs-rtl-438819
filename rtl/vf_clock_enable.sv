// vf_clock_enable: router clock of the selected V/F level, as a clock enable.
//
// The routers share the 2.0 GHz base clock; a router at a lower V/F level
// advances only on part of its edges. Level 2 (2.0 GHz) is enabled on every
// edge, level 1 (1.75 GHz) on 7 edges of 8, level 0 (1.5 GHz) on 3 edges of 4,
// so the router's rate of work matches the frequency ratios 1.75/2 and 1.5/2.
// The three frequencies follow the document; emulating the per-router clock
// with a cycle-swallowing enable is this design's own, standing in for the
// regulator and clock generator the document does not design. `en` is a
// combinational function of a free-running 3-bit counter and the level.
module vf_clock_enable
  import noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LEVEL_W-1:0] vf_level,
  output logic               en
);
  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    unique case (vf_level)
      2'd0:    en = (cnt[1:0] != 2'd3);   // 6 of 8 edges: 1.5 GHz
      2'd1:    en = (cnt != 3'd7);        // 7 of 8 edges: 1.75 GHz
      default: en = 1'b1;                 // 2.0 GHz
    endcase
  end
endmodule
