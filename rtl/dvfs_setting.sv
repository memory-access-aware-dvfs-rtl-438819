// dvfs_setting: timeframe-based V/F level selection of a router.
//
// A counter of 2^FRAME_LOG2 cycles (reset every frame) defines the DVFS tuning
// frame. At the first cycle of each frame the communication demand is mapped
// onto one of N_LEVELS levels by dividing [0, DEMAND_MAX] evenly into
// N_LEVELS segments; the V/F level changes, and vf_tune pulses to request the
// regulator to retune, only when the demand falls into a segment other than
// the current one. Otherwise the new frame inherits the previous level. After
// reset the router starts at the lowest level. Level 0/1/2 stands for
// 1.5V/1.5GHz, 1.6V/1.75GHz and 1.7V/2.0GHz.
//
// The same counter provides the epoch tick (every quarter frame: the
// characterization window slides by one epoch) and the packet batch id
// (incremented every frame, since the batch length equals the frame).
// The frame length, the three levels, the even split of the demand and the
// retune-only-on-change rule follow the document. DEMAND_MAX is this design's
// choice: with rho the average MSHR occupancy, the largest demand is one full
// 32-entry MSHR per input port.
// The counter runs on the un-scaled base clock so that frames, windows and
// batches have the same length in time in every router.
module dvfs_setting
  import noc_pkg::*;
#(
  parameter int FLOG2      = FRAME_LOG2,
  parameter int ELOG2      = EPOCH_LOG2,
  parameter int NLEV       = N_LEVELS,
  parameter int DEMAND_W   = RHO_W + $clog2(N_PORTS + 1),
  parameter int DEMAND_MAX = N_PORTS * MSHR_ENTRIES * (1 << RHO_FRAC)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DEMAND_W-1:0] demand,
  output logic [LEVEL_W-1:0]  vf_level,
  output logic                vf_tune,
  output logic                frame_start,
  output logic                epoch_tick,
  output logic [BATCH_W-1:0]  batch_id
);
  logic [FLOG2-1:0]   cnt;
  logic [LEVEL_W-1:0] new_level;

  // segment boundaries i*DEMAND_MAX/NLEV, i = 1 .. NLEV-1
  always_comb begin
    new_level = '0;
    for (int i = 1; i < NLEV; i++)
      if (int'(demand) * NLEV >= i * DEMAND_MAX) new_level = LEVEL_W'(i);
  end

  assign frame_start = (cnt == '0);
  assign epoch_tick  = (cnt[ELOG2-1:0] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      vf_level <= '0;
      vf_tune  <= 1'b0;
      batch_id <= '0;
    end else begin
      cnt     <= cnt + 1'b1;
      vf_tune <= 1'b0;
      if (frame_start) begin
        batch_id <= batch_id + 1'b1;
        if (new_level != vf_level) begin
          vf_level <= new_level;
          vf_tune  <= 1'b1;
        end
      end
    end
  end

  a_level_range: assert property (@(posedge clk) disable iff (!rst_n) int'(vf_level) < NLEV);
endmodule
