// tb_memaware_noc: end-to-end run of a 2x2 mesh with 256-cycle DVFS frames
// (64-cycle epochs).
// Every core model sends cache-block (8-flit) and control (1-flit) messages to
// random nodes and reports memory-access events. In the first phase the cores
// are memory-intensive (MSHRs nearly full, heavy traffic), in the second
// they are nearly idle. Checked: every packet arrives at its destination,
// whole and in order (tagged with source and sequence number); the routers
// move to a higher V/F level under load and back to the lowest when idle.
// Each mechanism of the design is counted and must occur at least once:
// parameter piggybacking, MAC-table updates, speculative switch allocation,
// switch contention resolved by rank, batch ageing, V/F up and down switches,
// slowed routers (clock enable low) and injection back-pressure.
module tb_memaware_noc;
  import noc_pkg::*;
  localparam int MX = 2, MY = 2, FL = 8, NN = MX * MY;
  localparam int DW = RHO_W + $clog2(N_PORTS + 1);
  localparam int PHASE = 1600;
  `include "tb_noc_body.svh"

  memaware_noc #(.MX(MX), .MY(MY), .FLOG2(FL)) dut (.*);
endmodule
