// cdc: Communication Demand Computation of a router.
//
// demand = sum over the input ports j of ( max over the VCs k of rho[j][k] ),
// with only valid MAC-table entries taking part (an invalid entry counts as 0).
// This is the document's equation for the demand that drives the V/F choice.
// The sum and maxima are combinational; the result is registered once, so
// the unit sits beside route computation, VC and switch allocation in the
// first pipeline stage and adds one cycle of latency to the demand only.
module cdc
  import noc_pkg::*;
#(
  parameter int NP  = N_PORTS,
  parameter int NVC = N_VCS,
  parameter int DEMAND_W = RHO_W + $clog2(N_PORTS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NVC-1:0]      ent_valid  [NP],
  input  mac_params_t         ent_params [NP][NVC],
  output logic [DEMAND_W-1:0] demand
);
  logic [DEMAND_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int j = 0; j < NP; j++) begin
      logic [RHO_W-1:0] mx;
      mx = '0;
      for (int k = 0; k < NVC; k++)
        if (ent_valid[j][k] && ent_params[j][k].rho > mx) mx = ent_params[j][k].rho;
      sum = sum + DEMAND_W'(mx);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) demand <= '0;
    else        demand <= sum;
  end
endmodule
