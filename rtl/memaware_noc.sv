// memaware_noc: a MESH_X x MESH_Y mesh network-on-chip with memory-access
// aware per-router DVFS.
//
// Every node has a router, a network interface (NI) with its memory-access
// characterizer, and a clock-enable generator that makes the router run at
// the speed of the V/F level its own DVFS setting logic chose. Node (x, y) is
// index n = y*MESH_X + x of every per-node port array; x grows to the east,
// y to the north. The processor core, caches and memory controllers of each
// node are outside this module: their traffic enters on the msg_* ports,
// their memory-access events on the ev_* ports, and delivered flits leave on
// rx_*. The V/F level and retune request of each router leave on vf_level and
// vf_tune for the voltage regulator and clock generator.
// The mesh, X-Y routing and one router and NI per node follow the document's
// 8x8 platform; edge ports of the mesh are tied off (no flit, no credit).
// Everything runs from the one base clock `clk` (the 2.0 GHz core clock).
module memaware_noc
  import noc_pkg::*;
#(
  parameter int MX     = MESH_X,
  parameter int MY     = MESH_Y,
  parameter int FLOG2  = FRAME_LOG2,
  parameter int OCC_W  = $clog2(MSHR_ENTRIES + 1),
  parameter int INST_W = 3,
  parameter int DEMAND_W = RHO_W + $clog2(N_PORTS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // core messages, per node
  input  logic [MX*MY-1:0]    msg_valid,
  output logic [MX*MY-1:0]    msg_ready,
  input  logic [COORD_W-1:0]  msg_dst_x    [MX*MY],
  input  logic [COORD_W-1:0]  msg_dst_y    [MX*MY],
  input  logic [MX*MY-1:0]    msg_is_data,
  input  logic [FLIT_W-1:0]   msg_data     [MX*MY],
  output logic [MX*MY-1:0]    rx_valid,
  output flit_t               rx_flit      [MX*MY],
  // memory-access events, per node
  input  logic [OCC_W-1:0]    ev_mshr_occ  [MX*MY],
  input  logic [MX*MY-1:0]    ev_l1_miss,
  input  logic [INST_W-1:0]   ev_inst      [MX*MY],
  input  logic [MX*MY-1:0]    ev_ld_net,
  input  logic [MX*MY-1:0]    ev_st_net,
  // DVFS, per router
  output logic [LEVEL_W-1:0]  vf_level     [MX*MY],
  output logic [MX*MY-1:0]    vf_tune,
  output logic [DEMAND_W-1:0] demand       [MX*MY],
  output mac_params_t         params       [MX*MY],
  output logic [MX*MY-1:0]    params_valid
);
  localparam int NN = MX * MY;
  localparam int NP = N_PORTS;

  logic [NP-1:0]   r_in_valid  [NN];
  flit_t           r_in_flit   [NN][NP];
  logic [NP-1:0]   r_cout_valid[NN];
  logic [VC_W-1:0] r_cout_vc   [NN][NP];
  logic [NP-1:0]   r_out_valid [NN];
  flit_t           r_out_flit  [NN][NP];
  logic [NP-1:0]   r_cin_valid [NN];
  logic [VC_W-1:0] r_cin_vc    [NN][NP];
  logic [NN-1:0]   r_en;

  for (genvar y = 0; y < MY; y++) begin : g_y
    for (genvar x = 0; x < MX; x++) begin : g_x
      localparam int N = y * MX + x;

      // neighbour links: my input p is fed by the neighbour's opposite output
      if (x < MX - 1) begin : g_e
        assign r_in_valid[N][P_EAST]  = r_out_valid[N+1][P_WEST];
        assign r_in_flit[N][P_EAST]   = r_out_flit[N+1][P_WEST];
        assign r_cin_valid[N][P_EAST] = r_cout_valid[N+1][P_WEST];
        assign r_cin_vc[N][P_EAST]    = r_cout_vc[N+1][P_WEST];
      end else begin : g_e0
        assign r_in_valid[N][P_EAST]  = 1'b0;
        assign r_in_flit[N][P_EAST]   = '0;
        assign r_cin_valid[N][P_EAST] = 1'b0;
        assign r_cin_vc[N][P_EAST]    = '0;
      end
      if (x > 0) begin : g_w
        assign r_in_valid[N][P_WEST]  = r_out_valid[N-1][P_EAST];
        assign r_in_flit[N][P_WEST]   = r_out_flit[N-1][P_EAST];
        assign r_cin_valid[N][P_WEST] = r_cout_valid[N-1][P_EAST];
        assign r_cin_vc[N][P_WEST]    = r_cout_vc[N-1][P_EAST];
      end else begin : g_w0
        assign r_in_valid[N][P_WEST]  = 1'b0;
        assign r_in_flit[N][P_WEST]   = '0;
        assign r_cin_valid[N][P_WEST] = 1'b0;
        assign r_cin_vc[N][P_WEST]    = '0;
      end
      if (y < MY - 1) begin : g_n
        assign r_in_valid[N][P_NORTH]  = r_out_valid[N+MX][P_SOUTH];
        assign r_in_flit[N][P_NORTH]   = r_out_flit[N+MX][P_SOUTH];
        assign r_cin_valid[N][P_NORTH] = r_cout_valid[N+MX][P_SOUTH];
        assign r_cin_vc[N][P_NORTH]    = r_cout_vc[N+MX][P_SOUTH];
      end else begin : g_n0
        assign r_in_valid[N][P_NORTH]  = 1'b0;
        assign r_in_flit[N][P_NORTH]   = '0;
        assign r_cin_valid[N][P_NORTH] = 1'b0;
        assign r_cin_vc[N][P_NORTH]    = '0;
      end
      if (y > 0) begin : g_s
        assign r_in_valid[N][P_SOUTH]  = r_out_valid[N-MX][P_NORTH];
        assign r_in_flit[N][P_SOUTH]   = r_out_flit[N-MX][P_NORTH];
        assign r_cin_valid[N][P_SOUTH] = r_cout_valid[N-MX][P_NORTH];
        assign r_cin_vc[N][P_SOUTH]    = r_cout_vc[N-MX][P_NORTH];
      end else begin : g_s0
        assign r_in_valid[N][P_SOUTH]  = 1'b0;
        assign r_in_flit[N][P_SOUTH]   = '0;
        assign r_cin_valid[N][P_SOUTH] = 1'b0;
        assign r_cin_vc[N][P_SOUTH]    = '0;
      end

      ni #(.NNODES(NN), .ELOG2(FLOG2 - 2), .OCC_W(OCC_W), .INST_W(INST_W)) u_ni (
        .clk, .rst_n, .node_x(COORD_W'(x)), .node_y(COORD_W'(y)),
        .msg_valid(msg_valid[N]), .msg_ready(msg_ready[N]),
        .msg_dst_x(msg_dst_x[N]), .msg_dst_y(msg_dst_y[N]),
        .msg_is_data(msg_is_data[N]), .msg_data(msg_data[N]),
        .rx_valid(rx_valid[N]), .rx_flit(rx_flit[N]),
        .mshr_occ(ev_mshr_occ[N]), .l1_miss(ev_l1_miss[N]), .inst_retired(ev_inst[N]),
        .ld_net(ev_ld_net[N]), .st_net(ev_st_net[N]),
        .inj_valid(r_in_valid[N][P_LOCAL]), .inj_flit(r_in_flit[N][P_LOCAL]),
        .inj_credit_valid(r_cout_valid[N][P_LOCAL]), .inj_credit_vc(r_cout_vc[N][P_LOCAL]),
        .ej_valid(r_out_valid[N][P_LOCAL]), .ej_flit(r_out_flit[N][P_LOCAL]),
        .ej_credit_valid(r_cin_valid[N][P_LOCAL]), .ej_credit_vc(r_cin_vc[N][P_LOCAL]),
        .params(params[N]), .params_valid(params_valid[N])
      );

      router #(.FLOG2(FLOG2), .DEMAND_W(DEMAND_W)) u_router (
        .clk, .rst_n, .en(r_en[N]), .cur_x(COORD_W'(x)), .cur_y(COORD_W'(y)),
        .in_valid(r_in_valid[N]), .in_flit(r_in_flit[N]),
        .credit_out_valid(r_cout_valid[N]), .credit_out_vc(r_cout_vc[N]),
        .out_valid(r_out_valid[N]), .out_flit(r_out_flit[N]),
        .credit_in_valid(r_cin_valid[N]), .credit_in_vc(r_cin_vc[N]),
        .vf_level(vf_level[N]), .vf_tune(vf_tune[N]), .demand(demand[N])
      );

      vf_clock_enable u_vfce (
        .clk, .rst_n, .vf_level(vf_level[N]), .en(r_en[N])
      );
    end
  end
endmodule
