// router: memory-access aware DVFS virtual-channel router.
//
// A two-stage router. Stage 1 does, in parallel, X-Y route computation on the
// head flit at each VC front, VC allocation, speculative switch allocation
// and communication demand computation. Stage 2 is switch traversal: the
// crossbar, set by that cycle's switch allocation, feeds the output-link
// register. A head flit that has no output VC yet
// may already bid for the switch (speculation); its grant is used only if VC
// allocation succeeds in the same cycle and the new downstream VC has a
// credit, otherwise the switch slot is lost for that cycle.
//
// Around this datapath sit the parts that make it memory-access aware:
//   - mac_table records (rho, gamma_L1m, gamma_load) from flagged head flits,
//     one entry per input VC;
//   - cdc sums, over the input ports, the largest rho of each port;
//   - dvfs_setting maps the demand onto one of three V/F levels once per
//     2^14-cycle frame, and keeps the level unless the demand changed segment;
//   - priority_sa orders departing packets by batch (oldest first), then by
//     low L1 miss rate / high load ratio.
// The chosen V/F level leaves on vf_level / vf_tune; the router's own speed is
// given by the clock enable `en` (see vf_clock_enable). Links and credits run
// on the base clock: input buffers accept a flit on any edge, outputs and
// credits are single-cycle pulses, and everything else advances only on
// enabled edges.
//
// Interface per port p: in_valid/in_flit from the upstream link (the flit's vc
// field names the VC of this router), credit_out_* back to the upstream
// router (one per freed buffer slot), out_valid/out_flit to the downstream
// link (vc rewritten to the downstream VC), credit_in_* from downstream.
// Ports: 0 local, 1 east, 2 west, 3 north, 4 south. Latency through an idle,
// full-speed router: a flit written into an input buffer on edge t is on the
// output link after edge t+1 and in the next router's buffer on edge t+2.
// The pipeline and the DVFS/priority units follow the document; flow control
// by credits, the clock-enable emulation and the port numbering are this
// design's own.
module router
  import noc_pkg::*;
#(
  parameter int NP  = N_PORTS,
  parameter int NVC = N_VCS,
  parameter int DEPTH = VC_DEPTH,
  parameter int FLOG2 = FRAME_LOG2,
  parameter int DEMAND_W = RHO_W + $clog2(N_PORTS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [COORD_W-1:0]  cur_x,        // this router's mesh position
  input  logic [COORD_W-1:0]  cur_y,
  input  logic [NP-1:0]       in_valid,
  input  flit_t               in_flit          [NP],
  output logic [NP-1:0]       credit_out_valid,
  output logic [VC_W-1:0]     credit_out_vc    [NP],
  output logic [NP-1:0]       out_valid,
  output flit_t               out_flit         [NP],
  input  logic [NP-1:0]       credit_in_valid,
  input  logic [VC_W-1:0]     credit_in_vc     [NP],
  output logic [LEVEL_W-1:0]  vf_level,
  output logic                vf_tune,
  output logic [DEMAND_W-1:0] demand
);
  localparam int CRED_W = $clog2(DEPTH + 1);

  // per input port / VC
  flit_t              front_flit  [NP][NVC];
  logic [BATCH_W-1:0] front_batch [NP][NVC];
  logic [NVC-1:0]     nonempty    [NP];
  logic [NVC-1:0]     need_va     [NP];
  logic [NVC-1:0]     active      [NP];
  logic [PORT_W-1:0]  req_port    [NP][NVC];
  logic [VC_W-1:0]    out_vc      [NP][NVC];
  logic [NVC-1:0]     va_gnt      [NP];
  logic [VC_W-1:0]    va_vc       [NP][NVC];
  logic [NVC-1:0]     sa_req      [NP];
  logic [NVC-1:0]     in_gnt      [NP];
  logic [NVC-1:0]     pop         [NP];
  // per output port
  logic [NP-1:0]      sa_out_valid;
  logic [PORT_W-1:0]  sa_out_sel  [NP];
  logic [NP-1:0]      rel_valid;
  logic [VC_W-1:0]    rel_vc      [NP];
  logic [CRED_W-1:0]  credit      [NP][NVC];
  // MAC table
  logic [NVC-1:0]     mac_valid   [NP];
  mac_params_t        mac_params  [NP][NVC];
  logic [NP-1:0]      wr_en, wr_flag;
  logic [VC_W-1:0]    wr_vc       [NP];
  logic [NODE_W-1:0]  wr_src      [NP];
  mac_params_t        wr_params   [NP];
  // timing
  logic               epoch_tick, frame_start;
  logic [BATCH_W-1:0] batch_id;
  flit_t              move_flit   [NP];

  // ---------------- input units ----------------
  for (genvar p = 0; p < NP; p++) begin : g_in
    head_t hd;
    assign hd = head_t'(in_flit[p].data);

    input_unit #(.NVC(NVC), .DEPTH(DEPTH)) u_in (
      .clk, .rst_n, .en,
      .cur_x, .cur_y, .cur_batch(batch_id),
      .in_valid(in_valid[p]), .in_flit(in_flit[p]),
      .credit_out_valid(credit_out_valid[p]), .credit_out_vc(credit_out_vc[p]),
      .pop(pop[p]), .va_gnt(va_gnt[p]), .va_vc(va_vc[p]),
      .front_flit(front_flit[p]), .front_batch(front_batch[p]),
      .nonempty(nonempty[p]), .need_va(need_va[p]), .active(active[p]),
      .req_port(req_port[p]), .out_vc(out_vc[p])
    );

    assign wr_en[p]     = in_valid[p] && is_head(in_flit[p].ftype);
    assign wr_vc[p]     = in_flit[p].vc;
    assign wr_src[p]    = {hd.src_x, hd.src_y};
    assign wr_flag[p]   = hd.flag;
    assign wr_params[p] = hd.params;
  end

  // ---------------- stage 1: allocation ----------------
  vc_allocator #(.NP(NP), .NVC(NVC)) u_va (
    .clk, .rst_n, .en,
    .need_va, .req_port, .rel_valid, .rel_vc, .va_gnt, .va_vc
  );

  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int k = 0; k < NVC; k++)
        sa_req[p][k] = nonempty[p][k] &&
                       (active[p][k] ? (credit[req_port[p][k]][out_vc[p][k]] != '0)
                                     : need_va[p][k]);
  end

  priority_sa #(.NP(NP), .NVC(NVC)) u_sa (
    .clk, .rst_n, .en,
    .req(sa_req), .req_port, .req_batch(front_batch), .cur_batch(batch_id),
    .mac_valid, .mac_params,
    .in_gnt, .out_valid(sa_out_valid), .out_sel(sa_out_sel)
  );

  // a grant turns into a move if the VC holds (or just got) an output VC
  // with a free downstream slot
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      move_flit[p] = '0;
      for (int k = 0; k < NVC; k++) begin
        pop[p][k] = en && in_gnt[p][k] &&
                    (active[p][k] || (va_gnt[p][k] && credit[req_port[p][k]][va_vc[p][k]] != '0));
        if (in_gnt[p][k]) begin
          move_flit[p]    = front_flit[p][k];
          move_flit[p].vc = out_vc[p][k];
        end
      end
    end
    for (int o = 0; o < NP; o++) begin
      rel_valid[o] = 1'b0;
      rel_vc[o]    = '0;
      if (sa_out_valid[o]) begin
        for (int k = 0; k < NVC; k++) begin
          if (pop[sa_out_sel[o]][k] && is_tail(front_flit[sa_out_sel[o]][k].ftype)) begin
            rel_valid[o] = 1'b1;
            rel_vc[o]    = out_vc[sa_out_sel[o]][k];
          end
        end
      end
    end
  end

  // downstream credits: taken by each move, returned by credit_in
  logic [NVC-1:0] cr_inc [NP], cr_dec [NP];
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      for (int v = 0; v < NVC; v++) begin
        cr_inc[o][v] = credit_in_valid[o] && credit_in_vc[o] == VC_W'(v);
        cr_dec[o][v] = 1'b0;
        if (sa_out_valid[o])
          for (int k = 0; k < NVC; k++)
            if (pop[sa_out_sel[o]][k] && out_vc[sa_out_sel[o]][k] == VC_W'(v)) cr_dec[o][v] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < NVC; v++) credit[o][v] <= CRED_W'(DEPTH);
    end else begin
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < NVC; v++)
          credit[o][v] <= credit[o][v] + CRED_W'(cr_inc[o][v]) - CRED_W'(cr_dec[o][v]);
    end
  end

  // ---------------- stage 2: switch traversal ----------------
  // The crossbar is set from the allocation result; its outputs are
  // registered so that each output link is driven straight from a flop.
  flit_t         xb_flit  [NP];
  logic [NP-1:0] xb_valid, sel_move;

  always_comb begin
    for (int o = 0; o < NP; o++) sel_move[o] = sa_out_valid[o] && (|pop[sa_out_sel[o]]);
  end

  crossbar #(.NP(NP)) u_xbar (
    .in_flit(move_flit), .sel_valid(sel_move), .sel(sa_out_sel),
    .out_flit(xb_flit), .out_valid(xb_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      for (int o = 0; o < NP; o++) out_flit[o] <= '0;
    end else begin
      out_valid <= xb_valid;
      for (int o = 0; o < NP; o++) out_flit[o] <= xb_flit[o];
    end
  end

  // ---------------- memory-access aware DVFS ----------------
  mac_table #(.NP(NP), .NVC(NVC)) u_mac (
    .clk, .rst_n, .epoch_tick,
    .wr_en, .wr_vc, .wr_src, .wr_flag, .wr_params,
    .ent_valid(mac_valid), .ent_params(mac_params)
  );

  cdc #(.NP(NP), .NVC(NVC), .DEMAND_W(DEMAND_W)) u_cdc (
    .clk, .rst_n, .ent_valid(mac_valid), .ent_params(mac_params), .demand
  );

  dvfs_setting #(
    .FLOG2(FLOG2), .ELOG2(FLOG2 - 2), .DEMAND_W(DEMAND_W),
    .DEMAND_MAX(NP * MSHR_ENTRIES * (1 << RHO_FRAC))
  ) u_dvfs (
    .clk, .rst_n, .demand, .vf_level, .vf_tune, .frame_start, .epoch_tick,
    .batch_id
  );

  for (genvar o = 0; o < NP; o++) begin : g_cred_chk
    for (genvar v = 0; v < NVC; v++) begin : g_v
      a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
                                       int'(credit[o][v]) <= DEPTH);
    end
  end
endmodule
