// ni: network interface of one node, with memory-access characterization
// and parameter piggybacking.
//
// Injection: the core offers one message at a time (msg_valid/msg_ready, a
// ready-valid handshake; the message is taken in the cycle both are high). A
// data message (a cache block) becomes one 8-flit packet, a control message
// one single-flit packet. The NI picks a VC of the router's local input port
// that has a free slot, round-robin, and sends one flit per cycle while that
// VC has credits.
// Piggybacking: the characterizer's (rho, gamma_L1m, gamma_load) set rides in
// the head flit of the first packet towards each destination (each route) in
// every characterization window, marked by the flag bit; all other head flits
// carry flag 0. A new window (characterizer `update`) re-arms every route.
// Ejection: flits from the router's local output are handed to the core on
// rx_valid/rx_flit in the same cycle, and a credit goes back one cycle later,
// so the core side must always accept.
// What the NI does (packetization, characterization, the flag bit followed by
// the parameter set, first packet per route per window) follows the document;
// the VC choice, the handshake and the credit handling are this design's own.
module ni
  import noc_pkg::*;
#(
  parameter int NNODES = N_NODES,
  parameter int NVC    = N_VCS,
  parameter int DEPTH  = VC_DEPTH,
  parameter int ELOG2  = EPOCH_LOG2,
  parameter int OCC_W  = $clog2(MSHR_ENTRIES + 1),
  parameter int INST_W = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] node_x,       // this node's mesh position
  input  logic [COORD_W-1:0] node_y,
  // core: messages
  input  logic               msg_valid,
  output logic               msg_ready,
  input  logic [COORD_W-1:0] msg_dst_x,
  input  logic [COORD_W-1:0] msg_dst_y,
  input  logic               msg_is_data,
  input  logic [FLIT_W-1:0]  msg_data,
  output logic               rx_valid,
  output flit_t              rx_flit,
  // core: memory-access events
  input  logic [OCC_W-1:0]   mshr_occ,
  input  logic               l1_miss,
  input  logic [INST_W-1:0]  inst_retired,
  input  logic               ld_net,
  input  logic               st_net,
  // router local port
  output logic               inj_valid,
  output flit_t              inj_flit,
  input  logic               inj_credit_valid,
  input  logic [VC_W-1:0]    inj_credit_vc,
  input  logic               ej_valid,
  input  flit_t              ej_flit,
  output logic               ej_credit_valid,
  output logic [VC_W-1:0]    ej_credit_vc,
  // characteristics, for observation
  output mac_params_t        params,
  output logic               params_valid
);
  localparam int CRED_W = $clog2(DEPTH + 1);
  localparam int CNT_W  = $clog2(DATA_PKT_FLITS + 1);
  localparam int SENT_W = (1 << (2 * COORD_W)) > NNODES ? (1 << (2 * COORD_W)) : NNODES;

  logic               update;
  logic [CRED_W-1:0]  credit [NVC];
  logic [SENT_W-1:0]  sent;
  logic               sending;
  logic [VC_W-1:0]    cur_vc, rr_vc;
  logic [CNT_W-1:0]   left;            // flits still to send after the head
  logic [FLIT_W-1:0]  body_data;
  logic               pick_ok;
  logic [VC_W-1:0]    pick_vc;
  logic [NODE_W-1:0]  dst_id;
  head_t              hd;

  mem_characterizer #(.ELOG2(ELOG2), .OCC_W(OCC_W), .INST_W(INST_W)) u_char (
    .clk, .rst_n, .mshr_occ, .l1_miss, .inst_retired, .ld_net, .st_net,
    .params, .params_valid, .update
  );

  // VC for a new packet: first one with a free slot after the last used one
  always_comb begin
    pick_ok = 1'b0;
    pick_vc = '0;
    for (int i = 0; i < NVC; i++) begin
      int v;
      v = (int'(rr_vc) + 1 + i) % NVC;
      if (!pick_ok && credit[v] != '0) begin
        pick_ok = 1'b1;
        pick_vc = VC_W'(v);
      end
    end
  end

  logic [NVC-1:0]    dec;
  logic [SENT_W-1:0] sent_nx;

  assign msg_ready = !sending && pick_ok;
  assign dst_id    = {msg_dst_x, msg_dst_y};

  always_comb begin
    hd         = head_t'(msg_data);
    hd.dst_x   = msg_dst_x;
    hd.dst_y   = msg_dst_y;
    hd.src_x   = node_x;
    hd.src_y   = node_y;
    hd.flag    = params_valid && !sent[dst_id];
    hd.params  = hd.flag ? params : '0;
  end

  // credit consumption and the next per-destination "sent" vector
  always_comb begin
    dec     = '0;
    sent_nx = update ? '0 : sent;
    if (msg_valid && msg_ready) begin
      dec[pick_vc] = 1'b1;
      if (hd.flag) sent_nx[dst_id] = 1'b1;
    end else if (sending && credit[cur_vc] != '0) begin
      dec[cur_vc] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending   <= 1'b0;
      cur_vc    <= '0;
      rr_vc     <= VC_W'(NVC - 1);
      left      <= '0;
      body_data <= '0;
      sent      <= '0;
      inj_valid <= 1'b0;
      inj_flit  <= '0;
      for (int v = 0; v < NVC; v++) credit[v] <= CRED_W'(DEPTH);
    end else begin
      inj_valid <= 1'b0;
      if (msg_valid && msg_ready) begin
        inj_valid      <= 1'b1;
        inj_flit.ftype <= msg_is_data ? FLIT_HEAD : FLIT_HEADTAIL;
        inj_flit.vc    <= pick_vc;
        inj_flit.data  <= hd;
        rr_vc          <= pick_vc;
        if (msg_is_data) begin
          sending   <= 1'b1;
          cur_vc    <= pick_vc;
          left      <= CNT_W'(DATA_PKT_FLITS - 1);
          body_data <= msg_data;
        end
      end else if (sending && credit[cur_vc] != '0) begin
        inj_valid      <= 1'b1;
        inj_flit.ftype <= (left == CNT_W'(1)) ? FLIT_TAIL : FLIT_BODY;
        inj_flit.vc    <= cur_vc;
        inj_flit.data  <= body_data;
        left           <= left - 1'b1;
        if (left == CNT_W'(1)) sending <= 1'b0;
      end
      sent <= sent_nx;
      for (int v = 0; v < NVC; v++)
        credit[v] <= credit[v] - CRED_W'(dec[v])
                   + CRED_W'(inj_credit_valid && inj_credit_vc == VC_W'(v));
    end
  end

  // ejection: the core always accepts, the slot is freed at once
  assign rx_valid = ej_valid;
  assign rx_flit  = ej_flit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ej_credit_valid <= 1'b0;
      ej_credit_vc    <= '0;
    end else begin
      ej_credit_valid <= ej_valid;
      ej_credit_vc    <= ej_flit.vc;
    end
  end

  a_msg_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (msg_valid && !msg_ready) |=> msg_valid);
endmodule
