// priority_sa: priority-based switch allocator with packet batching.
//
// Every requesting input VC gets a rank key, compared most significant first:
//   1. batch age: (current batch - batch of the flit's arrival) mod 2^BATCH_W.
//      Packets of earlier batches beat packets of later ones, so no packet
//      starves behind a stream of high-rank packets.
//   2. criticality score = (2^GAMMA_W - 1 - gamma_L1m) + gamma_load: a low L1
//      miss rate (memory non-intensive thread) or a high load ratio raises the
//      rank. A VC without a valid MAC-table entry gets the middle score.
// Allocation is separable: each input port picks its highest-key requesting
// VC, then each output port picks the highest-key input among those that want
// it. Ties are broken round-robin (the search starts after the last winner).
// The ranking rule, the batching and the batch length of one DVFS frame follow
// the document; the additive score, the separable structure and the
// round-robin tie breaking are this design's own.
// Grants are combinational; the round-robin pointers advance when `en` is high.
module priority_sa
  import noc_pkg::*;
#(
  parameter int NP  = N_PORTS,
  parameter int NVC = N_VCS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [NVC-1:0]     req        [NP],
  input  logic [PORT_W-1:0]  req_port   [NP][NVC],
  input  logic [BATCH_W-1:0] req_batch  [NP][NVC],
  input  logic [BATCH_W-1:0] cur_batch,
  input  logic [NVC-1:0]     mac_valid  [NP],
  input  mac_params_t        mac_params [NP][NVC],
  output logic [NVC-1:0]     in_gnt     [NP],     // granted VC per input port
  output logic [NP-1:0]      out_valid,           // output port used this cycle
  output logic [PORT_W-1:0]  out_sel    [NP]      // input port feeding it
);
  localparam int SCORE_W = GAMMA_W + 1;
  localparam int KEY_W   = BATCH_W + SCORE_W;
  localparam logic [SCORE_W-1:0] MID_SCORE = SCORE_W'((1 << GAMMA_W) - 1);

  logic [KEY_W-1:0]  key    [NP][NVC];
  logic              iv     [NP];
  logic [VC_W-1:0]   ivc    [NP];
  logic [KEY_W-1:0]  ikey   [NP];
  logic [VC_W-1:0]   rr_in  [NP];
  logic [PORT_W-1:0] rr_out [NP];

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      for (int k = 0; k < NVC; k++) begin
        logic [SCORE_W-1:0] score;
        logic [BATCH_W-1:0] age;
        age   = cur_batch - req_batch[p][k];
        score = mac_valid[p][k]
              ? SCORE_W'({1'b0, ~mac_params[p][k].gl1m}) + SCORE_W'(mac_params[p][k].gload)
              : MID_SCORE;
        key[p][k] = {age, score};
      end
    end

    // stage 1: one VC per input port
    for (int p = 0; p < NP; p++) begin
      iv[p] = 1'b0; ivc[p] = '0; ikey[p] = '0;
      for (int i = 0; i < NVC; i++) begin
        int k;
        k = (int'(rr_in[p]) + i) % NVC;
        if (req[p][k] && (!iv[p] || key[p][k] > ikey[p])) begin
          iv[p] = 1'b1; ivc[p] = VC_W'(k); ikey[p] = key[p][k];
        end
      end
    end

    // stage 2: one input port per output port
    for (int p = 0; p < NP; p++) in_gnt[p] = '0;
    for (int o = 0; o < NP; o++) begin
      logic [KEY_W-1:0] best;
      out_valid[o] = 1'b0; out_sel[o] = '0; best = '0;
      for (int i = 0; i < NP; i++) begin
        int p;
        p = (int'(rr_out[o]) + i) % NP;
        if (iv[p] && req_port[p][ivc[p]] == PORT_W'(o) && (!out_valid[o] || ikey[p] > best)) begin
          out_valid[o] = 1'b1; out_sel[o] = PORT_W'(p); best = ikey[p];
        end
      end
      if (out_valid[o]) in_gnt[out_sel[o]][ivc[out_sel[o]]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        rr_in[p]  <= '0;
        rr_out[p] <= '0;
      end
    end else if (en) begin
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o]) begin
          rr_out[o] <= (int'(out_sel[o]) == NP - 1) ? '0 : out_sel[o] + 1'b1;
          rr_in[out_sel[o]] <= (int'(ivc[out_sel[o]]) == NVC - 1) ? '0 : ivc[out_sel[o]] + 1'b1;
        end
      end
    end
  end
endmodule
