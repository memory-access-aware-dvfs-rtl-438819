// mac_table: Memory-Access Characteristics table of a router.
//
// One entry per input VC holds the (rho, gamma_L1m, gamma_load) set of the
// core whose packet occupies that VC, plus the source node id. When a head
// flit is written into a VC:
//   - with the flag bit set, the entry takes the carried parameters, and every
//     other entry of the same source takes them too (VCs used by the same
//     thread share one set of values and are treated equally);
//   - without the flag, the entry takes the values of a valid entry (or of a
//     flagged head arriving in the same cycle) with the same source, and is
//     marked invalid if there is none.
// Entries refreshed during an epoch stay valid; at each epoch tick, entries
// not refreshed since the previous tick are invalidated, so the table follows
// the characteristics epoch by epoch. The one-entry-per-VC organisation and
// the value sharing follow the document; the source lookup and the
// epoch ageing are this design's own reading of "updated epoch by epoch".
// Updates take one clock edge; outputs are registers. Writes follow the link
// (base clock), not the router clock enable.
module mac_table
  import noc_pkg::*;
#(
  parameter int NP  = N_PORTS,
  parameter int NVC = N_VCS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              epoch_tick,
  input  logic [NP-1:0]     wr_en,      // head flit written at port p
  input  logic [VC_W-1:0]   wr_vc    [NP],
  input  logic [NODE_W-1:0] wr_src   [NP],
  input  logic [NP-1:0]     wr_flag,
  input  mac_params_t       wr_params[NP],
  output logic [NVC-1:0]    ent_valid [NP],
  output mac_params_t       ent_params[NP][NVC]
);
  logic [NODE_W-1:0] ent_src   [NP][NVC];
  logic [NVC-1:0]    ent_fresh [NP];
  // per written head: values found for its source
  logic              lk_v   [NP];
  mac_params_t       lk_par [NP];
  // per entry: next state
  logic [NVC-1:0]    nx_valid [NP];
  logic [NVC-1:0]    nx_fresh [NP];
  logic [NVC-1:0]    nx_src_we[NP];
  mac_params_t       nx_par   [NP][NVC];

  // lookup for each written head: a flagged head of the same source arriving
  // now, else a valid entry of the same source
  always_comb begin
    for (int q = 0; q < NP; q++) begin
      lk_v[q]   = 1'b0;
      lk_par[q] = '0;
      for (int r = 0; r < NP; r++) begin
        if (!lk_v[q] && wr_en[r] && wr_flag[r] && wr_src[r] == wr_src[q]) begin
          lk_v[q]   = 1'b1;
          lk_par[q] = wr_params[r];
        end
      end
      for (int p = 0; p < NP; p++) begin
        for (int j = 0; j < NVC; j++) begin
          if (!lk_v[q] && ent_valid[p][j] && ent_src[p][j] == wr_src[q]) begin
            lk_v[q]   = 1'b1;
            lk_par[q] = ent_params[p][j];
          end
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      for (int k = 0; k < NVC; k++) begin
        logic upd;
        nx_valid[p][k]  = ent_valid[p][k];
        nx_par[p][k]    = ent_params[p][k];
        nx_src_we[p][k] = 1'b0;
        upd = 1'b0;
        if (wr_en[p] && wr_vc[p] == VC_W'(k)) begin
          // a head flit enters this VC
          nx_src_we[p][k] = 1'b1;
          nx_valid[p][k]  = wr_flag[p] || lk_v[p];
          nx_par[p][k]    = wr_flag[p] ? wr_params[p] : lk_par[p];
          upd             = wr_flag[p] || lk_v[p];
        end else if (ent_valid[p][k]) begin
          // new values of this entry's source arrive on another VC
          for (int q = 0; q < NP; q++) begin
            if (wr_en[q] && wr_flag[q] && wr_src[q] == ent_src[p][k]) begin
              nx_par[p][k] = wr_params[q];
              upd = 1'b1;
            end
          end
          if (epoch_tick && !ent_fresh[p][k] && !upd) nx_valid[p][k] = 1'b0;
        end
        nx_fresh[p][k] = upd || (ent_fresh[p][k] && !epoch_tick);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        ent_valid[p] <= '0;
        ent_fresh[p] <= '0;
        for (int k = 0; k < NVC; k++) begin
          ent_params[p][k] <= '0;
          ent_src[p][k]    <= '0;
        end
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        ent_valid[p] <= nx_valid[p];
        ent_fresh[p] <= nx_fresh[p];
        for (int k = 0; k < NVC; k++) begin
          ent_params[p][k] <= nx_par[p][k];
          if (nx_src_we[p][k]) ent_src[p][k] <= wr_src[p];
        end
      end
    end
  end
endmodule
