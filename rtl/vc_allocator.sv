// vc_allocator: virtual-channel allocation of a router.
//
// For every output port the allocator keeps which downstream VCs are held by
// a packet. Each cycle, per output port, it picks one of the input VCs whose
// head flit asks for that port (round-robin over all input VCs, starting after
// the last winner) and gives it the lowest-numbered free downstream VC. A VC
// becomes free again when the tail flit that used it leaves through the
// switch (rel_valid/rel_vc from the switch traversal). The document names VC
// allocation as part of the first pipeline stage, in parallel with route
// computation and switch allocation; one grant per output port per cycle and
// the round-robin choice are this design's own. Grants are combinational from
// registered state; the state advances only when `en` is high.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int NP  = N_PORTS,
  parameter int NVC = N_VCS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [NVC-1:0]    need_va  [NP],
  input  logic [PORT_W-1:0] req_port [NP][NVC],
  input  logic [NP-1:0]     rel_valid,
  input  logic [VC_W-1:0]   rel_vc   [NP],
  output logic [NVC-1:0]    va_gnt   [NP],
  output logic [VC_W-1:0]   va_vc    [NP][NVC]
);
  localparam int NR  = NP * NVC;
  localparam int IDX_W = $clog2(NR);

  logic [NVC-1:0]   busy [NP];
  logic [NVC-1:0]   busy_nx [NP];
  logic [IDX_W-1:0] rr   [NP];
  logic             win_v   [NP];
  logic [IDX_W-1:0] win_idx [NP];
  logic [VC_W-1:0]  free_vc [NP];
  logic             free_ok [NP];

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      va_gnt[p] = '0;
      for (int k = 0; k < NVC; k++) va_vc[p][k] = '0;
    end
    for (int o = 0; o < NP; o++) begin
      // lowest free downstream VC
      free_ok[o] = 1'b0;
      free_vc[o] = '0;
      for (int v = NVC - 1; v >= 0; v--) begin
        if (!busy[o][v]) begin
          free_ok[o] = 1'b1;
          free_vc[o] = VC_W'(v);
        end
      end
      // round-robin pick of a requester
      win_v[o]   = 1'b0;
      win_idx[o] = '0;
      for (int i = 0; i < NR; i++) begin
        int idx;
        idx = (int'(rr[o]) + i) % NR;
        if (!win_v[o] && need_va[idx / NVC][idx % NVC]
            && req_port[idx / NVC][idx % NVC] == PORT_W'(o)) begin
          win_v[o]   = 1'b1;
          win_idx[o] = IDX_W'(idx);
        end
      end
      if (win_v[o] && free_ok[o]) begin
        va_gnt[int'(win_idx[o]) / NVC][int'(win_idx[o]) % NVC] = 1'b1;
        va_vc[int'(win_idx[o]) / NVC][int'(win_idx[o]) % NVC]  = free_vc[o];
      end
    end
  end

  // next busy state: the grant is applied first, then the release, so a
  // single-flit packet may take and free a VC in the same cycle
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      busy_nx[o] = busy[o];
      if (win_v[o] && free_ok[o]) busy_nx[o][free_vc[o]] = 1'b1;
      if (rel_valid[o]) busy_nx[o][rel_vc[o]] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NP; o++) begin
        busy[o] <= '0;
        rr[o]   <= '0;
      end
    end else if (en) begin
      for (int o = 0; o < NP; o++) begin
        busy[o] <= busy_nx[o];
        if (win_v[o] && free_ok[o])
          rr[o] <= (win_idx[o] == IDX_W'(NR - 1)) ? '0 : win_idx[o] + 1'b1;
      end
    end
  end
endmodule
