// mem_characterizer: sliding-window memory-access profiling of one core.
//
// The NI-side characterizer computes, over a window of four epochs
// (T_sw = 4 * 2^ELOG2 cycles, sliding by one epoch):
//   rho        = (sum over the window of the MSHR occupancy) / T_sw, i.e. the
//                average number of outstanding network requests, Q6.2;
//   gamma_L1m  = network-incurring L1 misses / retired instructions, Q0.8;
//   gamma_load = network-incurring loads / (such loads + stores), Q0.8.
// Per epoch the core's event inputs are accumulated; at the end of an epoch
// the epoch totals enter a four-deep history, the window sums are formed and
// two serial dividers compute the ratios (an idle window gives 0). When both
// are done, `params` is updated and `update` pulses; `params_valid` rises
// after the first full window. Ratios of 1 or more saturate to the largest
// code. The three parameters, counting only events that cause network
// traffic, and the 4-epoch sliding window follow the document; the input
// encoding, the fixed-point formats and the saturation are this design's own.
//
// Inputs per cycle: mshr_occ (occupied MSHR entries), l1_miss (misses that
// send a request into the network), inst_retired (instructions retired this
// cycle), ld_net / st_net (a load / a store that causes network traffic).
module mem_characterizer
  import noc_pkg::*;
#(
  parameter int ELOG2  = EPOCH_LOG2,
  parameter int OCC_W  = $clog2(MSHR_ENTRIES + 1),
  parameter int INST_W = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [OCC_W-1:0]  mshr_occ,
  input  logic              l1_miss,
  input  logic [INST_W-1:0] inst_retired,
  input  logic              ld_net,
  input  logic              st_net,
  output mac_params_t       params,
  output logic              params_valid,
  output logic              update
);
  localparam int WLOG2 = ELOG2 + 2;                 // window length, log2
  localparam int SUM_W = WLOG2 + OCC_W + INST_W;    // holds any window sum
  localparam int DIV_W = SUM_W + GAMMA_W;

  typedef struct packed {
    logic [SUM_W-1:0] occ, miss, inst, ld, st;
  } epoch_cnt_t;

  logic [ELOG2-1:0] cyc;
  epoch_cnt_t       acc, acc_nx, hist [3];
  epoch_cnt_t       win;
  logic [2:0]       n_epochs;
  logic             div_start, dm_busy, dl_busy, dm_done, dl_done, m_ready, l_ready;
  logic [DIV_W-1:0] q_miss, q_load;
  logic [GAMMA_W-1:0] g_miss, g_load;
  logic [SUM_W-1:0] rho_full;
  logic             epoch_end;

  assign epoch_end = (cyc == '1);

  // this cycle's events added to the running epoch totals
  always_comb begin
    acc_nx.occ  = acc.occ  + SUM_W'(mshr_occ);
    acc_nx.miss = acc.miss + SUM_W'(l1_miss);
    acc_nx.inst = acc.inst + SUM_W'(inst_retired);
    acc_nx.ld   = acc.ld   + SUM_W'(ld_net);
    acc_nx.st   = acc.st   + SUM_W'(st_net);
  end

  // window = the epoch ending now plus the three before it
  always_comb begin
    win.occ  = acc_nx.occ  + hist[0].occ  + hist[1].occ  + hist[2].occ;
    win.miss = acc_nx.miss + hist[0].miss + hist[1].miss + hist[2].miss;
    win.inst = acc_nx.inst + hist[0].inst + hist[1].inst + hist[2].inst;
    win.ld   = acc_nx.ld   + hist[0].ld   + hist[1].ld   + hist[2].ld;
    win.st   = acc_nx.st   + hist[0].st   + hist[1].st   + hist[2].st;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc      <= '0;
      acc      <= '0;
      for (int i = 0; i < 3; i++) hist[i] <= '0;
      n_epochs <= '0;
      rho_full <= '0;
    end else begin
      cyc <= cyc + 1'b1;
      if (epoch_end) begin
        hist[0] <= acc_nx;
        hist[1] <= hist[0];
        hist[2] <= hist[1];
        rho_full <= win.occ >> (WLOG2 - RHO_FRAC);
        if (n_epochs != 3'd4) n_epochs <= n_epochs + 1'b1;
        acc <= '0;
      end else begin
        acc <= acc_nx;
      end
    end
  end

  assign div_start = epoch_end;

  seq_divider #(.W(DIV_W)) u_div_miss (
    .clk, .rst_n, .start(div_start),
    .dividend({win.miss, GAMMA_W'(0)}), .divisor(DIV_W'(win.inst)),
    .busy(dm_busy), .done(dm_done), .quotient(q_miss)
  );

  seq_divider #(.W(DIV_W)) u_div_load (
    .clk, .rst_n, .start(div_start),
    .dividend({win.ld, GAMMA_W'(0)}), .divisor(DIV_W'(win.ld) + DIV_W'(win.st)),
    .busy(dl_busy), .done(dl_done), .quotient(q_load)
  );

  function automatic logic [GAMMA_W-1:0] sat_gamma(logic [DIV_W-1:0] q, logic [SUM_W-1:0] den);
    if (den == '0)                        return '0;
    else if (q > DIV_W'((1 << GAMMA_W) - 1)) return '1;
    else                                  return q[GAMMA_W-1:0];
  endfunction

  logic [SUM_W-1:0] inst_l, lds_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_ready      <= 1'b0;
      l_ready      <= 1'b0;
      g_miss       <= '0;
      g_load       <= '0;
      params       <= '0;
      params_valid <= 1'b0;
      update       <= 1'b0;
      inst_l       <= '0;
      lds_l        <= '0;
    end else begin
      update <= 1'b0;
      if (div_start) begin
        m_ready <= 1'b0;
        l_ready <= 1'b0;
        inst_l  <= win.inst;
        lds_l   <= win.ld + win.st;
      end else begin
        if (dm_done) begin m_ready <= 1'b1; g_miss <= sat_gamma(q_miss, inst_l); end
        if (dl_done) begin l_ready <= 1'b1; g_load <= sat_gamma(q_load, lds_l); end
        if (m_ready && l_ready) begin
          m_ready <= 1'b0;
          l_ready <= 1'b0;
          params.rho   <= (rho_full > SUM_W'((1 << RHO_W) - 1)) ? '1 : rho_full[RHO_W-1:0];
          params.gl1m  <= g_miss;
          params.gload <= g_load;
          update       <= 1'b1;
          params_valid <= params_valid || (n_epochs == 3'd4);
        end
      end
    end
  end

  a_div_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               div_start |-> (!dm_busy && !dl_busy));
endmodule
