// tb_router: one router at (1,1) of a 4x4 mesh, 256-cycle DVFS frames.
// The bench models the five neighbours: per input port a queue of flits sent
// under credit flow control, per output port a sink that returns each credit
// one cycle later. Every flit carries a packet id and its index, and a
// scoreboard checks that every packet leaves whole, in order, on the X-Y
// port of its destination and on one downstream VC. Phases:
//   1. latency of a lone single-flit packet (out after the second edge);
//   2. random traffic with the enable toggling at random (slow router);
//   3. priority: two heads for the same output in the same cycle, the one of a
//      memory non-intensive core leaves first although round-robin alone would
//      pick the other;
//   4. DVFS: parameter sets with large, medium and no rho move the V/F level
//      to 2, 1 and 0 at frame starts, with one retune pulse per change, and
//      the demand equals the sum of per-port maxima.
// Speculative switch allocation (a head leaving in the cycle it gets its VC)
// and the credit stall (no credits on an output) are counted and must occur.
module tb_router;
  import noc_pkg::*;
  localparam int NP = N_PORTS, NVC = N_VCS, FL = 8;
  localparam int DW = RHO_W + $clog2(N_PORTS + 1);
  logic clk = 0, rst_n = 0, en = 1;
  logic [NP-1:0] in_valid = '0, cov, ov, civ = '0;
  flit_t in_flit [NP], out_flit [NP];
  logic [VC_W-1:0] covc [NP], civc [NP];
  logic [LEVEL_W-1:0] level;
  logic tune;
  logic [DW-1:0] demand;
  int checks = 0, failures = 0;

  flit_t q [NP][$];
  int    cred [NP][NVC];
  int    vc_rr [NP];
  int    pkt_port [int], pkt_next [int], pkt_len [int], pkt_vc [int];
  int    next_id = 1, n_out = 0, n_pkts = 0, n_done = 0;
  int    n_spec = 0, n_stall = 0, n_tune = 0;
  bit    hold_out [NP];
  int    cq [NP][$];
  int    order [$];
  int    cyc = 0, t_in = 0, t_out = 0;
  int    bg_mode = 0;

  // parameter-carrying traffic for the DVFS phase
  initial begin
    mac_params_t big, mid;
    big = '{rho: 8'd200, gl1m: 8'd50, gload: 8'd50};
    mid = '{rho: 8'd90,  gl1m: 8'd50, gload: 8'd50};
    forever begin
      @(negedge clk);
      if (bg_mode == 1) for (int p = 0; p < NP; p++) enqueue(p, 1, 1, 1, 1, big, p);
      if (bg_mode == 2) for (int p = 0; p < 3; p++) enqueue(p, 1, 1, 1, 1, mid, 8 + p);
      repeat (31) @(negedge clk);
    end
  end

  router #(.FLOG2(FL)) dut (.clk, .rst_n, .en, .cur_x(4'd1), .cur_y(4'd1), .in_valid, .in_flit,
    .credit_out_valid(cov), .credit_out_vc(covc), .out_valid(ov), .out_flit,
    .credit_in_valid(civ), .credit_in_vc(civc), .vf_level(level), .vf_tune(tune), .demand);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic int xy_port(int dx, int dy);
    return (dx > 1) ? P_EAST : (dx < 1) ? P_WEST : (dy > 1) ? P_NORTH : (dy < 1) ? P_SOUTH : P_LOCAL;
  endfunction

  // queue a packet of len flits at input port p
  task automatic enqueue(input int p, input int dx, input int dy, input int len,
                         input bit flag = 0, input mac_params_t par = '0, input int src = 0);
    int vc;
    vc = vc_rr[p];
    vc_rr[p] = (vc_rr[p] + 1) % NVC;
    for (int i = 0; i < len; i++) begin
      flit_t f;
      head_t h;
      h = '0;
      h.dst_x = COORD_W'(dx); h.dst_y = COORD_W'(dy);
      h.src_x = COORD_W'(src % 4); h.src_y = COORD_W'(src / 4);
      h.flag = flag; h.params = par;
      h.payload = {55'(0), 16'(next_id), 16'(i)};
      f.vc = VC_W'(vc);
      f.ftype = (len == 1) ? FLIT_HEADTAIL : (i == 0) ? FLIT_HEAD : (i == len - 1) ? FLIT_TAIL : FLIT_BODY;
      f.data = h;
      q[p].push_back(f);
    end
    pkt_port[next_id] = xy_port(dx, dy);
    pkt_next[next_id] = 0;
    pkt_len[next_id]  = len;
    pkt_vc[next_id]   = -1;
    next_id++;
    n_pkts++;
  endtask

  // a new packet may use a VC only after the previous one on it is queued out,
  // which sequential queues guarantee; a flit goes when its VC has a credit
  always @(negedge clk) begin
    for (int p = 0; p < NP; p++) begin
      in_valid[p] = 0;
      if (rst_n && q[p].size() > 0 && cred[p][q[p][0].vc] > 0) begin
        in_valid[p] = 1;
        in_flit[p]  = q[p].pop_front();
        cred[p][in_flit[p].vc]--;
      end
    end
    for (int o = 0; o < NP; o++) begin
      civ[o] = 0;
      if (!hold_out[o] && cq[o].size() > 0) begin civ[o] = 1; civc[o] = VC_W'(cq[o].pop_front()); end
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (|ov) t_out = cyc;
    if (in_valid[P_LOCAL]) t_in = cyc;
    for (int p = 0; p < NP; p++) if (cov[p]) cred[p][covc[p]]++;
    for (int o = 0; o < NP; o++) if (ov[o]) begin
      head_t h;
      int id, idx;
      h = head_t'(out_flit[o].data);
      id = int'(h.payload[31:16]); idx = int'(h.payload[15:0]);
      n_out++;
      cq[o].push_back(int'(out_flit[o].vc));
      if (!pkt_port.exists(id)) begin
        check(0, $sformatf("unknown packet %0d", id));
      end else begin
        check(pkt_port[id] == o, $sformatf("packet %0d on port %0d exp %0d", id, o, pkt_port[id]));
        check(pkt_next[id] == idx, $sformatf("packet %0d flit %0d exp %0d", id, idx, pkt_next[id]));
        if (idx == 0) begin pkt_vc[id] = int'(out_flit[o].vc); order.push_back(id); end
        else check(pkt_vc[id] == int'(out_flit[o].vc), "one downstream VC per packet");
        pkt_next[id] = idx + 1;
        if (idx + 1 == pkt_len[id]) n_done++;
      end
    end
    for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++)
      if (dut.pop[p][k] && dut.va_gnt[p][k]) n_spec++;
    for (int p = 0; p < NP; p++) for (int k = 0; k < NVC; k++)
      if (en && dut.nonempty[p][k] && dut.active[p][k] &&
          dut.credit[dut.req_port[p][k]][dut.out_vc[p][k]] == 0) n_stall++;
    if (tune) n_tune++;
  end

  task automatic drain(input int max_cycles);
    int c;
    c = 0;
    while (n_done < n_pkts && c < max_cycles) begin @(negedge clk); c++; end
    check(n_done == n_pkts, $sformatf("%0d of %0d packets delivered", n_done, n_pkts));
  endtask

  task automatic wait_frame();
    while (!dut.frame_start) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      vc_rr[p] = 0; hold_out[p] = 0; in_flit[p] = '0; civc[p] = '0;
      for (int k = 0; k < NVC; k++) cred[p][k] = VC_DEPTH;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(level == 0, "starts at the lowest level");

    // 1. latency: buffered on edge t, taken by the next router on edge t+2
    enqueue(P_LOCAL, 3, 1, 1);
    drain(20);
    check(t_out - t_in == 2, $sformatf("latency %0d cycles exp 2", t_out - t_in));

    // 2. random traffic, random enable, one output stalled for a while
    fork
      begin
        for (int c = 0; c < 3000; c++) begin
          en = ($urandom_range(3) != 0);
          if (c == 500) hold_out[P_NORTH] = 1;
          if (c == 900) hold_out[P_NORTH] = 0;
          @(negedge clk);
        end
        en = 1;
      end
      begin
        for (int i = 0; i < 300; i++) begin
          int p;
          p = $urandom_range(NP - 1);
          enqueue(p, $urandom_range(3), $urandom_range(3), ($urandom_range(1) != 0) ? 8 : 1);
          repeat ($urandom_range(8)) @(negedge clk);
        end
      end
    join
    drain(5000);
    check(n_spec > 0, $sformatf("speculative allocations: %0d", n_spec));
    check(n_stall > 0, $sformatf("credit stall cycles: %0d", n_stall));

    // 3. priority: West and North heads for East in the same cycle
    repeat (300) @(negedge clk);   // let the MAC table age out
    order.delete();
    begin
      mac_params_t lo, hi;
      int id_w, id_n;
      lo = '{rho: 8'd8, gl1m: 8'd240, gload: 8'd20};    // memory-intensive, store-heavy
      hi = '{rho: 8'd8, gl1m: 8'd5,   gload: 8'd200};   // non-intensive, load-heavy
      id_w = next_id; enqueue(P_WEST,  3, 1, 1, 1, lo, 4);
      id_n = next_id; enqueue(P_NORTH, 3, 1, 1, 1, hi, 9);
      drain(50);
      check(order.size() == 2 && order[0] == id_n && order[1] == id_w,
            "critical packet first");
    end

    // 4. DVFS level changes at frame starts. Flagged heads are re-sent every
    // 32 cycles, as NIs do once per window, so the MAC entries stay fresh.
    wait_frame();
    begin
      int t0;
      t0 = n_tune;
      bg_mode = 1;
      repeat (300) @(negedge clk);
      check(int'(demand) == 5 * 200, $sformatf("demand %0d exp 1000", demand));
      wait_frame();
      check(level == 2, $sformatf("level %0d exp 2", level));
      // medium demand: 3 ports at 90 -> 270 of 640 is in the middle third
      bg_mode = 2;
      repeat (300) @(negedge clk);
      check(int'(demand) == 270, $sformatf("demand %0d exp 270", demand));
      wait_frame();
      check(level == 1, $sformatf("level %0d exp 1", level));
      // no traffic: entries age out, the level drops
      bg_mode = 0;
      wait_frame();
      wait_frame();
      check(demand == 0 && level == 0, $sformatf("idle: demand %0d level %0d", demand, level));
      check(n_tune - t0 == 3, $sformatf("%0d retunes exp 3", n_tune - t0));
      drain(50);
    end
    check(n_out > 1000, $sformatf("%0d flits switched", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
