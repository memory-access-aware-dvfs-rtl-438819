// Shared body of the mesh testbenches: stimulus, scoreboard and mechanism
// counters. Expects MX, MY, FL, NN, DW and PHASE to be defined by the
// including module, which instantiates the mesh as `dut` with (.*).
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] msg_valid = '0, msg_ready, msg_is_data = '0, rx_valid;
  logic [COORD_W-1:0] msg_dst_x [NN], msg_dst_y [NN];
  logic [FLIT_W-1:0] msg_data [NN];
  flit_t rx_flit [NN];
  logic [5:0] ev_mshr_occ [NN];
  logic [NN-1:0] ev_l1_miss = '0, ev_ld_net = '0, ev_st_net = '0, vf_tune, params_valid;
  logic [2:0] ev_inst [NN];
  logic [LEVEL_W-1:0] vf_level [NN];
  logic [DW-1:0] demand [NN];
  mac_params_t params [NN];

  int checks = 0, failures = 0;
  int sent_pkts = 0, rcvd_pkts = 0;
  int seq [NN];
  int exp_len [int];                // key: src*65536 + seq
  int rx_left [NN][N_VCS];          // packets interleave on the ejection link, one per VC
  int rx_key [NN][N_VCS];
  bit heavy = 1, run = 1;
  bit accepted [NN];
  int c_flag [NN], c_macw [NN], c_spec [NN], c_cont [NN], c_batch [NN];
  int c_up [NN], c_down [NN], c_slow [NN], c_bp [NN];
  int max_level = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (60 * PHASE) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // core models
  for (genvar n = 0; n < NN; n++) begin : g_core
    always @(negedge clk) begin
      if (!rst_n) begin
        ev_mshr_occ[n] = '0; ev_inst[n] = '0;
        msg_dst_x[n] = '0; msg_dst_y[n] = '0; msg_data[n] = '0;
      end else begin
        // events
        ev_mshr_occ[n] = heavy ? 6'($urandom_range(24, 32)) : 6'($urandom_range(1));
        ev_inst[n]     = 3'($urandom_range(4));
        ev_l1_miss[n]  = heavy ? ($urandom_range(9) < 3) : ($urandom_range(99) == 0);
        ev_ld_net[n]   = ($urandom_range(9) < ((n % 2) != 0 ? 8 : 2));
        ev_st_net[n]   = !ev_ld_net[n] && ($urandom_range(9) < 5);
        // messages: hold while not accepted, otherwise maybe start a new one
        if (accepted[n]) begin
          msg_valid[n] = 0;
          accepted[n]  = 0;
        end
        if (!msg_valid[n] && run && $urandom_range(99) < (heavy ? 12 : 1)) begin
          int d, key;
          d = $urandom_range(NN - 1);
          key = n * 65536 + seq[n];
          msg_valid[n]   = 1;
          msg_dst_x[n]   = COORD_W'(d % MX);
          msg_dst_y[n]   = COORD_W'(d / MX);
          msg_is_data[n] = ($urandom_range(2) == 0);
          msg_data[n]    = {96'(0), 32'(key)};
          exp_len[key]   = msg_is_data[n] ? DATA_PKT_FLITS : 1;
          seq[n]++;
          sent_pkts++;
        end
      end
    end

    always @(posedge clk) if (rst_n && msg_valid[n] && msg_ready[n]) accepted[n] = 1;

    // delivery scoreboard
    always @(posedge clk) if (rst_n && rx_valid[n]) begin
      head_t h;
      int v;
      h = head_t'(rx_flit[n].data);
      v = int'(rx_flit[n].vc);
      if (is_head(rx_flit[n].ftype)) begin
        check(int'(h.dst_x) == n % MX && int'(h.dst_y) == n / MX,
              $sformatf("packet for (%0d,%0d) delivered at node %0d", h.dst_x, h.dst_y, n));
        check(rx_left[n][v] == 0, $sformatf("node %0d: head inside a packet", n));
        rx_key[n][v]  = int'(h.payload[31:0]);
        rx_left[n][v] = exp_len.exists(rx_key[n][v]) ? exp_len[rx_key[n][v]] : -100;
        check(rx_left[n][v] > 0, $sformatf("node %0d: unknown packet %0h", n, rx_key[n][v]));
        check(int'(h.src_y) * MX + int'(h.src_x) == rx_key[n][v] / 65536, "source field");
      end else begin
        check(int'(rx_flit[n].data[31:0]) == rx_key[n][v], $sformatf("node %0d: flit of another packet", n));
      end
      rx_left[n][v]--;
      if (rx_left[n][v] == 0) rcvd_pkts++;
      check(is_tail(rx_flit[n].ftype) == (rx_left[n][v] == 0), $sformatf("node %0d: tail position", n));
    end
  end

  // mechanism counters, per router
  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      localparam int N = y * MX + x;
      always @(posedge clk) if (rst_n) begin
        head_t ih;
        ih = head_t'(dut.g_y[y].g_x[x].u_ni.inj_flit.data);
        if (dut.g_y[y].g_x[x].u_ni.inj_valid && is_head(dut.g_y[y].g_x[x].u_ni.inj_flit.ftype) && ih.flag)
          c_flag[N]++;
        c_macw[N] += $countones(dut.g_y[y].g_x[x].u_router.wr_en & dut.g_y[y].g_x[x].u_router.wr_flag);
        for (int p = 0; p < N_PORTS; p++) begin
          c_spec[N] += $countones(dut.g_y[y].g_x[x].u_router.pop[p] & dut.g_y[y].g_x[x].u_router.va_gnt[p]);
          for (int k = 0; k < N_VCS; k++)
            if (dut.g_y[y].g_x[x].u_router.sa_req[p][k] &&
                dut.g_y[y].g_x[x].u_router.front_batch[p][k] != dut.g_y[y].g_x[x].u_router.batch_id)
              c_batch[N]++;
        end
        for (int o = 0; o < N_PORTS; o++) begin
          int nreq;
          nreq = 0;
          for (int p = 0; p < N_PORTS; p++)
            if (dut.g_y[y].g_x[x].u_router.u_sa.iv[p] &&
                dut.g_y[y].g_x[x].u_router.req_port[p][dut.g_y[y].g_x[x].u_router.u_sa.ivc[p]] == PORT_W'(o))
              nreq++;
          if (nreq > 1) c_cont[N]++;
        end
        if (vf_tune[N] && vf_level[N] != 0) c_up[N]++;
        if (vf_tune[N] && vf_level[N] == 0) c_down[N]++;
        if (int'(vf_level[N]) > max_level) max_level = int'(vf_level[N]);
        if (!dut.r_en[N]) c_slow[N]++;
        if (msg_valid[N] && !msg_ready[N]) c_bp[N]++;
      end
    end
  end

  function automatic int total(input int a [NN]);
    int s;
    s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    int wait_c;
    for (int n = 0; n < NN; n++) begin
      seq[n] = 0; accepted[n] = 0;
      for (int v = 0; v < N_VCS; v++) begin rx_left[n][v] = 0; rx_key[n][v] = 0; end
      c_flag[n] = 0; c_macw[n] = 0; c_spec[n] = 0; c_cont[n] = 0; c_batch[n] = 0;
      c_up[n] = 0; c_down[n] = 0; c_slow[n] = 0; c_bp[n] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // heavy phase: several frames of memory-intensive cores
    heavy = 1;
    repeat (PHASE * 8) @(negedge clk);
    check(max_level > 0, $sformatf("highest V/F level under load: %0d", max_level));
    // idle phase: the levels fall back to the lowest one
    heavy = 0;
    repeat (PHASE * 8) @(negedge clk);
    begin
      int hi;
      hi = 0;
      for (int n = 0; n < NN; n++) if (vf_level[n] != 0) hi++;
      check(hi == 0, $sformatf("%0d routers above the lowest level when idle", hi));
    end
    run = 0;
    wait_c = 0;
    while ((msg_valid != '0 || rcvd_pkts < sent_pkts) && wait_c < 4 * PHASE) begin
      @(negedge clk); wait_c++;
    end
    check(rcvd_pkts == sent_pkts, $sformatf("%0d of %0d packets delivered", rcvd_pkts, sent_pkts));
    $display("packets %0d, piggybacked heads %0d, MAC writes %0d, speculative moves %0d",
             sent_pkts, total(c_flag), total(c_macw), total(c_spec));
    $display("contention cycles %0d, older-batch requests %0d, V/F up %0d down %0d",
             total(c_cont), total(c_batch), total(c_up), total(c_down));
    $display("slowed router cycles %0d, injection back-pressure cycles %0d",
             total(c_slow), total(c_bp));
    check(total(c_flag) > 0,  "piggybacking happened");
    check(total(c_macw) > 0,  "MAC table written");
    check(total(c_spec) > 0,  "speculative allocation happened");
    check(total(c_cont) > 0,  "switch contention happened");
    check(total(c_batch) > 0, "batch ageing happened");
    check(total(c_up) > 0,    "V/F level raised");
    check(total(c_down) > 0,  "V/F level lowered");
    check(total(c_slow) > 0,  "routers ran slowed");
    check(total(c_bp) > 0,    "injection back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
