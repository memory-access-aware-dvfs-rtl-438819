// tb_ni: network interface at node (3,1) with 32-cycle epochs.
// The bench plays the router: it records injected flits and returns their
// credits a few cycles later, or holds them back to force a stall. Checked:
// packet shape (8-flit data packet on one VC, single-flit control packet),
// header coordinates, one flit per cycle, the flag bit and the carried
// parameters (no flag before the first full window; flag on the first packet
// to each destination in a window only; re-armed by the next window), the
// stall when a VC runs out of credits, and ejection with its credit.
module tb_ni;
  import noc_pkg::*;
  localparam int EL = 5;
  logic clk = 0, rst_n = 0;
  logic msg_valid = 0, msg_ready, msg_is_data = 0;
  logic [COORD_W-1:0] dx = '0, dy = '0;
  logic [FLIT_W-1:0] mdata = '0;
  logic rx_valid;
  flit_t rx_flit;
  logic inj_valid, icv = 0, ej_valid = 0, ecv;
  flit_t inj_flit, ej_flit = '0;
  logic [VC_W-1:0] icvc = '0, ecvc;
  mac_params_t par;
  logic pvalid;
  int checks = 0, failures = 0;
  bit hold_credits = 0;
  int cq [$];            // vcs of credits to return
  flit_t got [$];

  ni #(.ELOG2(EL)) dut (.clk, .rst_n, .node_x(4'd3), .node_y(4'd1), .msg_valid, .msg_ready, .msg_dst_x(dx),
    .msg_dst_y(dy), .msg_is_data, .msg_data(mdata), .rx_valid, .rx_flit,
    .mshr_occ(6'd12), .l1_miss(1'b1), .inst_retired(3'd4), .ld_net(1'b1), .st_net(1'b0),
    .inj_valid, .inj_flit, .inj_credit_valid(icv), .inj_credit_vc(icvc),
    .ej_valid, .ej_flit, .ej_credit_valid(ecv), .ej_credit_vc(ecvc), .params(par), .params_valid(pvalid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // router model: take flits, return one credit per cycle unless held
  always @(posedge clk) if (rst_n) begin
    if (inj_valid) begin got.push_back(inj_flit); cq.push_back(int'(inj_flit.vc)); end
  end
  always @(negedge clk) begin
    icv = 0;
    if (!hold_credits && cq.size() > 0) begin icv = 1; icvc = VC_W'(cq.pop_front()); end
  end

  // send one message and wait for all its flits; returns the flits
  task automatic packet(input int x, input int y, input bit data, output flit_t f [$]);
    int n;
    got.delete();
    n = data ? DATA_PKT_FLITS : 1;
    msg_valid = 1; dx = COORD_W'(x); dy = COORD_W'(y); msg_is_data = data;
    mdata = {$urandom, $urandom, $urandom, $urandom};
    while (!msg_ready) @(negedge clk);
    @(negedge clk);
    msg_valid = 0;
    repeat (n + 4) @(negedge clk);
    f = got;
  endtask

  task automatic check_pkt(input flit_t f [$], input int x, input int y, input bit data,
                           input bit flag, input string tag);
    head_t h;
    int n;
    n = data ? DATA_PKT_FLITS : 1;
    check(f.size() == n, $sformatf("%s: %0d flits", tag, f.size()));
    if (f.size() != n) return;
    h = head_t'(f[0].data);
    check(f[0].ftype == (data ? FLIT_HEAD : FLIT_HEADTAIL), {tag, ": head type"});
    check(int'(h.dst_x) == x && int'(h.dst_y) == y && h.src_x == 4'd3 && h.src_y == 4'd1, {tag, ": header"});
    check(h.flag == flag, $sformatf("%s: flag %0d exp %0d", tag, h.flag, flag));
    if (flag) check(h.params == par, {tag, ": parameters carried"});
    for (int i = 1; i < n; i++) begin
      check(f[i].vc == f[0].vc, {tag, ": one VC"});
      check(f[i].ftype == (i == n - 1 ? FLIT_TAIL : FLIT_BODY), {tag, ": flit type"});
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t f [$];
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    packet(5, 5, 1, f); check_pkt(f, 5, 5, 1, 0, "before first window");
    packet(0, 0, 0, f); check_pkt(f, 0, 0, 0, 0, "control before first window");
    // wait for the first full window
    while (!pvalid) @(negedge clk);
    check(par.rho == 8'd48 && par.gl1m == 8'd64 && par.gload == 8'd255, "characterized values");
    packet(5, 5, 1, f); check_pkt(f, 5, 5, 1, 1, "first to (5,5)");
    packet(5, 5, 0, f); check_pkt(f, 5, 5, 0, 0, "second to (5,5)");
    packet(2, 7, 0, f); check_pkt(f, 2, 7, 0, 1, "first to (2,7)");
    // next window re-arms the routes
    while (!dut.update) @(negedge clk);
    @(negedge clk);
    packet(5, 5, 1, f); check_pkt(f, 5, 5, 1, 1, "(5,5) in the next window");
    // one flit per cycle with credits flowing
    got.delete();
    msg_valid = 1; msg_is_data = 1; dx = 4'd1; dy = 4'd1;
    while (!msg_ready) @(negedge clk);
    @(negedge clk); msg_valid = 0; t0 = 0;
    while (got.size() < DATA_PKT_FLITS && t0 < 50) begin @(negedge clk); t0++; end
    // flits sampled on the 8 edges after the head is registered: one per cycle
    check(t0 == DATA_PKT_FLITS, $sformatf("8 flits %0d cycles after acceptance", t0));
    // stall: no credits come back, a packet stops after 4 flits on its VC
    repeat (10) @(negedge clk);
    hold_credits = 1; got.delete();
    msg_valid = 1; msg_is_data = 1; dx = 4'd6; dy = 4'd0;
    while (!msg_ready) @(negedge clk);
    @(negedge clk); msg_valid = 0;
    repeat (20) @(negedge clk);
    check(got.size() == VC_DEPTH, $sformatf("stalled after %0d flits", got.size()));
    hold_credits = 0;
    repeat (20) @(negedge clk);
    check(got.size() == DATA_PKT_FLITS, "resumed after credits return");
    // ejection
    ej_valid = 1; ej_flit.vc = 3'd5; ej_flit.ftype = FLIT_HEADTAIL; ej_flit.data = 128'hABCD;
    #1 check(rx_valid && rx_flit == ej_flit, "ejected flit delivered");
    @(negedge clk); ej_valid = 0;
    check(ecv && ecvc == 3'd5, "ejection credit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
