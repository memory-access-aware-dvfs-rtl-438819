// tb_input_unit: a router input port at (2,2).
// A 3-flit packet for (5,2) enters VC 2 and a single-flit packet for (2,0)
// enters VC 4. Checked: X-Y port of each head (east, south), the VC
// allocation request, the stored output VC after a grant, flit order and
// arrival batch, one credit per pop one cycle later with the right VC,
// release of the VC state on the tail, and no state change while the enable
// is low.
module tb_input_unit;
  import noc_pkg::*;
  localparam int NVC = N_VCS;
  logic clk = 0, rst_n = 0, en = 1;
  logic [BATCH_W-1:0] batch = 2'd2;
  logic in_valid = 0;
  flit_t in_flit = '0;
  logic cv;
  logic [VC_W-1:0] cvc;
  logic [NVC-1:0] pop = '0, va_gnt = '0;
  logic [VC_W-1:0] va_vc [NVC];
  flit_t ff [NVC];
  logic [BATCH_W-1:0] fb [NVC];
  logic [NVC-1:0] ne, nva, act;
  logic [PORT_W-1:0] rp [NVC];
  logic [VC_W-1:0] ovc [NVC];
  int checks = 0, failures = 0;

  input_unit dut (.clk, .rst_n, .en, .cur_x(4'd2), .cur_y(4'd2), .cur_batch(batch),
    .in_valid, .in_flit, .credit_out_valid(cv), .credit_out_vc(cvc),
    .pop, .va_gnt, .va_vc, .front_flit(ff), .front_batch(fb), .nonempty(ne),
    .need_va(nva), .active(act), .req_port(rp), .out_vc(ovc));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic flit_t mk(flit_type_e t, int vc, int dx, int dy, int tag);
    head_t h;
    h = '0; h.dst_x = COORD_W'(dx); h.dst_y = COORD_W'(dy); h.payload = 87'(tag);
    mk.ftype = t; mk.vc = VC_W'(vc); mk.data = h;
  endfunction

  task automatic send(flit_t f);
    in_valid = 1; in_flit = f; @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NVC; k++) va_vc[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(ne == '0 && act == '0, "empty after reset");
    send(mk(FLIT_HEAD, 2, 5, 2, 1));
    batch = 2'd3;
    send(mk(FLIT_BODY, 2, 5, 2, 2));
    send(mk(FLIT_TAIL, 2, 5, 2, 3));
    send(mk(FLIT_HEADTAIL, 4, 2, 0, 4));
    check(ne == 6'b010100, "two VCs hold flits");
    check(nva == 6'b010100, "both heads ask for VC allocation");
    check(rp[2] == PORT_W'(P_EAST) && rp[4] == PORT_W'(P_SOUTH), "X-Y ports");
    check(fb[2] == 2'd2, "head batch recorded at arrival");
    // grant while disabled: ignored
    en = 0; va_gnt[2] = 1; va_vc[2] = 3'd3; @(negedge clk);
    check(!act[2], "no allocation while disabled");
    en = 1; @(negedge clk); va_gnt = '0;
    check(act[2] && ovc[2] == 3'd3 && !nva[2], "output VC held after grant");
    for (int i = 1; i <= 3; i++) begin
      head_t h;
      h = head_t'(ff[2].data);
      check(int'(h.payload) == i, $sformatf("flit %0d in order", i));
      if (i == 2) check(fb[2] == 2'd3, "body batch");
      check(rp[2] == PORT_W'(P_EAST) && ovc[2] == 3'd3, "route held for the packet");
      pop[2] = 1; @(negedge clk); pop = '0;
      check(cv && cvc == 3'd2, "credit for VC 2");
    end
    check(!act[2] && !ne[2], "VC released after tail");
    @(negedge clk);
    check(!cv, "single credit pulse");
    // single-flit packet, speculative: granted and popped in the same cycle
    va_gnt[4] = 1; va_vc[4] = 3'd0; pop[4] = 1; @(negedge clk); va_gnt = '0; pop = '0;
    check(!act[4] && !ne[4] && cv && cvc == 3'd4, "single-flit packet leaves at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
