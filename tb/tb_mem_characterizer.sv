// tb_mem_characterizer: 32-cycle epochs (128-cycle window) with random core
// events whose rates change from epoch to epoch. A reference in the bench
// keeps the per-epoch totals; at every update the three parameters must equal
// the values computed from the last four epochs: rho = occupancy sum / 128 in
// Q6.2, gamma_L1m = misses*256/instructions and gamma_load =
// loads*256/(loads+stores), each saturated to 255 and 0 for an empty window.
// The update must come once per epoch, before the next epoch ends, and
// params_valid must rise with the first full window.
module tb_mem_characterizer;
  import noc_pkg::*;
  localparam int EL = 5, EP = 1 << EL;
  logic clk = 0, rst_n = 0;
  logic [5:0] occ = '0;
  logic miss = 0, ld = 0, st = 0;
  logic [2:0] inst = '0;
  mac_params_t par;
  logic pvalid, upd;
  int checks = 0, failures = 0;
  int e_occ [$], e_miss [$], e_inst [$], e_ld [$], e_st [$];
  int a_occ = 0, a_miss = 0, a_inst = 0, a_ld = 0, a_st = 0, tcyc = 0, n_upd = 0;
  int since_end = 0;

  mem_characterizer #(.ELOG2(EL)) dut (.clk, .rst_n, .mshr_occ(occ), .l1_miss(miss),
    .inst_retired(inst), .ld_net(ld), .st_net(st), .params(par), .params_valid(pvalid), .update(upd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic int sat(int v);
    return v > 255 ? 255 : v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    a_occ += occ; a_miss += miss; a_inst += inst; a_ld += ld; a_st += st;
    tcyc++;
    since_end++;
    if (tcyc % EP == 0) begin
      e_occ.push_back(a_occ); e_miss.push_back(a_miss); e_inst.push_back(a_inst);
      e_ld.push_back(a_ld); e_st.push_back(a_st);
      a_occ = 0; a_miss = 0; a_inst = 0; a_ld = 0; a_st = 0;
      since_end = 0;
    end
    if (upd) begin
      int n, wo, wm, wi, wl, ws, exp_rho, exp_m, exp_l;
      n = e_occ.size();
      wo = 0; wm = 0; wi = 0; wl = 0; ws = 0;
      for (int i = (n > 4 ? n - 4 : 0); i < n; i++) begin
        wo += e_occ[i]; wm += e_miss[i]; wi += e_inst[i]; wl += e_ld[i]; ws += e_st[i];
      end
      exp_rho = sat(wo >> (EL + 2 - RHO_FRAC));
      exp_m   = (wi == 0) ? 0 : sat(wm * 256 / wi);
      exp_l   = (wl + ws == 0) ? 0 : sat(wl * 256 / (wl + ws));
      n_upd++;
      check(int'(par.rho) == exp_rho, $sformatf("epoch %0d rho %0d exp %0d", n, par.rho, exp_rho));
      check(int'(par.gl1m) == exp_m, $sformatf("epoch %0d gL1m %0d exp %0d", n, par.gl1m, exp_m));
      check(int'(par.gload) == exp_l, $sformatf("epoch %0d gload %0d exp %0d", n, par.gload, exp_l));
      check(pvalid == (n >= 4), $sformatf("params_valid %0d after %0d epochs", pvalid, n));
      check(since_end < EP, "update within the next epoch");
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 16; e++) begin
      int pm, pl, pi, po;
      // per-epoch rates: idle, light, heavy, miss-dominated
      case (e % 4)
        0: begin pm = 0;  pl = 0;  pi = 0; po = 0;  end
        1: begin pm = 10; pl = 30; pi = 4; po = 8;  end
        2: begin pm = 50; pl = 80; pi = 7; po = 32; end
        default: begin pm = 90; pl = 50; pi = 1; po = 20; end
      endcase
      if (e < 4) begin pm = 0; pl = 0; pi = 0; po = 0; end   // an all-idle first window
      for (int c = 0; c < EP; c++) begin
        occ  = 6'($urandom_range(po));
        miss = ($urandom_range(99) < pm);
        inst = 3'($urandom_range(pi));
        ld   = ($urandom_range(99) < pl);
        st   = !ld && ($urandom_range(99) < pl);
        @(negedge clk);
      end
    end
    occ = '0; miss = 0; inst = '0; ld = 0; st = 0;
    repeat (2 * EP) @(negedge clk);
    check(n_upd == 17, $sformatf("%0d updates for 17 epochs", n_upd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
