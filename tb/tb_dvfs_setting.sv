// tb_dvfs_setting: with a short frame (2^6 cycles) the demand is set per
// frame to values in each third of [0, DEMAND_MAX]. Checked: the level
// chosen at each frame start, a retune pulse only when the level changes,
// the start at the lowest level, the frame, epoch and batch timing.
module tb_dvfs_setting;
  import noc_pkg::*;
  localparam int FL = 6, DW = RHO_W + $clog2(N_PORTS + 1), DMAX = 600;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] demand = '0;
  logic [LEVEL_W-1:0] level;
  logic tune, fstart, etick;
  logic [BATCH_W-1:0] batch;
  int checks = 0, failures = 0;
  int ticks = 0, tunes = 0, cyc = 0;

  dvfs_setting #(.FLOG2(FL), .ELOG2(FL - 2), .DEMAND_MAX(DMAX)) dut (
    .clk, .rst_n, .demand, .vf_level(level), .vf_tune(tune),
    .frame_start(fstart), .epoch_tick(etick), .batch_id(batch));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (etick) ticks++;
    if (tune) tunes++;
  end

  initial begin
    int dem [8] = '{50, 199, 200, 399, 400, 599, 100, 100};
    int exp_lvl [8] = '{0, 0, 1, 1, 2, 2, 0, 0};
    int prev, exp_tunes;
    prev = 0; exp_tunes = 0;
    @(negedge clk);
    check(level == 0, "start level is the lowest");
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      // the demand is in place before the frame start
      demand = DW'(dem[f]);
      while (!fstart) @(negedge clk);
      @(negedge clk);
      check(int'(level) == exp_lvl[f], $sformatf("frame %0d level %0d exp %0d", f, level, exp_lvl[f]));
      check(tune == (exp_lvl[f] != prev), $sformatf("frame %0d tune %0d", f, tune));
      if (exp_lvl[f] != prev) exp_tunes++;
      check(int'(batch) == (f + 1) % 4, $sformatf("frame %0d batch %0d", f, batch));
      prev = exp_lvl[f];
      // the level holds in mid-frame even if the demand moves
      demand = DW'(DMAX - 1);
      repeat (20) @(negedge clk);
      check(int'(level) == exp_lvl[f], "level held within frame");
    end
    check(tunes == exp_tunes, $sformatf("tunes %0d exp %0d", tunes, exp_tunes));
    check(ticks == (cyc + 15) / 16, $sformatf("epoch ticks %0d in %0d cycles", ticks, cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
