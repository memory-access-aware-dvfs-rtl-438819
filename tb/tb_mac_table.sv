// tb_mac_table: directed sequence over the MAC table.
// A flagged head fills its VC's entry; an unflagged head of the same source
// copies those values; an unflagged head of an unknown source leaves its entry
// invalid; a new flagged head of a source updates every entry of that source;
// entries survive one epoch tick without refresh and are dropped at the next.
module tb_mac_table;
  import noc_pkg::*;
  localparam int NP = N_PORTS, NVC = N_VCS;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [NP-1:0] wr_en = '0, wr_flag = '0;
  logic [VC_W-1:0] wr_vc [NP];
  logic [NODE_W-1:0] wr_src [NP];
  mac_params_t wr_params [NP];
  logic [NVC-1:0] ev [NP];
  mac_params_t ep [NP][NVC];
  int checks = 0, failures = 0;
  mac_params_t A = '{rho: 8'd40, gl1m: 8'd10, gload: 8'd200};
  mac_params_t B = '{rho: 8'd90, gl1m: 8'd60, gload: 8'd20};

  mac_table dut (.clk, .rst_n, .epoch_tick(tick), .wr_en, .wr_vc, .wr_src, .wr_flag,
                 .wr_params, .ent_valid(ev), .ent_params(ep));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic write(input int p, input int v, input int src, input bit flag, input mac_params_t par);
    wr_en[p] = 1; wr_vc[p] = VC_W'(v); wr_src[p] = NODE_W'(src); wr_flag[p] = flag; wr_params[p] = par;
  endtask

  task automatic step();
    @(negedge clk);
    wr_en = '0; wr_flag = '0; tick = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin wr_vc[p] = '0; wr_src[p] = '0; wr_params[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) check(ev[p] == '0, "empty after reset");
    write(0, 1, 5, 1, A); step();
    check(ev[0][1] && ep[0][1] == A, "flagged head stored");
    write(2, 3, 5, 0, '0); step();
    check(ev[2][3] && ep[2][3] == A, "unflagged head shares values of same source");
    write(1, 0, 9, 0, B); step();
    check(!ev[1][0], "unflagged head of unknown source stays invalid");
    write(3, 2, 5, 1, B); write(4, 5, 7, 1, A); step();
    check(ep[0][1] == B && ep[2][3] == B && ep[3][2] == B, "new values spread to every entry of the source");
    check(ev[4][5] && ep[4][5] == A, "second source in the same cycle");
    check(ev[0][1] && ev[2][3] && ev[3][2], "still valid");
    tick = 1; step();
    check(ev[0][1] && ev[4][5], "fresh entries survive the first epoch tick");
    write(4, 5, 7, 1, B); step();
    tick = 1; step();
    check(!ev[0][1] && !ev[2][3] && !ev[3][2], "stale entries dropped at the second tick");
    check(ev[4][5] && ep[4][5] == B, "refreshed entry kept");
    tick = 1; step();
    check(!ev[4][5], "refreshed entry dropped one epoch later");
    // an unflagged head in the same cycle as a flagged head of its source
    write(0, 0, 12, 1, A); write(1, 4, 12, 0, '0); step();
    check(ev[1][4] && ep[1][4] == A, "same-cycle sharing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
