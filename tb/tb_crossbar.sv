// tb_crossbar: random selections through the 5x5 switch; every output must
// carry the selected input's flit, or zero when idle.
module tb_crossbar;
  import noc_pkg::*;
  localparam int NP = N_PORTS;
  flit_t             in_flit [NP];
  logic [NP-1:0]     sel_valid;
  logic [PORT_W-1:0] sel [NP];
  flit_t             out_flit [NP];
  logic [NP-1:0]     out_valid;
  int checks = 0, failures = 0;

  crossbar dut (.in_flit, .sel_valid, .sel, .out_flit, .out_valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int p = 0; p < NP; p++) begin
        in_flit[p] = {$urandom, $urandom, $urandom, $urandom, $urandom};
        sel[p]     = PORT_W'($urandom_range(NP - 1));
      end
      sel_valid = NP'($urandom);
      #1;
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (out_valid[o] != sel_valid[o] ||
            out_flit[o] != (sel_valid[o] ? in_flit[sel[o]] : flit_t'('0))) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d o=%0d", t, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
