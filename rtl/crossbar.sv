// crossbar: the router's N_PORTS x N_PORTS switch.
//
// Output port o carries the flit of input port sel[o] when valid[o] is high;
// an idle output carries an all-zero flit. The switch allocator guarantees
// that each input feeds at most one output. Purely combinational: it is the
// switch traversal of the second pipeline stage.
module crossbar
  import noc_pkg::*;
#(
  parameter int NP = N_PORTS
) (
  input  flit_t             in_flit [NP],
  input  logic [NP-1:0]     sel_valid,
  input  logic [PORT_W-1:0] sel     [NP],
  output flit_t             out_flit[NP],
  output logic [NP-1:0]     out_valid
);
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_valid[o] = sel_valid[o];
      out_flit[o]  = sel_valid[o] ? in_flit[sel[o]] : '0;
    end
  end
endmodule
