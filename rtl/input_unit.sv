// input_unit: one router input port with its virtual channels.
//
// Incoming flits are steered by their VC field into one of N_VCS buffers (the
// DEMUX of the router figure); each flit is stored with the id of the packet
// batch current at its arrival, which the switch allocator uses against
// starvation. Per VC the unit keeps whether an output VC has been allocated to
// the packet at the front, and which output port and output VC it uses. While
// no output VC is held, the output port comes from X-Y route computation on
// the head flit at the front of the buffer, and the VC asks for VC allocation.
//
// Timing: buffers are written on every base clock edge (the link may run
// faster than the router); allocation state and reads advance only when the
// router clock enable `en` is high, and the caller asserts pop only then. A
// credit for the freed slot is returned one cycle after each pop.
module input_unit
  import noc_pkg::*;
#(
  parameter int NVC   = N_VCS,
  parameter int DEPTH = VC_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [BATCH_W-1:0] cur_batch,
  // link side
  input  logic               in_valid,
  input  flit_t              in_flit,
  output logic               credit_out_valid,
  output logic [VC_W-1:0]    credit_out_vc,
  // allocation side
  input  logic [NVC-1:0]     pop,
  input  logic [NVC-1:0]     va_gnt,
  input  logic [VC_W-1:0]    va_vc       [NVC],
  output flit_t              front_flit  [NVC],
  output logic [BATCH_W-1:0] front_batch [NVC],
  output logic [NVC-1:0]     nonempty,
  output logic [NVC-1:0]     need_va,
  output logic [NVC-1:0]     active,
  output logic [PORT_W-1:0]  req_port    [NVC],
  output logic [VC_W-1:0]    out_vc      [NVC]
);
  localparam int ENTRY_W = $bits(flit_t) + BATCH_W;

  logic [PORT_W-1:0] port_q [NVC];
  logic [VC_W-1:0]   ovc_q  [NVC];
  logic [PORT_W-1:0] rc_port [NVC];

  for (genvar k = 0; k < NVC; k++) begin : g_vc
    logic [ENTRY_W-1:0] rd;
    logic empty, full;
    head_t hd;

    vc_fifo #(.WIDTH(ENTRY_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push   (in_valid && in_flit.vc == VC_W'(k)),
      .wr_data({in_flit, cur_batch}),
      .pop    (pop[k]),
      .rd_data(rd),
      .empty, .full
    );

    assign front_flit[k]  = flit_t'(rd[ENTRY_W-1:BATCH_W]);
    assign front_batch[k] = rd[BATCH_W-1:0];
    assign nonempty[k]    = !empty;
    assign hd             = head_t'(front_flit[k].data);

    route_compute u_rc (
      .cur_x, .cur_y, .dst_x(hd.dst_x), .dst_y(hd.dst_y), .out_port(rc_port[k])
    );

    assign need_va[k]  = !active[k] && !empty && is_head(front_flit[k].ftype);
    assign req_port[k] = active[k] ? port_q[k] : rc_port[k];
    assign out_vc[k]   = active[k] ? ovc_q[k] : va_vc[k];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active[k] <= 1'b0;
        port_q[k] <= '0;
        ovc_q[k]  <= '0;
      end else if (en) begin
        if (pop[k] && is_tail(front_flit[k].ftype)) begin
          active[k] <= 1'b0;
        end else if (va_gnt[k] && need_va[k]) begin
          active[k] <= 1'b1;
          port_q[k] <= rc_port[k];
          ovc_q[k]  <= va_vc[k];
        end
      end
    end
  end

  // One flit leaves an input port per cycle at most, so one credit suffices.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit_out_valid <= 1'b0;
      credit_out_vc    <= '0;
    end else begin
      credit_out_valid <= |pop;
      credit_out_vc    <= '0;
      for (int k = 0; k < NVC; k++) if (pop[k]) credit_out_vc <= VC_W'(k);
    end
  end

  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pop));
  a_pop_en:  assert property (@(posedge clk) disable iff (!rst_n) (|pop) |-> en);
endmodule
