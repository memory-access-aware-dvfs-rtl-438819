// noc_pkg: types and constants shared by the memory-access aware DVFS network.
//
// The network is an 8x8 mesh of 5-port routers, 6 virtual channels (VCs) per
// port and 4 flits per VC, on a 128-bit datapath. A cache block travels as one
// 8-flit packet and a coherence control message as one single-flit packet.
// The DVFS timeframe is 2^14 cycles, equal to the characterization window and
// to the packet batch; the window slides by one epoch of a quarter of that.
// These numbers follow the document. The bit layout of the head flit is this
// design's own: only the flag bit followed by (rho, gamma_L1m, gamma_load) is
// given, in that order, the rest (coordinates, field widths, fixed-point
// formats) is chosen here.
//
// Fixed-point formats (own choice):
//   rho        RHO_W bits, Q6.2: average number of occupied MSHR entries.
//   gamma_L1m  GAMMA_W bits, Q0.8: L1 misses per instruction, saturated below 1.
//   gamma_load GAMMA_W bits, Q0.8: loads / (loads + stores), saturated below 1.
package noc_pkg;

  localparam int MESH_X         = 8;
  localparam int MESH_Y         = 8;
  localparam int N_NODES        = MESH_X * MESH_Y;
  localparam int N_PORTS        = 5;
  localparam int N_VCS          = 6;
  localparam int VC_DEPTH       = 4;
  localparam int FLIT_W         = 128;
  localparam int DATA_PKT_FLITS = 8;
  localparam int FRAME_LOG2     = 14;
  localparam int EPOCH_LOG2     = FRAME_LOG2 - 2;
  localparam int N_LEVELS       = 3;
  localparam int MSHR_ENTRIES   = 32;

  localparam int COORD_W  = 4;
  localparam int NODE_W   = 2 * COORD_W;
  localparam int VC_W     = $clog2(N_VCS);
  localparam int PORT_W   = $clog2(N_PORTS);
  localparam int RHO_W    = 8;
  localparam int RHO_FRAC = 2;
  localparam int GAMMA_W  = 8;
  localparam int LEVEL_W  = 2;
  localparam int BATCH_W  = 2;

  // Port numbering of a mesh router.
  localparam int P_LOCAL = 0;
  localparam int P_EAST  = 1;   // +x
  localparam int P_WEST  = 2;   // -x
  localparam int P_NORTH = 3;   // +y
  localparam int P_SOUTH = 4;   // -y

  typedef enum logic [1:0] {
    FLIT_HEAD     = 2'd0,
    FLIT_BODY     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3
  } flit_type_e;

  // Memory-access characteristics of one core.
  typedef struct packed {
    logic [RHO_W-1:0]   rho;
    logic [GAMMA_W-1:0] gl1m;
    logic [GAMMA_W-1:0] gload;
  } mac_params_t;

  localparam int MAC_W = RHO_W + 2 * GAMMA_W;

  // Head-flit payload: header fields, the flag bit, then the parameter set.
  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic               flag;      // 1: params carries valid characteristics
    mac_params_t        params;
    logic [FLIT_W-4*COORD_W-1-MAC_W-1:0] payload;
  } head_t;

  typedef struct packed {
    flit_type_e        ftype;
    logic [VC_W-1:0]   vc;
    logic [FLIT_W-1:0] data;
  } flit_t;

  function automatic logic is_head(flit_type_e t);
    return t == FLIT_HEAD || t == FLIT_HEADTAIL;
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return t == FLIT_TAIL || t == FLIT_HEADTAIL;
  endfunction

endpackage
