// micar_pkg: types and constants shared by the MIC@R router and mesh.
//
// Port numbering follows the order in which the router's five ports are
// listed (North, East, Local, South, West). A flit is 32 bits. A header
// flit carries the destination router address on 8 bits (X in the upper
// nibble, Y in the lower) and the number of payload flits on 8 bits; the
// placement of those two fields in the flit and the use of the upper 16
// bits as a free tag field are this design's choice.
//
// The credit signal returned by a receiver has the 2-bit response code of
// the router's credit table in bits [1:0] and a 3-bit stress value in bits
// [4:2], used by the proximity-aware routing schemes.
package micar_pkg;

  localparam int unsigned NPORTS  = 5;
  localparam int unsigned FLIT_W  = 32;
  localparam int unsigned SV_W    = 3;
  localparam int unsigned COORD_W = 4;

  typedef enum logic [2:0] {
    P_NORTH = 3'd0,
    P_EAST  = 3'd1,
    P_LOCAL = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // Routing schemes selectable in the Input Routing Logic.
  typedef enum logic [1:0] {
    ALG_XY   = 2'd0,  // deterministic X-Y
    ALG_FA   = 2'd1,  // fully adaptive
    ALG_PCA  = 2'd2,  // proximity congestion awareness
    ALG_PHSA = 2'd3   // proximity hot-spot awareness
  } routing_e;

  // Traffic patterns of the packet generators.
  typedef enum logic [1:0] {
    TG_UNIFORM   = 2'd0,
    TG_TRANSPOSE = 2'd1,
    TG_HOTSPOT   = 2'd2
  } tg_pattern_e;

  // Credit response codes (b1 b0).
  typedef enum logic [1:0] {
    CR_READY     = 2'b00,  // ready to receive
    CR_OKAY      = 2'b01,  // flit received this cycle
    CR_CONGESTED = 2'b10,  // congested router (full buffer or output contention)
    CR_ERROR     = 2'b11
  } credit_code_e;

  typedef struct packed {
    logic [SV_W-1:0] sv;
    credit_code_e    code;
  } credit_t;

  typedef struct packed {
    logic [15:0]        tag;   // free field, not used by the routers
    logic [7:0]         len;   // number of payload flits following the header
    logic [COORD_W-1:0] dx;    // destination X
    logic [COORD_W-1:0] dy;    // destination Y
  } header_t;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [NPORTS-1:0] portvec_t;

  function automatic portvec_t port_bit(port_e p);
    return portvec_t'(1) << p;
  endfunction

endpackage
