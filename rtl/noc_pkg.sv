// noc_pkg: types and constants shared by the mesh NoC, its resynchronizers
// and the DVFS control blocks.
//
// The network is a 4x4 2D mesh of wormhole routers with 4 virtual channels
// and a 64-bit link payload (from the experimental setup). A flit carries
// the 64-bit payload plus sideband fields: its type (head, body, tail or a
// single-flit packet), the virtual channel it travels on, and the destination
// coordinates used by XY routing. Putting the destination in sideband bits
// instead of inside the payload is this design's own choice.
//
// Clocking: one fast chip clock (the PLL output, CLK_MASTER_MHZ) is divided
// per voltage/frequency island. Divisors, voltage codes and the frequencies
// of the threshold policy are expressed against that clock.
package noc_pkg;

  // Mesh and router sizes
  localparam int unsigned MESH_X      = 4;
  localparam int unsigned MESH_Y      = 4;
  localparam int unsigned NUM_ROUTERS = MESH_X * MESH_Y;
  localparam int unsigned COORD_W     = 2;
  localparam int unsigned NUM_PORTS   = 5;
  localparam int unsigned NUM_VC      = 4;
  localparam int unsigned VC_W        = 2;
  localparam int unsigned DATA_W      = 64;

  // Router port numbering. North is towards row 0 (R0..R3), east towards
  // higher column numbers.
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FLIT_HEAD     = 2'd0,
    FLIT_BODY     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3
  } flit_type_e;

  typedef struct packed {
    flit_type_e         ftype;
    logic [VC_W-1:0]    vc;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [DATA_W-1:0]  data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  function automatic logic is_head(flit_t f);
    return (f.ftype == FLIT_HEAD) || (f.ftype == FLIT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_t f);
    return (f.ftype == FLIT_TAIL) || (f.ftype == FLIT_HEADTAIL);
  endfunction

  // Clocking and DVFS constants
  localparam int unsigned CLK_MASTER_MHZ = 4000;  // chip PLL clock
  localparam int unsigned DIV_W          = 6;     // clock divisor width
  localparam int unsigned VID_W          = 2;     // voltage code width

  // Voltage codes of the four supply levels
  typedef enum logic [VID_W-1:0] {
    VID_0V7 = 2'd0,
    VID_0V8 = 2'd1,
    VID_0V9 = 2'd2,
    VID_1V0 = 2'd3
  } vid_e;

  // Resynchronizer selection for links between islands
  typedef enum logic [1:0] {
    RESYNC_NONE      = 2'd0,
    RESYNC_HANDSHAKE = 2'd1,
    RESYNC_FIFO      = 2'd2
  } resync_e;

  // Policy selection
  typedef enum logic [1:0] {
    POLICY_FIXED     = 2'd0,
    POLICY_THRESHOLD = 2'd1,
    POLICY_LINEAR    = 2'd2
  } policy_e;

endpackage
