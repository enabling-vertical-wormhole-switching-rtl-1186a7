// Shared constants and types of the 3D NoC-bus hybrid.
//
// The system is a stack of NZ layers, each a NX x NY 2D mesh of wormhole
// routers. Every (x,y) position forms a pillar whose routers are linked by a
// vertical bus with bus virtual channel allocation (BVA). The sizes below are
// the evaluated configuration: 4x4x4 routers, 4 virtual channels (VCs) per
// physical port, 32-bit flits, 8-flit packets, 8-flit VC buffers in the
// UPDOWN input port (one packet), 4-flit VC buffers in all other input
// ports, 4-flit UPDOWN buffers (output side) and 4-flit bus FIFOs.
//
// The flit sideband (type and VC index) and the head-flit address layout are
// this design's own choice:
//   head flit data[1:0] destination x, [3:2] destination y, [5:4] destination z,
//   the remaining bits are payload.
package noc_pkg;

  localparam int unsigned NX       = 4;
  localparam int unsigned NY       = 4;
  localparam int unsigned NZ       = 4;
  localparam int unsigned NVC      = 4;
  localparam int unsigned FLIT_W   = 32;
  localparam int unsigned PKT_LEN  = 8;

  localparam int unsigned X_W  = (NX > 1) ? $clog2(NX) : 1;
  localparam int unsigned Y_W  = (NY > 1) ? $clog2(NY) : 1;
  localparam int unsigned Z_W  = (NZ > 1) ? $clog2(NZ) : 1;
  localparam int unsigned VC_W = (NVC > 1) ? $clog2(NVC) : 1;

  // Buffer depths in flits.
  localparam int unsigned VC_DEPTH       = 4;        // planar input VCs
  localparam int unsigned UD_IN_DEPTH    = PKT_LEN;  // UPDOWN input VCs
  localparam int unsigned UD_BUF_DEPTH   = 4;        // UPDOWN buffer VCs
  localparam int unsigned BUS_FIFO_DEPTH = 4;        // pip_BVA bus stage FIFOs

  // Router ports.
  localparam int unsigned NPORT = 6;
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_XP    = 3'd1,   // east,  x+1
    P_XM    = 3'd2,   // west,  x-1
    P_YP    = 3'd3,   // north, y+1
    P_YM    = 3'd4,   // south, y-1
    P_UD    = 3'd5    // UPDOWN, to the vertical bus
  } port_e;

  typedef enum logic [1:0] {
    F_BODY     = 2'b00,
    F_HEAD     = 2'b01,
    F_TAIL     = 2'b10,
    F_HEADTAIL = 2'b11   // single-flit packet
  } ftype_e;

  typedef struct packed {
    ftype_e              ftype;
    logic [VC_W-1:0]     vc;
    logic [FLIT_W-1:0]   data;
  } flit_t;

  // A flit on the vertical bus carries its target layer next to it; its vc
  // field holds the VCID reserved by BVA in the target UPDOWN input port.
  typedef struct packed {
    logic [Z_W-1:0] layer;
    flit_t          flit;
  } bus_flit_t;

  function automatic logic is_head(flit_t f);
    return f.ftype[0];
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.ftype[1];
  endfunction

  function automatic logic [X_W-1:0] dest_x(flit_t f);
    return f.data[X_W-1:0];
  endfunction

  function automatic logic [Y_W-1:0] dest_y(flit_t f);
    return f.data[2+Y_W-1:2];
  endfunction

  function automatic logic [Z_W-1:0] dest_z(flit_t f);
    return f.data[4+Z_W-1:4];
  endfunction

endpackage
