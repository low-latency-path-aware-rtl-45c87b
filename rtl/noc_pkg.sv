// noc_pkg: types and constants shared by the PAR XY-X mesh router.
//
// A flit is 64 bits wide, as in the evaluated network. Its two top bits carry
// the flit type (head, body, tail, or a single-flit packet that is both head
// and tail); a head flit additionally carries the destination and source mesh
// coordinates. Coordinates are 4 bits, enough for the 16x16 mesh.
//
// A link between neighbouring routers is one link_t in each direction. Besides
// the VALID flag and the flit, each direction carries the WAIT flag, which
// acknowledges the flit that travelled the opposite way in the same cycle:
// the acknowledgement is piggybacked on the reverse data channel instead of
// using a wire bundle of its own.
//
// Port numbering, the direction convention (north = increasing y, east =
// increasing x) and the head-flit field layout are choices of this design.
package noc_pkg;

  localparam int unsigned FLIT_W  = 64;
  localparam int unsigned COORD_W = 4;
  localparam int unsigned NPORTS  = 5;

  typedef enum logic [2:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  // bit 1 = head, bit 0 = tail
  typedef enum logic [1:0] {
    FT_BODY     = 2'b00,
    FT_TAIL     = 2'b01,
    FT_HEAD     = 2'b10,
    FT_HEADTAIL = 2'b11
  } flit_type_e;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    flit_type_e                 ftype;
    logic [FLIT_W-3:0]          payload;
  } flit_t;

  localparam int unsigned HEAD_INFO_W = FLIT_W - 2 - 4*COORD_W;

  typedef struct packed {
    flit_type_e                 ftype;
    coord_t                     dst_x;
    coord_t                     dst_y;
    coord_t                     src_x;
    coord_t                     src_y;
    logic [HEAD_INFO_W-1:0]     info;
  } head_flit_t;

  typedef struct packed {
    logic  valid;   // VALID: flit carries data
    logic  ack;     // WAIT: flit sent the other way this cycle was taken
    flit_t flit;
  } link_t;

  // The forward part of a link (VALID and flit). Inside the mesh the WAIT
  // flag of each link direction is wired as a separate bit beside it.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } chan_t;

  // Routing information of one head flit, as decoded by the address decoder.
  typedef struct packed {
    logic  x_pending;   // destination column differs from this router's
    port_e x_port;      // productive X output (east or west)
    logic  y_pending;   // destination row differs from this router's
    port_e y_port;      // productive Y output (north or south)
  } route_info_t;

  function automatic logic is_head(flit_t f);
    return f.ftype[1];
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.ftype[0];
  endfunction

endpackage
