// address_decoder: compares the destination carried by a head flit with the
// coordinates of this router and reports which productive directions remain.
//
// Purely combinational. x_pending/y_pending say whether the destination
// column/row still differs from this router's; x_port/y_port name the output
// that moves the packet one hop closer in that dimension (east for a larger
// x, north for a larger y). Both pending flags low means the packet has
// arrived and leaves through the local port. The result is only meaningful
// while the flit at the head of the buffer is a head flit.
module address_decoder
  import noc_pkg::*;
(
  input  coord_t      cur_x,
  input  coord_t      cur_y,
  input  flit_t       flit,
  output route_info_t info
);

  head_flit_t h;
  assign h = head_flit_t'(flit);

  always_comb begin
    info.x_pending = (h.dst_x != cur_x);
    info.x_port    = (h.dst_x > cur_x) ? P_EAST : P_WEST;
    info.y_pending = (h.dst_y != cur_y);
    info.y_port    = (h.dst_y > cur_y) ? P_NORTH : P_SOUTH;
  end

endmodule
