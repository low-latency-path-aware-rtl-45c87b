// mode_controller: the PAR XY-X output selection for every input port.
//
// For each input the decoded routing information of its head flit and the
// congestion flags of the five outputs select one output port:
//   * destination reached                      -> local port;
//   * X still to go, X output not congested    -> X output (normal XY mode);
//   * X still to go, X output congested, Y still
//     to go and Y output not congested          -> Y output (detour mode);
//   * X still to go and no usable detour        -> X output (wait for it);
//   * only Y still to go                         -> Y output.
// This is the per-hop form of the PAR XY-X procedure: move along X; when the
// next X hop is blocked, take one productive step along Y and try X again at
// the next router (hence X, Y, then X again). Only minimal (productive) hops
// are taken. Once X is done the packet continues along Y; the alternative the
// procedure gives in that phase, a step along X, does not exist because the
// X distance is already zero.
//
// Deadlock: with wormhole switching and no virtual channels, letting every
// packet turn from X to Y and back allows cyclic waits, and a 4x4 mesh under
// random traffic does lock up that way. With WEST_FIRST set (the default),
// only packets still heading east may detour; packets heading west follow
// plain XY. The turns then used are exactly those of the west-first turn
// model, which is deadlock-free. WEST_FIRST = 0 gives the unrestricted rule.
// The algorithm itself does not deal with deadlock; this restriction is this
// design's choice.
//
// Combinational. detour[i] marks an input whose head flit was steered off its
// normal XY output, for statistics and tests. What to do when both productive
// outputs are congested is not given by the algorithm; this design then keeps
// the X output.
module mode_controller
  import noc_pkg::*;
#(
  parameter bit WEST_FIRST = 1'b1
) (
  input  route_info_t              info  [NPORTS],
  input  logic [NPORTS-1:0]        cong,
  output port_e                    sel   [NPORTS],
  output logic [NPORTS-1:0]        detour
);

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      detour[i] = 1'b0;
      if (!info[i].x_pending && !info[i].y_pending) begin
        sel[i] = P_LOCAL;
      end else if (!info[i].x_pending) begin
        sel[i] = info[i].y_port;
      end else if (info[i].y_pending && cong[info[i].x_port] && !cong[info[i].y_port] &&
                   (!WEST_FIRST || info[i].x_port == P_EAST)) begin
        sel[i]    = info[i].y_port;
        detour[i] = 1'b1;
      end else begin
        sel[i] = info[i].x_port;
      end
    end
  end

endmodule
