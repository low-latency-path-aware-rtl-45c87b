// noc_mesh: MESH_X x MESH_Y mesh of PAR XY-X routers (16x16 by default, the
// evaluated network size).
//
// Router (x, y) has index y*MESH_X + x. Its east port connects to the west
// port of router (x+1, y), its north port to the south port of router
// (x, y+1). Every link is a pair of link_t, one per direction, and each
// carries the acknowledgement of the flit travelling the other way. Ports on
// the mesh boundary see an idle link; minimal routing never sends a flit
// there. The local port of every router is brought out: local_in[n] is what
// the processing element of node n injects (its ack field acknowledges
// local_out[n]), local_out[n] is what node n ejects to it (its ack field
// acknowledges local_in[n]).
//
// Per node the mesh also reports detour, timeout and contention events (OR of
// the router's five ports) and the number of flits ejected since reset.
// Coordinates are 4 bits, so MESH_X and MESH_Y may be at most 16.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 16,
  parameter int unsigned MESH_Y    = 16,
  parameter int unsigned BUF_DEPTH = 2,
  parameter int unsigned TIMEOUT   = 4,
  parameter int unsigned CNT_W     = 32,
  parameter bit          WEST_FIRST = 1'b1,
  localparam int unsigned NODES    = MESH_X * MESH_Y
) (
  input  logic             clk,
  input  logic             rst_n,
  input  link_t            local_in      [NODES],
  output link_t            local_out     [NODES],
  output logic [NODES-1:0] detour_evt,
  output logic [NODES-1:0] timeout_evt,
  output logic [NODES-1:0] contention_evt,
  output logic [CNT_W-1:0] ejected_flits [NODES]
);

  chan_t             rin_chan  [NODES][NPORTS];
  chan_t             rout_chan [NODES][NPORTS];
  logic [NPORTS-1:0] rin_ack   [NODES];
  logic [NPORTS-1:0] rout_ack  [NODES];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      logic [NPORTS-1:0] det, tmo, con;
      logic [CNT_W-1:0]  sent [NPORTS];

      if (x < MESH_X - 1) begin : g_e
        assign rin_chan[N][P_EAST] = rout_chan[N+1][P_WEST];
        assign rin_ack[N][P_EAST]  = rout_ack[N+1][P_WEST];
      end else begin : g_e_edge
        assign rin_chan[N][P_EAST] = '0;
        assign rin_ack[N][P_EAST]  = 1'b0;
      end
      if (x > 0) begin : g_w
        assign rin_chan[N][P_WEST] = rout_chan[N-1][P_EAST];
        assign rin_ack[N][P_WEST]  = rout_ack[N-1][P_EAST];
      end else begin : g_w_edge
        assign rin_chan[N][P_WEST] = '0;
        assign rin_ack[N][P_WEST]  = 1'b0;
      end
      if (y < MESH_Y - 1) begin : g_n
        assign rin_chan[N][P_NORTH] = rout_chan[N+MESH_X][P_SOUTH];
        assign rin_ack[N][P_NORTH]  = rout_ack[N+MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign rin_chan[N][P_NORTH] = '0;
        assign rin_ack[N][P_NORTH]  = 1'b0;
      end
      if (y > 0) begin : g_s
        assign rin_chan[N][P_SOUTH] = rout_chan[N-MESH_X][P_NORTH];
        assign rin_ack[N][P_SOUTH]  = rout_ack[N-MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign rin_chan[N][P_SOUTH] = '0;
        assign rin_ack[N][P_SOUTH]  = 1'b0;
      end
      assign rin_chan[N][P_LOCAL]  = '{valid: local_in[N].valid, flit: local_in[N].flit};
      assign rin_ack[N][P_LOCAL]   = local_in[N].ack;
      assign local_out[N].valid    = rout_chan[N][P_LOCAL].valid;
      assign local_out[N].flit     = rout_chan[N][P_LOCAL].flit;
      assign local_out[N].ack      = rout_ack[N][P_LOCAL];

      par_router #(
        .BUF_DEPTH(BUF_DEPTH), .TIMEOUT(TIMEOUT), .CNT_W(CNT_W), .WEST_FIRST(WEST_FIRST)
      ) u_router (
        .clk, .rst_n,
        .cur_x      (coord_t'(x)),
        .cur_y      (coord_t'(y)),
        .in_chan    (rin_chan[N]),
        .in_ack     (rin_ack[N]),
        .out_chan   (rout_chan[N]),
        .out_ack    (rout_ack[N]),
        .detour     (det),
        .timeout    (tmo),
        .contention (con),
        .sent       (sent)
      );

      assign detour_evt[N]     = |det;
      assign timeout_evt[N]    = |tmo;
      assign contention_evt[N] = |con;
      assign ejected_flits[N]  = sent[P_LOCAL];
    end
  end

endmodule
