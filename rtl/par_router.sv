// par_router: five-port wormhole router with Path Aware (PAR) XY-X routing.
//
// Structure, per port (east, west, north, south, local):
//   input_fifo        -> buffers arriving flits (BUF_DEPTH flits);
//   address_decoder   -> productive X/Y directions of the head flit;
//   port_controller   -> wormhole state, requests one output;
//   output_port_controller -> drives the outgoing link, times out a missing
//                        acknowledgement;
// shared by all ports:
//   congestion_flag_register -> one flag per output, set on timeout;
//   mode_controller   -> XY or detour output for each head flit;
//   crossbar_arbiter  -> first-come first-served grant, wormhole lock;
//   crossbar_switch   -> moves the granted flits to their outputs.
//
// Links: in_chan[p]/in_ack[p] is what the neighbour on side p sends here
// (VALID, flit, WAIT), out_chan[p]/out_ack[p] what this router sends there.
// out_ack[p] acknowledges the flit arriving on in_chan[p] in the same cycle:
// it is high when that flit is valid and input buffer p has room, and it
// travels with this router's own outgoing flit on the link back (piggybacked).
// out_chan depends only on registers, never combinationally on in_chan or
// in_ack, so chains of routers form no combinational loop. A flit moves one hop per cycle: written into the
// input buffer at a clock edge, it can leave through the crossbar in the next
// cycle, so an uncontended hop costs one cycle.
//
// Status outputs: detour (a head flit left on its alternative Y output this
// cycle), timeout, contention (an output wanted by several inputs) and sent
// (flits sent per output since reset).
//
// The block structure follows the router diagram of the routing scheme; the
// link timing, the direction encoding and the status outputs are this
// design's choices.
module par_router
  import noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 2,
  parameter int unsigned TIMEOUT   = 4,
  parameter int unsigned CNT_W     = 32,
  parameter bit          WEST_FIRST = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  coord_t            cur_x,
  input  coord_t            cur_y,
  input  chan_t             in_chan  [NPORTS],  // VALID + flit from neighbour p
  input  logic [NPORTS-1:0] in_ack,             // WAIT from neighbour p
  output chan_t             out_chan [NPORTS],  // VALID + flit to neighbour p
  output logic [NPORTS-1:0] out_ack,            // WAIT to neighbour p
  output logic [NPORTS-1:0] detour,
  output logic [NPORTS-1:0] timeout,
  output logic [NPORTS-1:0] contention,
  output logic [CNT_W-1:0]  sent     [NPORTS]
);

  flit_t             buf_flit  [NPORTS];
  logic [NPORTS-1:0] buf_full, buf_empty, pop, hold, accepted_in;
  route_info_t       info      [NPORTS];
  port_e             route_sel [NPORTS];
  port_e             hold_port [NPORTS];
  logic [NPORTS-1:0] req       [NPORTS];
  logic [NPORTS-1:0] gnt       [NPORTS];
  logic [NPORTS-1:0] cong;
  flit_t             xb_flit   [NPORTS];
  logic [NPORTS-1:0] xb_valid, accepted_out, out_valid;
  flit_t             out_flit  [NPORTS];
  logic [NPORTS-1:0] wr_ack;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    assign wr_ack[p] = in_chan[p].valid && !buf_full[p];

    input_fifo #(.DEPTH(BUF_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en   (wr_ack[p]),
      .wr_data (in_chan[p].flit),
      .rd_en   (pop[p]),
      .rd_data (buf_flit[p]),
      .full    (buf_full[p]),
      .empty   (buf_empty[p]),
      .count   ()
    );

    address_decoder u_dec (
      .cur_x, .cur_y,
      .flit (buf_flit[p]),
      .info (info[p])
    );

    port_controller u_pc (
      .clk, .rst_n,
      .fifo_empty (buf_empty[p]),
      .fifo_flit  (buf_flit[p]),
      .route_sel  (route_sel[p]),
      .accepted   (accepted_in[p]),
      .req        (req[p]),
      .hold       (hold[p]),
      .hold_port  (hold_port[p]),
      .pop        (pop[p])
    );

    output_port_controller #(.TIMEOUT(TIMEOUT), .CNT_W(CNT_W)) u_opc (
      .clk, .rst_n,
      .valid_in  (xb_valid[p]),
      .flit_in   (xb_flit[p]),
      .ack_in    (in_ack[p]),
      .valid_out (out_valid[p]),
      .flit_out  (out_flit[p]),
      .accepted  (accepted_out[p]),
      .timeout   (timeout[p]),
      .sent      (sent[p])
    );

    assign out_chan[p].valid = out_valid[p];
    assign out_chan[p].flit  = out_flit[p];
    assign out_ack[p]        = wr_ack[p];
  end

  // An input's flit is accepted when the output it is granted takes it.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      accepted_in[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (gnt[o][i] && accepted_out[o]) accepted_in[i] = 1'b1;
    end
  end

  logic [NPORTS-1:0] mode_detour;

  mode_controller #(.WEST_FIRST(WEST_FIRST)) u_mode (
    .info   (info),
    .cong   (cong),
    .sel    (route_sel),
    .detour (mode_detour)
  );

  // A detour is counted when a head flit actually leaves on its Y output.
  assign detour = mode_detour & accepted_in & ~hold;

  congestion_flag_register u_cfr (
    .clk, .rst_n,
    .timeout  (timeout),
    .accepted (accepted_out),
    .cong     (cong)
  );

  crossbar_arbiter u_arb (
    .clk, .rst_n,
    .req        (req),
    .hold       (hold),
    .hold_port  (hold_port),
    .accepted   (accepted_in),
    .gnt        (gnt),
    .contention (contention)
  );

  crossbar_switch u_xbar (
    .in_flit   (buf_flit),
    .gnt       (gnt),
    .out_flit  (xb_flit),
    .out_valid (xb_valid)
  );

endmodule
