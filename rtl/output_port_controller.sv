// output_port_controller: drives one outgoing link of the router and watches
// for the piggybacked acknowledgement.
//
// The flit selected by the crossbar goes onto the link with VALID raised in
// the same cycle. The neighbour answers with the WAIT flag carried on its own
// link back to this router; a flit is transferred in a cycle where VALID and
// WAIT are both high (accepted). A stall counter counts consecutive cycles in
// which a flit is offered but not acknowledged; when it reaches TIMEOUT the
// controller raises timeout for one cycle (and again every TIMEOUT cycles
// while the stall lasts), which marks the port congested so that waiting head
// flits take their alternative path in the next cycle. sent counts the flits
// transferred through the port since reset, for throughput measurement.
//
// The timeout mechanism follows the routing scheme; the TIMEOUT value of 4
// cycles and the counters' widths are this design's choices.
module output_port_controller
  import noc_pkg::*;
#(
  parameter int unsigned TIMEOUT = 4,
  parameter int unsigned CNT_W   = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_in,
  input  flit_t            flit_in,
  input  logic             ack_in,      // WAIT flag from the neighbour
  output logic             valid_out,   // VALID flag to the neighbour
  output flit_t            flit_out,
  output logic             accepted,
  output logic             timeout,
  output logic [CNT_W-1:0] sent
);

  localparam int unsigned STALL_W = $clog2(TIMEOUT + 1);

  logic [STALL_W-1:0] stall;
  logic               stalled;

  assign valid_out = valid_in;
  assign flit_out  = flit_in;
  assign accepted  = valid_in && ack_in;
  assign stalled   = valid_in && !ack_in;
  assign timeout   = stalled && (stall == STALL_W'(TIMEOUT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall <= '0;
      sent  <= '0;
    end else begin
      if (!stalled || timeout) stall <= '0;
      else                     stall <= stall + 1'b1;
      if (accepted) sent <= sent + 1'b1;
    end
  end

endmodule
