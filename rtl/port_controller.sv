// port_controller: wormhole state of one input port.
//
// IDLE: when the buffer holds a head flit, the port requests the output the
// mode controller selects for it. The request is re-evaluated every cycle
// until the head flit has actually been taken by the next router, so a head
// flit whose output timed out moves to the alternative path in the following
// cycle. Once the head flit is accepted (and it is not also the tail), the
// port locks that output and goes ACTIVE.
// ACTIVE: every body flit in the buffer requests the locked output; hold and
// hold_port tell the arbiter that the output belongs to this packet even in
// cycles without a flit. Acceptance of the tail flit returns the port to IDLE.
//
// pop is the acceptance of the flit at the head of the buffer (crossbar grant
// and downstream acknowledgement in the same cycle). Reset returns to IDLE.
module port_controller
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fifo_empty,
  input  flit_t             fifo_flit,
  input  port_e             route_sel,
  input  logic              accepted,
  output logic [NPORTS-1:0] req,
  output logic              hold,
  output port_e             hold_port,
  output logic              pop
);

  typedef enum logic {IDLE, ACTIVE} state_e;
  state_e state;
  port_e  locked;
  port_e  target;

  assign target    = (state == ACTIVE) ? locked : route_sel;
  assign hold      = (state == ACTIVE);
  assign hold_port = locked;
  assign pop       = accepted;

  always_comb begin
    req = '0;
    if (!fifo_empty && (state == ACTIVE || is_head(fifo_flit)))
      req[target] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      locked <= P_LOCAL;
    end else if (accepted) begin
      if (state == IDLE && !is_tail(fifo_flit)) begin
        state  <= ACTIVE;
        locked <= route_sel;
      end else if (state == ACTIVE && is_tail(fifo_flit)) begin
        state <= IDLE;
      end
    end
  end

  a_pop_needs_flit: assert property (@(posedge clk) disable iff (!rst_n) accepted |-> !fifo_empty);

endmodule
