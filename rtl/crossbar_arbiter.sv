// crossbar_arbiter: first-come first-served (FIFO) arbitration of each router
// output among the input ports, with wormhole locking.
//
// For every output the arbiter remembers, for each pair of waiting inputs,
// which one started requesting first (an age matrix). A request that is new
// this cycle is younger than every request already waiting. Requests that
// appear in the same cycle are ordered by the sending port: east, west,
// north, south, then local, so packets already in the network go before newly
// injected ones (the load-shedding priority). The oldest requester wins.
//
// An output held by a packet in flight (hold[i] with hold_port[i] == o) is
// granted only to that input, and only in cycles where it has a flit, until
// its tail passes. A request leaves the queue when its flit is accepted, so a
// following packet from the same input queues behind the others.
//
// gnt[o] is combinational from req, hold and the registered age state.
// contention[o] flags an output wanted by more than one input in a cycle.
// Reset empties the queues. First-come first-served arbitration follows the
// routing scheme; the age matrix and the tie order are this design's choices.
module crossbar_arbiter
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] req        [NPORTS],  // req[i][o]: input i wants output o
  input  logic [NPORTS-1:0] hold,                 // input i owns an output mid-packet
  input  port_e             hold_port  [NPORTS],
  input  logic [NPORTS-1:0] accepted,             // input i's flit left this cycle
  output logic [NPORTS-1:0] gnt        [NPORTS],  // gnt[o][i]: output o granted to input i
  output logic [NPORTS-1:0] contention
);

  typedef logic [NPORTS-1:0][NPORTS-1:0] matrix_t;

  logic [NPORTS-1:0] waiting_q [NPORTS];   // waiting_q[o][i]
  matrix_t           older_q   [NPORTS];   // older_q[o][i][j]: i queued before j
  matrix_t           order     [NPORTS];
  logic [NPORTS-1:0] want      [NPORTS];   // want[o][i] = req[i][o]

  logic locked, first;

  always_comb begin
    locked = 1'b0;
    first  = 1'b0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) want[o][i] = req[i][o];

      for (int i = 0; i < NPORTS; i++)
        for (int j = 0; j < NPORTS; j++) begin
          if (waiting_q[o][i] && waiting_q[o][j]) order[o][i][j] = older_q[o][i][j];
          else if (waiting_q[o][i])               order[o][i][j] = 1'b1;
          else if (waiting_q[o][j])               order[o][i][j] = 1'b0;
          else                                    order[o][i][j] = (i < j);
        end

      gnt[o] = '0;
      locked = 1'b0;
      for (int i = 0; i < NPORTS; i++)
        if (hold[i] && hold_port[i] == port_e'(o)) begin
          locked    = 1'b1;
          gnt[o][i] = want[o][i];
        end
      if (!locked)
        for (int i = 0; i < NPORTS; i++) begin
          first = want[o][i];
          for (int j = 0; j < NPORTS; j++)
            if (j != i && want[o][j] && !order[o][i][j]) first = 1'b0;
          gnt[o][i] = first;
        end

      contention[o] = ($countones(want[o]) > 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) begin
        waiting_q[o] <= '0;
        older_q[o]   <= '0;
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        waiting_q[o] <= want[o] & ~accepted;
        older_q[o]   <= order[o];
      end
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt[o]));
  end

endmodule
