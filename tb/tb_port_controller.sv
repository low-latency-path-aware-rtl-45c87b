// tb_port_controller: feeds packets of 1 to 9 flits through one input port's
// wormhole state machine with random buffer gaps, random acceptance and a
// route selection that changes every cycle. A reference model checks that a
// head flit requests the currently selected output, that body and tail flits
// request the output the head left on, and that hold/hold_port are set
// exactly while a packet is in flight.
module tb_port_controller;
  import noc_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              fifo_empty, accepted, hold, pop;
  flit_t             fifo_flit;
  port_e             route_sel, hold_port;
  logic [NPORTS-1:0] req;
  int                checks = 0, failures = 0;
  int                pkts = 0, multi = 0, single = 0, reroutes = 0;

  port_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int    len, idx;
    logic  m_active;
    port_e m_port;
    port_e prev_sel;
    fifo_empty = 1; fifo_flit = '0; accepted = 0; route_sel = P_EAST;
    m_active = 0; m_port = P_LOCAL; len = 0; idx = 0; prev_sel = P_EAST;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (idx == len) begin
        len = $urandom_range(1, 9);
        idx = 0;
      end
      fifo_empty = ($urandom_range(0, 3) == 0);
      fifo_flit.payload = {$urandom, 30'($urandom)};
      if (len == 1)            fifo_flit.ftype = FT_HEADTAIL;
      else if (idx == 0)       fifo_flit.ftype = FT_HEAD;
      else if (idx == len - 1) fifo_flit.ftype = FT_TAIL;
      else                     fifo_flit.ftype = FT_BODY;
      route_sel = port_e'($urandom_range(0, 4));
      #1;
      check("hold", hold == m_active);
      if (m_active) check("hold_port", hold_port == m_port);
      if (fifo_empty) check("no request when empty", req == '0);
      else if (m_active) check("body follows locked output", req == (NPORTS'(1) << m_port));
      else begin
        check("head requests selected output", req == (NPORTS'(1) << route_sel));
        if (route_sel != prev_sel) reroutes++;
      end
      prev_sel = route_sel;
      accepted = !fifo_empty && ($urandom_range(0, 1) == 1);
      #1;
      check("pop", pop == accepted);
      @(posedge clk);
      if (accepted) begin
        if (!m_active && !is_tail(fifo_flit)) begin
          m_active = 1; m_port = route_sel; multi++;
        end else if (m_active && is_tail(fifo_flit)) m_active = 0;
        else if (!m_active) single++;
        if (is_tail(fifo_flit)) pkts++;
        idx++;
      end
      #1 accepted = 0;
    end
    check("multi-flit packets seen", multi > 0);
    check("single-flit packets seen", single > 0);
    check("head re-routed while waiting", reroutes > 0);
    $display("packets=%0d multi=%0d single=%0d", pkts, multi, single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
