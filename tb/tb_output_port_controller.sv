// tb_output_port_controller: random offers and acknowledgements. A model
// counts consecutive unacknowledged cycles and expects a timeout pulse on the
// TIMEOUT-th one; it also counts transferred flits. Long stalls are forced
// so that timeouts occur, including repeated ones within a single stall.
module tb_output_port_controller;
  import noc_pkg::*;

  localparam int unsigned TIMEOUT = 4;

  logic        clk = 0, rst_n = 0;
  logic        valid_in, ack_in, valid_out, accepted, timeout;
  flit_t       flit_in, flit_out;
  logic [31:0] sent;
  int          checks = 0, failures = 0;
  int          m_stall = 0, m_sent = 0, n_timeout = 0;

  output_port_controller #(.TIMEOUT(TIMEOUT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int stall_run;
    logic exp_to;
    valid_in = 0; ack_in = 0; flit_in = '0; stall_run = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (stall_run > 0) begin
        valid_in = 1; ack_in = 0; stall_run--;
      end else begin
        valid_in = ($urandom_range(0, 3) != 0);
        ack_in   = ($urandom_range(0, 2) != 0);
        if ($urandom_range(0, 40) == 0) stall_run = $urandom_range(3, 12);
      end
      flit_in = flit_t'({$urandom, $urandom});
      #1;
      exp_to = valid_in && !ack_in && (m_stall == TIMEOUT - 1);
      check("valid passes", valid_out == valid_in);
      check("flit passes", flit_out == flit_in);
      check("accepted", accepted == (valid_in && ack_in));
      check("timeout", timeout == exp_to);
      check("sent", sent == 32'(m_sent));
      if (exp_to) n_timeout++;
      @(posedge clk);
      if (!(valid_in && !ack_in) || exp_to) m_stall = 0;
      else m_stall++;
      if (valid_in && ack_in) m_sent++;
    end
    check("timeouts occurred", n_timeout > 0);
    $display("timeouts=%0d sent=%0d", n_timeout, m_sent);
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
