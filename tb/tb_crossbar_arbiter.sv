// tb_crossbar_arbiter: random traffic from five inputs to five outputs,
// including multi-flit packets that lock their output. The reference keeps,
// per output, an explicit first-come first-served queue: a request joins the
// back when it appears (same-cycle arrivals in port order east, west, north,
// south, local), leaves when it is withdrawn or its flit is accepted, and the
// front is granted unless another input holds the output mid-packet.
module tb_crossbar_arbiter;
  import noc_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic [NPORTS-1:0] req [NPORTS];
  logic [NPORTS-1:0] hold, accepted, contention;
  port_e             hold_port [NPORTS];
  logic [NPORTS-1:0] gnt [NPORTS];
  int                checks = 0, failures = 0;
  int                n_contention = 0, n_locked_wait = 0, n_fifo_order = 0;

  crossbar_arbiter dut (.*);

  always #5 clk = ~clk;

  int q [NPORTS][$];          // per output: queue of input indices
  int left [NPORTS];          // flits left in the packet an input holds

  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      req[i] = '0; hold[i] = 0; hold_port[i] = P_LOCAL; left[i] = 0;
    end
    accepted = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      automatic int target [NPORTS];
      automatic int exp_gnt [NPORTS];
      @(negedge clk);
      // stimulus
      for (int i = 0; i < NPORTS; i++) begin
        req[i] = '0;
        if (hold[i]) begin
          target[i] = int'(hold_port[i]);
          if ($urandom_range(0, 3) != 0) req[i][target[i]] = 1;
        end else if ($urandom_range(0, 2) != 0) begin
          // a waiting head usually keeps its output, sometimes re-routes
          target[i] = -1;
          for (int o = 0; o < NPORTS; o++)
            foreach (q[o][k]) if (q[o][k] == i) target[i] = o;
          if (target[i] < 0 || $urandom_range(0, 9) == 0) target[i] = $urandom_range(0, NPORTS - 1);
          req[i][target[i]] = 1;
        end
      end
      // reference: drop withdrawn requests, append new ones in port order
      for (int o = 0; o < NPORTS; o++) begin
        automatic int keep [$];
        foreach (q[o][k]) if (req[q[o][k]][o]) keep.push_back(q[o][k]);
        q[o] = keep;
        for (int i = 0; i < NPORTS; i++) begin
          automatic bit present = 0;
          foreach (q[o][k]) if (q[o][k] == i) present = 1;
          if (req[i][o] && !present) q[o].push_back(i);
        end
        exp_gnt[o] = -1;
        begin
          automatic int owner = -1;
          for (int i = 0; i < NPORTS; i++) if (hold[i] && int'(hold_port[i]) == o) owner = i;
          if (owner >= 0) begin
            if (req[owner][o]) exp_gnt[o] = owner;
            if (q[o].size() > (req[owner][o] ? 1 : 0)) n_locked_wait++;
          end else if (q[o].size() > 0) begin
            exp_gnt[o] = q[o][0];
            if (q[o].size() > 1 && q[o][0] > q[o][1]) n_fifo_order++;
          end
        end
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (gnt[o] != ((exp_gnt[o] >= 0) ? (NPORTS'(1) << exp_gnt[o]) : '0)) begin
          failures++;
          $display("FAIL cycle %0d output %0d gnt=%b expected input %0d", n, o, gnt[o], exp_gnt[o]);
        end
        checks++;
        if (contention[o] != ($countones(req[0][o]) + $countones(req[1][o]) + $countones(req[2][o])
                              + $countones(req[3][o]) + $countones(req[4][o]) > 1)) begin
          failures++;
          $display("FAIL contention output %0d", o);
        end
        if (contention[o]) n_contention++;
      end
      // acceptance of granted flits
      accepted = '0;
      for (int o = 0; o < NPORTS; o++)
        if (exp_gnt[o] >= 0 && $urandom_range(0, 2) != 0) accepted[exp_gnt[o]] = 1;
      @(posedge clk);
      for (int o = 0; o < NPORTS; o++)
        if (exp_gnt[o] >= 0 && accepted[exp_gnt[o]]) begin
          automatic int i = exp_gnt[o];
          automatic int keep [$];
          foreach (q[o][k]) if (q[o][k] != i) keep.push_back(q[o][k]);
          q[o] = keep;
          if (hold[i]) begin
            left[i]--;
            if (left[i] == 0) hold[i] = 0;
          end else if ($urandom_range(0, 1) == 1) begin
            hold[i] = 1; hold_port[i] = port_e'(o); left[i] = $urandom_range(1, 8);
          end
        end
      #1 accepted = '0;
    end
    checks++;
    if (n_contention == 0 || n_locked_wait == 0 || n_fifo_order == 0) failures++;
    $display("contention=%0d locked_wait=%0d older_lower_priority_first=%0d",
             n_contention, n_locked_wait, n_fifo_order);
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
