// tb_input_fifo: random pushes and pops against a queue reference model.
// Checks the head flit, full, empty and the occupancy count every cycle, and
// that a flit written at one clock edge is readable in the next cycle.
module tb_input_fifo;
  import noc_pkg::*;

  localparam int unsigned DEPTH = 2;

  logic  clk = 0, rst_n = 0;
  logic  wr_en, rd_en, full, empty;
  flit_t wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int    checks = 0, failures = 0;
  flit_t model [$];
  int    fills = 0;

  input_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check("empty", empty == (model.size() == 0));
      check("full", full == (model.size() == DEPTH));
      check("count", count == model.size());
      if (model.size() > 0) check("head data", rd_data == model[0]);
      if (full) fills++;
      wr_en   = !full && ($urandom_range(0, 99) < 55);
      rd_en   = !empty && ($urandom_range(0, 99) < 45);
      wr_data = flit_t'({$urandom, $urandom});
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check("buffer became full at least once", fills > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
