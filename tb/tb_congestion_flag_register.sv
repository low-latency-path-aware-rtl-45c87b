// tb_congestion_flag_register: random timeout and acknowledgement pulses
// against a per-port set/clear model (set wins over clear).
module tb_congestion_flag_register;
  import noc_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic [NPORTS-1:0] timeout, accepted, cong, model;
  int                checks = 0, failures = 0;

  congestion_flag_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    timeout = '0; accepted = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (cong !== model) begin
        failures++;
        $display("FAIL cong=%b model=%b", cong, model);
      end
      for (int p = 0; p < NPORTS; p++) begin
        timeout[p]  = ($urandom_range(0, 9) == 0);
        accepted[p] = ($urandom_range(0, 3) == 0);
      end
      @(posedge clk);
      model = timeout | (model & ~accepted);
    end
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
