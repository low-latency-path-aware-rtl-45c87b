// tb_crossbar_switch: random flits and random one-hot grant vectors; every
// granted output must carry its input's flit, every other output be idle.
module tb_crossbar_switch;
  import noc_pkg::*;

  flit_t             in_flit  [NPORTS];
  logic [NPORTS-1:0] gnt      [NPORTS];
  flit_t             out_flit [NPORTS];
  logic [NPORTS-1:0] out_valid;
  int                checks = 0, failures = 0;

  crossbar_switch dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int src [NPORTS];
      for (int i = 0; i < NPORTS; i++) in_flit[i] = flit_t'({$urandom, $urandom});
      for (int o = 0; o < NPORTS; o++) begin
        src[o] = $urandom_range(0, NPORTS);   // NPORTS means no grant
        gnt[o] = (src[o] < NPORTS) ? (NPORTS'(1) << src[o]) : '0;
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (src[o] < NPORTS) begin
          if (!out_valid[o] || out_flit[o] != in_flit[src[o]]) begin
            failures++;
            $display("FAIL output %0d from input %0d", o, src[o]);
          end
        end else if (out_valid[o]) begin
          failures++;
          $display("FAIL output %0d valid without grant", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
