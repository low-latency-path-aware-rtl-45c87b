// congestion_flag_register: one congestion flag per output port of a router.
//
// A flag is set when the output port controller of that port reports a
// timeout (a flit offered on the link has not been acknowledged within the
// timeout) and is cleared by the next acknowledged flit on the same port.
// A timeout and an acknowledgement in the same cycle leave the flag set. The
// flags feed the mode controller, which then steers new head flits to the
// alternative productive output. Reset clears all flags.
//
// Setting by timeout follows the routing scheme; clearing on the next
// acknowledgement is this design's choice.
module congestion_flag_register
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] timeout,
  input  logic [NPORTS-1:0] accepted,
  output logic [NPORTS-1:0] cong
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cong <= '0;
    else        cong <= timeout | (cong & ~accepted);
  end

endmodule
