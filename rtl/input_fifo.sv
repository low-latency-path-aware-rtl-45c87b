// input_fifo: the input buffer of one router port (the "FIFO circuit" that
// holds flits arriving from east, west, north, south and the local PE).
//
// A circular buffer of DEPTH flits with read and write pointers and an
// occupancy count. A write and a read may happen in the same cycle. The oldest
// flit is always visible on rd_data while empty is low (first-word
// fall-through), so the routing logic can look at a head flit without
// popping it. full and empty come straight from registers, which keeps the
// link acknowledgement, derived from full, free of combinational paths back
// into the sender.
//
// The default depth of 2 flits is the buffer depth of the main evaluated
// configuration; 4 is the other depth that was evaluated. Reset empties the
// buffer; the storage itself is not reset.
module input_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  flit_t                      wr_data,
  input  logic                       rd_en,
  output flit_t                      rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t              mem [DEPTH];
  logic [PTR_W-1:0]   wr_ptr, rd_ptr;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  assign rd_data = mem[rd_ptr];
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);

  // A sender must never push into a full buffer, nor a reader pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
