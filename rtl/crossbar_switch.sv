// crossbar_switch: the 5x5 switch of the router.
//
// Combinational. gnt[o] is a one-hot (or zero) vector of the inputs granted
// output o by the crossbar arbiter; the switch forwards that input's flit to
// output o and raises out_valid[o]. An output with no grant drives valid low
// and a zero flit.
module crossbar_switch
  import noc_pkg::*;
(
  input  flit_t             in_flit  [NPORTS],
  input  logic [NPORTS-1:0] gnt      [NPORTS],
  output flit_t             out_flit [NPORTS],
  output logic [NPORTS-1:0] out_valid
);

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_flit[o]  = '0;
      out_valid[o] = |gnt[o];
      for (int i = 0; i < NPORTS; i++)
        if (gnt[o][i]) out_flit[o] = out_flit[o] | in_flit[i];
    end
  end

endmodule
