// crossbar: the switch of the router, connecting input buffers to output ports.
//
// Each output port o carries the head flit of input sel[o] while en[o] is high,
// and zero otherwise. It is a bank of NP multiplexers with no state; the
// connection pattern is kept by the switch control.
module crossbar
  import noc_pkg::*;
#(
  parameter int NP = 5
) (
  input  flit_t                 in_flit [NP],
  input  logic [$clog2(NP)-1:0] sel     [NP],
  input  logic [NP-1:0]         en,
  output flit_t                 out_flit[NP]
);

  always_comb begin
    for (int o = 0; o < NP; o++)
      out_flit[o] = en[o] ? in_flit[sel[o]] : '0;
  end

endmodule
