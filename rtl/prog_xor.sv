// prog_xor: programmable XOR network that produces one X-canceled bit.
//
// An m-bit selection vector, supplied by the tester, picks a set of MISR signature bits; the
// selected bits are ANDed out and XOR-reduced to one bit. When the vector is a combination
// found (off line) to be linearly dependent in the X's, every X cancels and the bit is
// deterministic. The network is the design's own (AND per bit, XOR tree); it does not depend
// on the circuit under test.
//
// Interface: sig_i MISR signature, sel_i selection vector, x_free_o the XOR of the selected
// bits. Timing: purely combinational.
module prog_xor
  import xc_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic [M-1:0] sig_i,
  input  logic [M-1:0] sel_i,
  output logic         x_free_o
);

  assign x_free_o = ^(sig_i & sel_i);

endmodule
