// Butterfly (exchange) element of the permutation network.
//
// Two 2:1 multiplexers with one common select line: with ctrl low the inputs
// pass straight (x = a, y = b), with ctrl high they are exchanged (x = b,
// y = a).  Combinational.
module butterfly (
  input  logic a,
  input  logic b,
  input  logic ctrl,
  output logic x,
  output logic y
);

  assign x = ctrl ? b : a;
  assign y = ctrl ? a : b;

endmodule
