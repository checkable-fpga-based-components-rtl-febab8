// Modulo-two adders between the circuit inputs and the original circuit.
//
// Each of the Z information inputs x[k] is added modulo two to bit r[k] of
// the version register; the sum y[k] feeds the original circuit.  With r = 0
// the circuit sees its inputs unchanged; a one in r inverts that input, so
// every LUT unit behind the adders can take a program-code version for it.
// Purely combinational; in an FPGA each adder occupies one LUT unit.  The
// adders follow the method; writing them as plain XOR gates, outside the
// configurable LUT array, is this design's choice.
module mod2_adder_stage #(
  parameter int unsigned Z = 16
) (
  input  logic [Z-1:0] x,
  input  logic [Z-1:0] r,
  output logic [Z-1:0] y
);

  assign y = x ^ r;

endmodule
