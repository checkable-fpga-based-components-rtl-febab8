// Z-bit version register.
//
// Serial-in, parallel-out shift register whose code selects which circuit
// inputs are inverted by the modulo-two adders.  When sync is high on a
// rising clock edge the register shifts towards its most significant bit and
// takes din into bit 0; a code sent most significant bit first is therefore
// in place after Z shifts.  An active-low asynchronous reset clears it to
// zero, the code under which the circuit computes as the original project.
//
// The serial information and sync inputs follow the method; the sync input
// used as a clock enable, the shift direction and the reset are this design's
// choices.
module version_shift_register #(
  parameter int unsigned Z = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sync,
  input  logic         din,
  output logic [Z-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (sync) q <= {q[Z-2:0], din};
  end

endmodule
