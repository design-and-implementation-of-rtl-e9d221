// pasta_half_adder: the one-bit half adder at the heart of each adder bit.
//
// s = x XOR y, c = x AND y. In the recursive formulation the XOR output is
// the new partial sum of this bit and the AND output is the new carry into
// the next bit up. Purely combinational, no timing of its own. The gate
// choice (an XOR and an AND) follows the adder's description; the
// transistor-level XOR style has no counterpart at this level.
module pasta_half_adder (
  input  logic x,  // first operand bit
  input  logic y,  // second operand bit
  output logic s,  // sum bit
  output logic c   // carry to the next bit
);

  always_comb begin
    s = x ^ y;
    c = x & y;
  end

endmodule
