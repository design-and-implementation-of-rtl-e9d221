// pasta_sel_mux: the pair of 2:1 multiplexers in front of each half adder.
//
// While SEL is low (the initial selection phase) the half adder sees the
// operand bits a and b; while SEL is high it sees the fed-back partial sum
// s_fb of this bit and the fed-back carry c_fb arriving from the bit below.
// This is what turns a row of half adders into the recursive adder.
// Combinational.
module pasta_sel_mux (
  input  logic sel,   // 0: operands, 1: feedback
  input  logic a,     // operand bit A_i
  input  logic b,     // operand bit B_i
  input  logic s_fb,  // fed-back partial sum S_i
  input  logic c_fb,  // fed-back carry C_i into this bit
  output logic x,     // to half adder input x
  output logic y      // to half adder input y
);

  always_comb begin
    x = sel ? s_fb : a;
    y = sel ? c_fb : b;
  end

endmodule
