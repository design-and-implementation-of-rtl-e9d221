// pasta_bit_cell: one bit of the parallel self-timed adder.
//
// A pasta_sel_mux pair feeds a pasta_half_adder. With SEL low the cell
// computes S_i = A_i ^ B_i and C_{i+1} = A_i & B_i; with SEL high it computes
// one recursion step S_i' = S_i ^ C_i and C_{i+1}' = S_i & C_i. The sum stays
// in the cell (s_next goes back to s_fb), the carry leaves for bit i+1.
// Combinational; the state that closes the loop is held in pasta_adder.
module pasta_bit_cell (
  input  logic sel,     // 0: load operands, 1: iterate
  input  logic a,       // operand bit A_i
  input  logic b,       // operand bit B_i
  input  logic s_fb,    // current partial sum S_i
  input  logic c_fb,    // current carry C_i into this bit
  output logic s_next,  // next partial sum of this bit
  output logic c_next   // next carry C_{i+1} out of this bit
);

  logic x, y;

  pasta_sel_mux u_mux (
    .sel  (sel),
    .a    (a),
    .b    (b),
    .s_fb (s_fb),
    .c_fb (c_fb),
    .x    (x),
    .y    (y)
  );

  pasta_half_adder u_ha (
    .x (x),
    .y (y),
    .s (s_next),
    .c (c_next)
  );

endmodule
