// pasta_completion: completion detection (the TERM signal).
//
// The recursion has finished once no bit receives a carry any more. TERM is
// therefore the NOR of all carries C_0..C_{N-1} that feed bit cells, with the
// inverted SEL as one more NOR input, so that TERM cannot rise during the
// initial selection phase while the operands are still being loaded. In
// silicon this is one wide ratioed NOR with all pull-downs in parallel; here
// it is a reduction OR. Combinational. The carry out of the top bit feeds no
// cell and is not an input: that choice is this design's own.
module pasta_completion #(
  parameter int unsigned N = pasta_pkg::ADDER_WIDTH  // number of bit cells
) (
  input  logic         sel,    // SEL: high while iterating
  input  logic [N-1:0] carry,  // C_i, carry into bit i
  output logic         term    // high once all carries are zero
);

  always_comb term = ~((|carry) | ~sel);

endmodule
