// pasta_pkg: constants and types shared by the parallel self-timed adder.
//
// ADDER_WIDTH is the operand width of the main configuration (32 bits, the
// size the adder was laid out for). pasta_state_e names the phases of the
// handshake controller: IDLE (SEL low, waiting for a request), ITER (SEL
// high, the sum/carry vectors are fed back through the bit cells once per
// clock) and DONE (TERM seen, result held until the request is withdrawn).
// The three-phase controller is this design's own choice.
package pasta_pkg;

  localparam int unsigned ADDER_WIDTH = 32;

  typedef enum logic [1:0] {
    PASTA_IDLE = 2'd0,
    PASTA_ITER = 2'd1,
    PASTA_DONE = 2'd2
  } pasta_state_e;

endpackage
