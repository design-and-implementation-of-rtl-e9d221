// pasta_ctrl: SEL generation and four-phase Req/Ack handshake for the adder.
//
// IDLE: SEL low. When req rises the bit cells see the operands and the state
// registers load A^B and the initial carries (load_en high for that cycle);
// the controller moves to ITER. ITER: SEL high, the state registers take one
// recursion step per clock. As soon as the completion unit raises TERM the
// controller moves to DONE and stops the registers; ack (= TERM) stays high
// until req falls, then the controller returns to IDLE and SEL drops, which
// clears TERM (req may already fall in the cycle in which ack first shows;
// the controller then goes straight from ITER back to IDLE). iterations counts the ITER cycles in which carries were
// still present, i.e. the recursion depth of the last addition.
//
// Timing: req seen in cycle t -> load at the end of t -> ack in cycle
// t + 1 + k, where k is the recursion depth. The adder itself is described
// as self-timed with SEL and TERM; the clocked three-state controller, the
// register enable and the iteration counter are this design's own.
module pasta_ctrl #(
  parameter int unsigned CW = 6  // width of the iteration counter
) (
  input  logic          clk,
  input  logic          rst_n,       // asynchronous, active low
  input  logic          req,         // request: operands valid
  input  logic          term,        // TERM from the completion unit
  output logic          sel,         // SEL to the bit cells
  output logic          load_en,     // state registers capture this cycle
  output logic          ack,         // acknowledge: result valid
  output logic [CW-1:0] iterations   // recursion steps of the last addition
);

  import pasta_pkg::*;

  pasta_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      PASTA_IDLE: if (req)  state_d = PASTA_ITER;
      PASTA_ITER: if (term) state_d = req ? PASTA_DONE : PASTA_IDLE;
      PASTA_DONE: if (!req) state_d = PASTA_IDLE;
      default:              state_d = PASTA_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= PASTA_IDLE;
      iterations <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == PASTA_IDLE && req)      iterations <= '0;
      else if (state_q == PASTA_ITER && !term) iterations <= iterations + 1'b1;
    end
  end

  always_comb begin
    sel     = (state_q != PASTA_IDLE);
    load_en = (state_q == PASTA_IDLE && req) || (state_q == PASTA_ITER && !term);
    ack     = term;
  end

  // Four-phase rule: the request may not be withdrawn before it is acknowledged.
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == PASTA_ITER && !term) |-> req)
    else $error("req withdrawn before ack");

  // TERM may only be seen while SEL is high.
  a_term_sel : assert property (@(posedge clk) disable iff (!rst_n)
    term |-> sel)
    else $error("TERM high during the selection phase");

endmodule
