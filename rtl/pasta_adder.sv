// pasta_adder: N-bit parallel self-timed adder built on a recursive
// definition of binary addition (top of the design).
//
// Each bit i holds a partial sum S_i and receives a carry C_i from bit i-1.
// Loading sets S = A ^ B, C_{i+1} = A_i & B_i and C_0 = cin. Every further
// step replaces, in all bits at once, S_i by S_i ^ C_i and C_{i+1} by
// S_i & C_i; S + C (with weights) never changes, so when every C_i is zero S
// is the sum. Independent carry chains advance in parallel, which makes the
// average number of steps for random operands grow with log2(N) rather than
// N. The structure is N pasta_bit_cell (2:1 multiplexers + half adder), a
// pasta_completion unit raising TERM once all carries are zero (gated by
// SEL), and a pasta_ctrl handshake controller driving SEL.
//
// The carry out of the top bit feeds no cell; it is collected in a sticky
// register (it can be set at most once, since A + B + cin < 2^(N+1)).
//
// Interface: four-phase req/ack. Hold a, b, cin and req; sum/cout are valid
// while ack is high; drop req to finish. Timing: ack rises 1 + k cycles after
// req is first sampled, k = recursion depth (0..N), reported on iterations.
//
// What follows the adder's description: the recursion, the bit cell made of
// multiplexers and a half adder, the completion NOR including not-SEL, the
// 32-bit default. This design's own choices: one recursion step per clock
// edge in place of the asynchronous feedback loop, the registers that hold
// S and C between steps, the sticky carry-out register and the controller.
module pasta_adder #(
  parameter int unsigned N  = pasta_pkg::ADDER_WIDTH,  // operand width
  parameter int unsigned CW = $clog2(N + 2)            // iteration counter width
) (
  input  logic          clk,
  input  logic          rst_n,       // asynchronous, active low
  input  logic          req,         // operands valid, start an addition
  input  logic [N-1:0]  a,           // operand A
  input  logic [N-1:0]  b,           // operand B
  input  logic          cin,         // carry in
  output logic          ack,         // result valid (TERM)
  output logic [N-1:0]  sum,         // A + B + cin, low N bits
  output logic          cout,        // carry out
  output logic [CW-1:0] iterations   // recursion depth of the last addition
);

  logic         sel, load_en, term;
  logic [N-1:0] s_q, c_q;            // S_i and C_i (carry into bit i)
  logic         cout_q;
  logic [N-1:0] s_next;
  logic [N:0]   c_next;              // c_next[i+1] = carry out of bit i
  logic         c0_next;

  for (genvar i = 0; i < N; i++) begin : g_bit
    pasta_bit_cell u_cell (
      .sel    (sel),
      .a      (a[i]),
      .b      (b[i]),
      .s_fb   (s_q[i]),
      .c_fb   (c_q[i]),
      .s_next (s_next[i]),
      .c_next (c_next[i+1])
    );
  end

  // Carry into bit 0: the external carry in during loading, nothing after.
  always_comb begin
    c0_next   = sel ? 1'b0 : cin;
    c_next[0] = c0_next;
  end

  pasta_completion #(.N(N)) u_done (
    .sel   (sel),
    .carry (c_q),
    .term  (term)
  );

  pasta_ctrl #(.CW(CW)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (req),
    .term       (term),
    .sel        (sel),
    .load_en    (load_en),
    .ack        (ack),
    .iterations (iterations)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q    <= '0;
      c_q    <= '0;
      cout_q <= 1'b0;
    end else if (load_en) begin
      s_q    <= s_next;
      c_q    <= c_next[N-1:0];
      cout_q <= sel ? (cout_q | c_next[N]) : c_next[N];
    end
  end

  always_comb begin
    sum  = s_q;
    cout = cout_q;
  end

  // The recursion ends within N steps.
  a_bounded : assert property (@(posedge clk) disable iff (!rst_n)
    sel && !term |-> iterations < CW'(N + 1))
    else $error("recursion did not terminate within N steps");

endmodule
