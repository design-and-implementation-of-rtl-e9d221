// tb_pasta_selftimed: the adder run the self-timed way, without a clock.
//
// N pasta_bit_cell instances are closed into the asynchronous feedback loop:
// each cell's sum and carry outputs return to the multiplexers through a
// transport delay D. D stands for the matched XOR/AND gate delay, so every
// wave of the recursion takes D. pasta_completion watches the fed-back
// carries and SEL. Per addition the testbench holds SEL low for 2*D while
// the operands settle, then raises SEL and waits for TERM. It checks:
//   * the sum against integer addition, and the carry out, taken as any
//     carry that left the top bit after the operands were selected;
//   * the time from SEL rising to TERM rising, against k*D, where k is the
//     recursion depth from a word-level model;
//   * that TERM never rises while SEL is low.
// This shows that completion time depends on the operands. The transport
// delay model of the loop belongs to this testbench; the bit cells and the
// completion unit are the synthesizable ones.
module tb_pasta_selftimed;
  localparam int unsigned N = pasta_pkg::ADDER_WIDTH;
  localparam int D = 10;  // one wave: matched XOR / AND delay
  localparam int unsigned NRAND = 500;

  logic         sel = 1'b0, cin = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic [N-1:0] s_next, s_fb = '0;
  logic [N:0]   c_next, c_fb = '0;   // c_*[i] = carry into bit i, [N] = carry out
  logic         term;
  logic         cout_seen;
  int checks, failures;
  int n_zero = 0, n_deep = 0;

  for (genvar i = 0; i < N; i++) begin : g_bit
    pasta_bit_cell u_cell (
      .sel    (sel),
      .a      (a[i]),
      .b      (b[i]),
      .s_fb   (s_fb[i]),
      .c_fb   (c_fb[i]),
      .s_next (s_next[i]),
      .c_next (c_next[i+1])
    );
  end
  assign c_next[0] = sel ? 1'b0 : cin;

  // Feedback through the gate delay (transport: every wave arrives).
  always @(s_next) s_fb <= #D s_next;
  always @(c_next) c_fb <= #D c_next;

  pasta_completion #(.N(N)) u_done (.sel(sel), .carry(c_fb[N-1:0]), .term(term));

  always @(c_fb) if (sel && c_fb[N]) cout_seen = 1'b1;

  always @(posedge term) begin
    checks++;
    if (!sel) begin
      failures++;
      $display("FAIL TERM rose while SEL low at %0t term=%0b carry=%h", $time, term, c_fb);
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_depth(input logic [N-1:0] x, input logic [N-1:0] y,
                                     input logic ci);
    logic [N-1:0] s, c, s_n;
    int k = 0;
    s = x ^ y;
    c = (x & y) << 1 | N'(ci);
    while (c != '0) begin
      s_n = s ^ c;
      c   = (s & c) << 1;
      s   = s_n;
      k++;
    end
    return k;
  endfunction

  task automatic add(input logic [N-1:0] x, input logic [N-1:0] y, input logic ci);
    logic [N:0] expected;
    longint t0, dt;
    int k;
    sel = 1'b0;
    a = x; b = y; cin = ci;
    #(2 * D);
    cout_seen = c_fb[N];
    expected = {1'b0, x} + {1'b0, y} + (N+1)'(ci);
    k = model_depth(x, y, ci);
    sel = 1'b1;
    t0 = longint'($time);
    #0;
    if (!term) begin
      fork
        @(posedge term);
        #((N + 4) * D);
      join_any
      disable fork;
    end
    dt = longint'($time) - t0;
    #(D / 2);  // hold the result for half a wave before the next selection
    checks += 3;
    if (!term) begin
      failures++;
      $display("FAIL no TERM for a=%h b=%h cin=%0b", x, y, ci);
    end
    if (dt != k * D) begin
      failures++;
      $display("FAIL completion after %0t, expected %0d waves (a=%h b=%h)", dt, k, x, y);
    end
    if ({cout_seen, s_fb} != expected) begin
      failures++;
      $display("FAIL sum %0b_%h expected %h (a=%h b=%h cin=%0b)", cout_seen, s_fb, expected, x, y, ci);
    end
    if (k == 0) n_zero++;
    if (k >= N - 1) n_deep++;
  endtask

  initial begin
    checks = 0;
    failures = 0;
    cout_seen = 1'b0;
    #(2 * D);
    add('0, '0, 1'b0);
    add('1, N'(1), 1'b0);
    add('1, '0, 1'b1);
    add('1, '1, 1'b1);
    add(N'(32'h0101_0101), N'(32'h01FF_01FF), 1'b0);
    for (int i = 0; i < NRAND; i++)
      add(N'($urandom()), N'($urandom()), 1'($urandom_range(0, 1)));
    checks += 2;
    if (n_zero == 0) begin failures++; $display("FAIL never: zero-wave completion"); end
    if (n_deep == 0) begin failures++; $display("FAIL never: full-length chain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
