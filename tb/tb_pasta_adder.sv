// tb_pasta_adder: end-to-end test of the parallel self-timed adder at its
// default width (32 bits, no parameter overrides).
//
// Each addition goes through the full four-phase handshake. The expected
// sum and carry out come from plain integer addition; the expected number
// of recursion steps comes from a word-level model of the recursion
// (S' = S ^ C, C' = (S & C) << 1 until C = 0). Checked per addition: sum,
// carry out, the iterations output, ack arriving exactly 1 + k cycles after
// the request is sampled, ack never high in the selection (load) cycle, and
// ack dropping after req is withdrawn. Directed cases cover no carries at
// all (k = 0), the longest chain (k = N), carry in, carry out and several
// independent chains moving in parallel; random cases check that the
// average depth stays logarithmic (at most 2*log2(N)). Each mechanism is
// counted and a mechanism that never occurred counts as a failure.
module tb_pasta_adder;
  localparam int unsigned N  = pasta_pkg::ADDER_WIDTH;
  localparam int unsigned CW = $clog2(N + 2);
  localparam int unsigned NRAND = 2000;

  logic clk = 0, rst_n = 0, req = 0, cin = 0;
  logic [N-1:0] a = '0, b = '0, sum;
  logic ack, cout;
  logic [CW-1:0] iterations;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_no_carry = 0, n_full_chain = 0, n_cin = 0, n_cout = 0, n_parallel = 0;
  int n_iterated = 0;
  longint depth_sum = 0;

  pasta_adder dut (.clk(clk), .rst_n(rst_n), .req(req), .a(a), .b(b), .cin(cin),
                   .ack(ack), .sum(sum), .cout(cout), .iterations(iterations));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a=%h b=%h cin=%0b)", what, got, exp, a, b, cin);
    end
  endtask

  // Word-level model of the recursion: returns the number of steps after
  // loading, and how many carries were pending right after loading.
  function automatic int model_depth(input logic [N-1:0] x, input logic [N-1:0] y,
                                     input logic ci, output int chains);
    logic [N-1:0] s, c, s_n;
    int k = 0;
    s = x ^ y;
    c = (x & y) << 1 | N'(ci);
    chains = $countones(c);
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
    int k, chains, n;
    @(negedge clk);
    a = x; b = y; cin = ci;
    req = 1;
    expected = {1'b0, x} + {1'b0, y} + (N+1)'(ci);
    k = model_depth(x, y, ci, chains);
    n = 0;
    do begin
      @(negedge clk);
      n++;
      if (n == 1 && k > 0) expect_eq("no ack in first step", longint'(ack), 0);
    end while (!ack && n < N + 10);
    expect_eq("ack latency", n, 1 + k);
    expect_eq("sum", longint'(sum), longint'(expected[N-1:0]));
    expect_eq("cout", longint'(cout), longint'(expected[N]));
    expect_eq("iterations", longint'(iterations), k);
    req = 0;
    @(negedge clk);
    expect_eq("ack released", longint'(ack), 0);
    if (k == 0) n_no_carry++;
    else n_iterated++;
    if (k == N) n_full_chain++;
    if (ci) n_cin++;
    if (expected[N]) n_cout++;
    if (chains >= 2 && k > 0) n_parallel++;
  endtask

  // A request right after reset must not see TERM during the load cycle.
  task automatic check_load_phase();
    @(negedge clk);
    a = '0; b = '0; cin = 0;
    req = 1;
    #1;
    expect_eq("TERM gated by SEL in load cycle", longint'(ack), 0);
    @(negedge clk);
    expect_eq("zero-carry completion", longint'(ack), 1);
    req = 0;
    @(negedge clk);
  endtask

  initial begin
    real avg, bound;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_load_phase();
    add('0, '0, 1'b0);
    add(N'(32'h0F0F_0F0F), N'(32'hF0F0_F0F0), 1'b0);  // no carries
    add('1, N'(1), 1'b0);                             // chain of N-1
    add('1, '0, 1'b1);                                // chain of N, carry in
    add('1, '1, 1'b1);                                // all generate
    add(N'(32'h0101_0101), N'(32'h01FF_01FF), 1'b0);  // parallel chains
    add({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, 1'b0);  // carry out only
    for (int i = 0; i < NRAND; i++) begin
      logic [N-1:0] x, y;
      int dummy, k;
      x = N'({$urandom(), $urandom()});
      y = N'({$urandom(), $urandom()});
      k = model_depth(x, y, 1'b0, dummy);
      depth_sum += k;
      add(x, y, 1'($urandom_range(0, 1)));
    end
    avg   = real'(depth_sum) / NRAND;
    bound = 2.0 * $clog2(N);
    $display("random operands: average recursion depth %0.2f (log2 N = %0d)", avg, $clog2(N));
    checks++;
    if (avg > bound) begin
      failures++;
      $display("FAIL average depth %0.2f above %0.2f", avg, bound);
    end
    $display("mechanisms: no_carry=%0d iterated=%0d full_chain=%0d carry_in=%0d carry_out=%0d parallel_chains=%0d",
             n_no_carry, n_iterated, n_full_chain, n_cin, n_cout, n_parallel);
    checks += 6;
    if (n_no_carry == 0)   begin failures++; $display("FAIL never: no-carry completion"); end
    if (n_iterated == 0)   begin failures++; $display("FAIL never: iteration"); end
    if (n_full_chain == 0) begin failures++; $display("FAIL never: full-length chain"); end
    if (n_cin == 0)        begin failures++; $display("FAIL never: carry in"); end
    if (n_cout == 0)       begin failures++; $display("FAIL never: carry out"); end
    if (n_parallel == 0)   begin failures++; $display("FAIL never: parallel chains"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
