// tb_pasta_ctrl: checks the handshake controller against a scripted
// completion signal. For each transaction a carry-depth k is chosen; the
// testbench raises term once SEL has been high for k cycles (as the real
// completion unit would). Checked every cycle: SEL low only in IDLE,
// load_en high on the request cycle and in every ITER cycle before term,
// ack = term, ack arriving exactly 1 + k cycles after req is sampled,
// the iterations output equal to k, and the return to SEL low after req
// falls. Covers k = 0, k = 1, long depths and a request held in DONE.
module tb_pasta_ctrl;
  localparam int unsigned CW = 6;
  logic clk = 0, rst_n = 0, req = 0, term;
  logic sel, load_en, ack;
  logic [CW-1:0] iterations;
  int checks = 0, failures = 0;
  int sel_cycles = 0;  // cycles SEL has been high in this transaction
  int depth = 0;       // scripted recursion depth

  pasta_ctrl #(.CW(CW)) dut (.clk(clk), .rst_n(rst_n), .req(req), .term(term),
                             .sel(sel), .load_en(load_en), .ack(ack),
                             .iterations(iterations));

  always #5 clk = ~clk;

  // Stand-in for the completion unit: carries vanish after `depth` steps.
  always_comb term = sel && (sel_cycles >= depth);
  always_ff @(posedge clk) sel_cycles <= sel ? sel_cycles + 1 : 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (depth %0d)", what, got, exp, depth);
    end
  endtask

  task automatic transaction(input int k, input int hold);
    int n;
    depth = k;
    @(negedge clk);
    expect_eq("sel idle", int'(sel), 0);
    expect_eq("ack idle", int'(ack), 0);
    req = 1;
    #1;
    expect_eq("load_en on request", int'(load_en), 1);
    n = 0;
    do begin
      @(negedge clk);
      n++;
      expect_eq("sel busy", int'(sel), 1);
      expect_eq("ack = term", int'(ack), int'(term));
      if (!ack) expect_eq("load_en iterating", int'(load_en), 1);
    end while (!ack && n < 100);
    expect_eq("latency", n, 1 + k);
    expect_eq("load_en stops", int'(load_en), 0);
    repeat (hold) begin
      @(negedge clk);
      expect_eq("ack held", int'(ack), 1);
      expect_eq("load_en held off", int'(load_en), 0);
    end
    expect_eq("iterations", int'(iterations), k);
    req = 0;
    @(negedge clk);
    expect_eq("sel released", int'(sel), 0);
    expect_eq("ack released", int'(ack), 0);
    expect_eq("no load without req", int'(load_en), 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    transaction(0, 0);
    transaction(1, 2);
    transaction(5, 0);
    transaction(32, 1);
    for (int i = 0; i < 40; i++) transaction(int'($urandom_range(0, 32)), int'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
