// tb_pasta_completion: checks the TERM detector at N = 32. TERM must be low
// whenever SEL is low, whatever the carries, and with SEL high it must be
// high exactly when no carry bit is set. Covers the all-zero vector, every
// single-bit vector and random vectors.
module tb_pasta_completion;
  localparam int unsigned N = 32;
  logic         sel, term;
  logic [N-1:0] carry;
  int checks = 0, failures = 0;

  pasta_completion #(.N(N)) dut (.sel(sel), .carry(carry), .term(term));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic s, input logic [N-1:0] c);
    logic expected;
    sel   = s;
    carry = c;
    #1;
    expected = s && (c == '0);
    checks++;
    if (term !== expected) begin
      failures++;
      $display("FAIL sel=%0b carry=%h term=%0b", s, c, term);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      check(1'(s), '0);
      for (int i = 0; i < N; i++) check(1'(s), N'(1) << i);
      for (int r = 0; r < 50; r++) check(1'(s), N'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
