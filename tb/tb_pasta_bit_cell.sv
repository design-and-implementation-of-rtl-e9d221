// tb_pasta_bit_cell: exhaustive check of one adder bit. With SEL low the
// cell must add the operand bits (2*c_next + s_next = a + b); with SEL high
// it must add the fed-back sum and carry (2*c_next + s_next = s_fb + c_fb),
// the other pair being ignored.
module tb_pasta_bit_cell;
  logic sel, a, b, s_fb, c_fb, s_next, c_next;
  int checks = 0, failures = 0;

  pasta_bit_cell dut (.sel(sel), .a(a), .b(b), .s_fb(s_fb), .c_fb(c_fb),
                      .s_next(s_next), .c_next(c_next));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_total;
    for (int v = 0; v < 32; v++) begin
      {sel, a, b, s_fb, c_fb} = 5'(v);
      #1;
      exp_total = sel ? int'(s_fb) + int'(c_fb) : int'(a) + int'(b);
      checks++;
      if (2 * int'(c_next) + int'(s_next) != exp_total) begin
        failures++;
        $display("FAIL sel=%0b a=%0b b=%0b s=%0b c=%0b -> c'=%0b s'=%0b",
                 sel, a, b, s_fb, c_fb, c_next, s_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
