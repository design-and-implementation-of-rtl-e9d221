// tb_pasta_sel_mux: exhaustive check of the operand/feedback multiplexer
// pair over all 32 input combinations: SEL low must pass (a, b), SEL high
// must pass (s_fb, c_fb).
module tb_pasta_sel_mux;
  logic sel, a, b, s_fb, c_fb, x, y;
  int checks = 0, failures = 0;

  pasta_sel_mux dut (.sel(sel), .a(a), .b(b), .s_fb(s_fb), .c_fb(c_fb), .x(x), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {sel, a, b, s_fb, c_fb} = 5'(v);
      #1;
      checks++;
      if ({x, y} != (sel ? {s_fb, c_fb} : {a, b})) begin
        failures++;
        $display("FAIL sel=%0b a=%0b b=%0b s=%0b c=%0b -> x=%0b y=%0b",
                 sel, a, b, s_fb, c_fb, x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
