// tb_pasta_half_adder: exhaustive check of the half adder. For all four
// input pairs the sum bit must equal the parity and the carry bit the
// majority-of-two (x + y = 2c + s).
module tb_pasta_half_adder;
  logic x, y, s, c;
  int checks = 0, failures = 0;

  pasta_half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if (int'({c, s}) != int'(x) + int'(y)) begin
        failures++;
        $display("FAIL x=%0b y=%0b -> c=%0b s=%0b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
