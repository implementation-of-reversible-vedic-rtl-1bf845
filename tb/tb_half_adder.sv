// tb_half_adder: exhaustive self-check of half_adder. All four input pairs
// are applied and {c, s} is compared with the arithmetic sum x + y.
module tb_half_adder;
  logic x, y, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if ({c, s} != 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%0d y=%0d -> c=%0d s=%0d", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
