// tb_ut_mul_4x4: exhaustive self-check of the 4x4 multiplier ut_mul_4x4: all 256
// operand pairs, product compared with integer multiplication. Also checks
// the worked example of the vertical-and-crosswise method, 15 x 15 = 225.
module tb_ut_mul_4x4;
  logic [3:0] a, b;
  logic [7:0] c;
  int checks = 0, failures = 0;

  ut_mul_4x4 dut (.a(a), .b(b), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'(c) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d", i, j, c);
        end
      end
    a = 4'd15;
    b = 4'd15;
    #1;
    checks++;
    if (c != 8'd225) begin
      failures++;
      $display("FAIL 15*15 -> %0d", c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
