// tb_vedic_mul_2x2: exhaustive self-check of the 2x2 Vedic multiplier against
// integer multiplication, all 16 operand pairs.
module tb_vedic_mul_2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0, failures = 0;

  vedic_mul_2x2 dut (.a(a), .b(b), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (int'(q) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d", i, j, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
