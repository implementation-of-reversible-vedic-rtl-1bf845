// tb_compressor_3_2: exhaustive self-check of the CM3:2 cell (full adder).
// For all 8 inputs, sum + 2*carry must equal the number of ones in x.
module tb_compressor_3_2;
  logic [2:0] x;
  logic sum, carry;
  int checks = 0, failures = 0;

  compressor_3_2 dut (.x(x), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ones;
      x = 3'(i);
      #1;
      ones = int'(x[0]) + int'(x[1]) + int'(x[2]);
      checks++;
      if (int'(sum) + 2 * int'(carry) != ones) begin
        failures++;
        $display("FAIL x=%b -> sum=%0d carry=%0d", x, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
