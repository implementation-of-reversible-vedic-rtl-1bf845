// tb_nikhilam_mul: self-check of the Nikhilam multiplier at its default base
// of 100. First the worked example 96 x 93: deficits 4 and 7, right-hand side
// 28, left-hand side 89, product 8928. Then every pair of 7-bit operands
// (0..127, so numbers below, at and above the base): p must equal a*b,
// lhs must equal a + b - 100 and rhs (100-a)*(100-b). Counts the cases where
// the right-hand side spills over the base, where the left-hand side is
// negative and where an operand is above the base, and fails if any of them
// never happened.
module tb_nikhilam_mul;
  localparam int BASE = 100;

  logic        [6:0]  a, b;
  logic signed [8:0]  lhs;
  logic signed [15:0] rhs;
  logic        [13:0] p;
  int checks = 0, failures = 0;
  int n_spill = 0, n_neg = 0, n_surplus = 0;

  nikhilam_mul dut (.a(a), .b(b), .lhs(lhs), .rhs(rhs), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 7'd96;
    b = 7'd93;
    #1;
    checks++;
    if (lhs != 89 || rhs != 28 || p != 8928) begin
      failures++;
      $display("FAIL 96*93: lhs=%0d rhs=%0d p=%0d", lhs, rhs, p);
    end

    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j++) begin
        a = 7'(i);
        b = 7'(j);
        #1;
        checks++;
        if (int'(p) != i * j || int'(lhs) != i + j - BASE ||
            int'(rhs) != (BASE - i) * (BASE - j)) begin
          failures++;
          $display("FAIL %0d*%0d: lhs=%0d rhs=%0d p=%0d", i, j, lhs, rhs, p);
        end
        if ((BASE - i) * (BASE - j) >= BASE) n_spill++;
        if (i + j < BASE) n_neg++;
        if (i > BASE || j > BASE) n_surplus++;
      end
    $display("rhs over base %0d, negative lhs %0d, operand above base %0d",
             n_spill, n_neg, n_surplus);
    checks++;
    if (n_spill == 0 || n_neg == 0 || n_surplus == 0) begin
      failures++;
      $display("FAIL a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
