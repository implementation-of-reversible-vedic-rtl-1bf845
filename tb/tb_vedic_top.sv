// tb_vedic_top: end-to-end self-check of vedic_top at its default parameters
// (32-bit CI-CSKA in 4-bit stages, Nikhilam base 100).
//   - both 4x4 multipliers: all 256 operand pairs, each compared with integer
//     multiplication and with each other;
//   - CI-CSKA: directed carry chains and random operands against 64-bit
//     addition;
//   - Nikhilam: the 96 x 93 example and random operand pairs.
// Mechanisms counted from the operands (a failure if one never occurs):
// a full bit-3 column (all four partial products of the first CM5:2 set),
// a product using bit 7 (carry out of the last CM3:2), a skipped carry in an
// even and in an odd CI-CSKA stage, an adder carry out, a Nikhilam right-hand
// side larger than the base, a negative left-hand side and an operand above
// the base.
module tb_vedic_top;
  localparam int BASE = 100;

  logic        [3:0]  ut_a, ut_b, blk_a, blk_b;
  logic        [7:0]  ut_c, blk_c;
  logic        [31:0] add_a, add_b, add_s;
  logic               add_ci, add_co;
  logic        [6:0]  nik_a, nik_b;
  logic signed [8:0]  nik_lhs;
  logic signed [15:0] nik_rhs;
  logic        [13:0] nik_p;

  int checks = 0, failures = 0;
  int n_col3_full = 0, n_bit7 = 0, n_skip_even = 0, n_skip_odd = 0, n_co = 0;
  int n_spill = 0, n_neg = 0, n_surplus = 0;

  vedic_top dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic add(logic [31:0] a, logic [31:0] b, logic c);
    logic [63:0] e;
    logic cy;
    add_a  = a;
    add_b  = b;
    add_ci = c;
    #1;
    e = 64'(a) + 64'(b) + 64'(c);
    check({add_co, add_s} == e[32:0],
          $sformatf("cska %h+%h+%0d -> %0d_%h", a, b, c, add_co, add_s));
    if (e[32]) n_co++;
    cy = c;
    for (int k = 0; k < 8; k++) begin
      logic [4:0] t;
      t = {1'b0, a[k*4 +: 4]} + {1'b0, b[k*4 +: 4]};
      if (k > 0 && t[3:0] == 4'hF && cy) begin
        if (k % 2 == 1) n_skip_even++;
        else            n_skip_odd++;
      end
      cy = t[4] | (cy & (t[3:0] == 4'hF));
    end
  endtask

  task automatic nik(int i, int j);
    nik_a = 7'(i);
    nik_b = 7'(j);
    #1;
    check(int'(nik_p) == i * j && int'(nik_lhs) == i + j - BASE &&
          int'(nik_rhs) == (BASE - i) * (BASE - j),
          $sformatf("nikhilam %0d*%0d: lhs=%0d rhs=%0d p=%0d", i, j, nik_lhs, nik_rhs, nik_p));
    if ((BASE - i) * (BASE - j) >= BASE) n_spill++;
    if (i + j < BASE) n_neg++;
    if (i > BASE || j > BASE) n_surplus++;
  endtask

  initial begin
    // 4x4 multipliers
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        ut_a  = 4'(i);
        ut_b  = 4'(j);
        blk_a = 4'(i);
        blk_b = 4'(j);
        #1;
        check(int'(ut_c) == i * j, $sformatf("ut %0d*%0d -> %0d", i, j, ut_c));
        check(int'(blk_c) == i * j, $sformatf("blk %0d*%0d -> %0d", i, j, blk_c));
        check(ut_c == blk_c, "multipliers disagree");
        if (ut_a[3] & ut_b[0] & ut_a[0] & ut_b[3] & ut_a[2] & ut_b[1] & ut_a[1] & ut_b[2])
          n_col3_full++;
        if (ut_c[7]) n_bit7++;
      end

    // CI-CSKA
    add('1, '0, 1'b1);
    add('1, 32'd1, 1'b0);
    add(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int n = 0; n < 5000; n++)
      add($urandom, $urandom, 1'($urandom));

    // Nikhilam
    nik_a = 7'd96;
    nik_b = 7'd93;
    #1;
    check(nik_lhs == 89 && nik_rhs == 28 && nik_p == 8928, "nikhilam 96*93");
    for (int n = 0; n < 2000; n++)
      nik(int'($urandom_range(127)), int'($urandom_range(127)));

    $display("full bit-3 column %0d, bit 7 set %0d, skips even %0d odd %0d, carry out %0d",
             n_col3_full, n_bit7, n_skip_even, n_skip_odd, n_co);
    $display("nikhilam: rhs over base %0d, negative lhs %0d, operand above base %0d",
             n_spill, n_neg, n_surplus);
    check(n_col3_full > 0, "full bit-3 column never occurred");
    check(n_bit7 > 0, "bit 7 never set");
    check(n_skip_even > 0, "no skip in an even stage");
    check(n_skip_odd > 0, "no skip in an odd stage");
    check(n_co > 0, "no adder carry out");
    check(n_spill > 0, "rhs never over base");
    check(n_neg > 0, "lhs never negative");
    check(n_surplus > 0, "no operand above base");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
