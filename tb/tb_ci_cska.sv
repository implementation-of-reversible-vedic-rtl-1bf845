// tb_ci_cska: self-check of the CI-CSKA adder.
// The default adder (N = 32, M = 4: 8 stages, even count) and a 28-bit one
// (7 stages, odd count, so the final carry leaves the skip chain in the
// other polarity) are driven with directed corner cases (carry rippling
// across every stage, all-ones + carry-in) and random operands. {co, s} is
// compared with 64-bit integer addition. The testbench also counts, from
// the operands alone, how often a stage's carry was produced by skipping
// (stage sum all ones with an incoming carry) in an even and in an odd
// stage, and fails if either never happened.
module tb_ci_cska;
  localparam int unsigned N1 = 32, N2 = 28, M = 4;

  logic [N1-1:0] a1, b1, s1;
  logic [N2-1:0] a2, b2, s2;
  logic ci, co1, co2;
  int checks = 0, failures = 0;
  int skip_even = 0, skip_odd = 0;

  ci_cska                    dut1 (.a(a1), .b(b1), .ci(ci), .s(s1), .co(co1));
  ci_cska #(.N(N2), .M(M))   dut2 (.a(a2), .b(b2), .ci(ci), .s(s2), .co(co2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count skip events of the 32-bit adder from its operands
  function automatic void count_skips(logic [N1-1:0] a, logic [N1-1:0] b, logic c0);
    logic cy;
    cy = c0;
    for (int k = 0; k < N1 / M; k++) begin
      logic [M:0] t;
      t = {1'b0, a[k*M +: M]} + {1'b0, b[k*M +: M]};
      if (k > 0 && t[M-1:0] == '1 && cy) begin
        if ((k + 1) % 2 == 0) skip_even++;
        else                  skip_odd++;
      end
      cy = t[M] | (cy & (t[M-1:0] == '1));
    end
  endfunction

  task automatic apply(logic [N1-1:0] a, logic [N1-1:0] b, logic c);
    logic [63:0] e1, e2;
    a1 = a;
    b1 = b;
    a2 = a[N2-1:0];
    b2 = b[N2-1:0];
    ci = c;
    #1;
    e1 = 64'(a1) + 64'(b1) + 64'(ci);
    e2 = 64'(a2) + 64'(b2) + 64'(ci);
    checks++;
    if ({co1, s1} != e1[N1:0]) begin
      failures++;
      $display("FAIL N=32 %h+%h+%0d -> %0d_%h", a1, b1, ci, co1, s1);
    end
    checks++;
    if ({co2, s2} != e2[N2:0]) begin
      failures++;
      $display("FAIL N=28 %h+%h+%0d -> %0d_%h", a2, b2, ci, co2, s2);
    end
    count_skips(a, b, c);
  endtask

  initial begin
    apply('1, '0, 1'b1);                 // carry skips across every stage
    apply('1, 32'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply(32'h0FFF_FFFF, 32'd1, 1'b0);
    for (int k = 0; k < N1 / M; k++)     // carry generated in each stage
      apply(32'(4'hF) << (k * M), 32'(1) << (k * M), 1'b0);
    for (int n = 0; n < 20000; n++)
      apply($urandom, $urandom, 1'($urandom));
    $display("skip events: even stages %0d, odd stages %0d", skip_even, skip_odd);
    checks++;
    if (skip_even == 0 || skip_odd == 0) begin
      failures++;
      $display("FAIL skip path not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
