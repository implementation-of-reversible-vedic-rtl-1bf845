// tb_rca: self-check of the ripple carry adder at its default width (4,
// exhaustive: all operands and both carry-ins) and at width 6 (exhaustive
// too), comparing {cout, sum} with integer addition.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic [5:0] a6, b6, s6;
  logic cin, co4, co6;
  int checks = 0, failures = 0;

  rca        dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  rca #(.W(6)) dut6 (.a(a6), .b(b6), .cin(cin), .sum(s6), .cout(co6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) begin
          cin = k[0];
          a6 = 6'(i);
          b6 = 6'(j);
          a4 = 4'(i);
          b4 = 4'(j);
          #1;
          checks++;
          if (int'({co6, s6}) != i + j + k) begin
            failures++;
            $display("FAIL W=6 %0d+%0d+%0d -> %0d", i, j, k, {co6, s6});
          end
          if (i < 16 && j < 16) begin
            checks++;
            if (int'({co4, s4}) != i + j + k) begin
              failures++;
              $display("FAIL W=4 %0d+%0d+%0d -> %0d", i, j, k, {co4, s4});
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
