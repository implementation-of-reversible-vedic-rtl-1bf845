// tb_cska_incrementer: exhaustive self-check of the half-adder incrementer at
// its default width (M = 4): for every z and carry-in, {cout, s} must equal
// z + cin.
module tb_cska_incrementer;
  logic [3:0] z, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  cska_incrementer dut (.z(z), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < 16; i++) begin
        z   = 4'(i);
        cin = k[0];
        #1;
        checks++;
        if (int'({cout, s}) != i + k) begin
          failures++;
          $display("FAIL %0d+%0d -> %0d", i, k, {cout, s});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
