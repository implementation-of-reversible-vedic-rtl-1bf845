// tb_compressor_4_2: exhaustive self-check of the CM4:2 cell. For all 32
// combinations of x and cin, sum + 2*(carry + cout) must equal the number of
// ones, and cout must not depend on cin (checked by flipping cin).
module tb_compressor_4_2;
  logic [3:0] x;
  logic cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic cout0;
      for (int k = 0; k < 2; k++) begin
        int ones;
        x   = 4'(i);
        cin = k[0];
        #1;
        ones = $countones({x, cin});
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != ones) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%0d carry=%0d cout=%0d", x, cin, sum, carry, cout);
        end
        if (k == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
