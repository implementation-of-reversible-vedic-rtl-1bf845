// tb_compressor_5_2: exhaustive self-check of the CM5:2 cell. For all 128
// combinations of x and cin, sum + 2*(carry + cout[0] + cout[1]) must equal
// the number of ones, and the couts must not depend on cin.
module tb_compressor_5_2;
  logic [4:0] x;
  logic [1:0] cin, cout;
  logic sum, carry;
  int checks = 0, failures = 0;

  compressor_5_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic [1:0] cout0;
      for (int k = 0; k < 4; k++) begin
        int ones;
        x   = 5'(i);
        cin = 2'(k);
        #1;
        ones = $countones({x, cin});
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout[0]) + int'(cout[1])) != ones) begin
          failures++;
          $display("FAIL x=%b cin=%b -> sum=%0d carry=%0d cout=%b", x, cin, sum, carry, cout);
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
