// tb_approx_full_adder: exhaustive check of the approximate full adder.
// Expected outputs are the exact full adder's, with the documented errors:
// the sum is wrong for x1,x2,x3 = 1,1,0 and 1,1,1, the carry for 1,1,0.
// Also counts the error patterns (two in the sum, one in the carry).
module tb_approx_full_adder;
  logic x1, x2, x3, sum, carry;
  int checks = 0, failures = 0;
  int sum_err = 0, carry_err = 0;

  approx_full_adder dut (.x1(x1), .x2(x2), .x3(x3), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      logic exp_s, exp_c;
      {x1, x2, x3} = 3'(v);
      #1;
      total = int'(x1) + int'(x2) + int'(x3);
      exp_s = total[0];
      exp_c = total >= 2;
      if (x1 && x2) begin           // the two patterns the OR merge gets wrong
        exp_s = ~exp_s;
        if (!x3) exp_c = 1'b0;
      end
      checks++;
      if (sum !== exp_s || carry !== exp_c) begin
        failures++;
        $display("FAIL x=%b%b%b got s=%b c=%b want s=%b c=%b", x1, x2, x3, sum, carry, exp_s, exp_c);
      end
      if (sum !== total[0]) sum_err++;
      if (carry !== (total >= 2)) carry_err++;
    end
    checks++;
    if (sum_err != 2 || carry_err != 1) begin
      failures++;
      $display("FAIL error pattern count sum=%0d carry=%0d", sum_err, carry_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
