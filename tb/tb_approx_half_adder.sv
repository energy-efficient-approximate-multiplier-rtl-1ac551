// tb_approx_half_adder: exhaustive check of the approximate half adder.
// Expected outputs are the exact half adder's, with the one documented error:
// for inputs 1,1 the sum reads 1 instead of 0. Also checks that the cell's
// arithmetic value (2*carry + sum) never falls below the true sum.
module tb_approx_half_adder;
  logic x1, x2, sum, carry;
  int checks = 0, failures = 0;
  int n_wrong_sum = 0;

  approx_half_adder dut (.x1(x1), .x2(x2), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic exp_s, exp_c;
      {x1, x2} = 2'(v);
      #1;
      exp_c = x1 & x2;
      exp_s = (x1 + x2) % 2 == 1;
      if (x1 && x2) exp_s = 1'b1;
      checks++;
      if (sum !== exp_s || carry !== exp_c) begin
        failures++;
        $display("FAIL x=%b%b got s=%b c=%b want s=%b c=%b", x1, x2, sum, carry, exp_s, exp_c);
      end
      if (sum !== (x1 ^ x2)) n_wrong_sum++;
      checks++;
      if (2 * int'(carry) + int'(sum) < int'(x1) + int'(x2)) failures++;
    end
    checks++;
    if (n_wrong_sum != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
