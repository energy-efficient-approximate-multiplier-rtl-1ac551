// tb_admapp_mul6: exhaustive test of the 6x6 approximate Dadda multiplier
// admapp_mul6 over all 4096 operand pairs.
// Reference figures were computed separately from the dot-diagram netlist:
// the sum of all products, a position-weighted checksum (any single changed
// output alters it), the total absolute error, the number of exact results
// and the error bounds, plus a few spot products. A zero operand must give 0.
module tb_admapp_mul6;
  logic [5:0]  a, b;
  logic [11:0] p;
  int checks = 0, failures = 0;
  longint total = 0, abserr = 0;
  int unsigned wsum = 0;
  int n_exact = 0;

  admapp_mul6 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int abs_int(input int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic spot(input int x, input int y, input int want);
    a = 6'(x); b = 6'(y);
    #1;
    expect_eq($sformatf("%0d*%0d", x, y), longint'(p), longint'(want));
  endtask

  initial begin
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++) begin
        int err;
        a = 6'(x); b = 6'(y);
        #1;
        err = int'(p) - x * y;
        total += longint'(p);
        wsum  += int'(p) * (x * 64 + y + 1);
        abserr += longint'(abs_int(err));
        if (err == 0) n_exact++;
        checks++;
        if (err > 400 || err < -192 || ((x == 0 || y == 0) && p != 0)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d (error %0d out of bounds)", x, y, p, err);
        end
      end
    expect_eq("sum of products", total, 4162464);
    expect_eq("weighted checksum", longint'(wsum), 64'd2908896512);
    expect_eq("total |error|", abserr, 172992);
    expect_eq("exact results", longint'(n_exact), 2256);
    spot(35, 7, 245);
    spot(55, 7, 289);
    spot(63, 63, 3993);
    spot(45, 27, 1167);
    $display("admapp_mul6: exact %0d/4096, mean |error| %0.2f", n_exact, real'(abserr) / 4096.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
