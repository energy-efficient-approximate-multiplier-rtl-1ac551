// tb_adm12_trunc: tests the truncated 12x12 approximate multiplier in both
// variants (ADMAA and ADMAPP sub-multipliers), side by side.
//   1. the mean-filter use: a = 0..2295 (every possible 3x3 sum of 8-bit
//      pixels), b = 455; checks sum of results, a weighted checksum, total
//      |error| against the exact floor(a*455/4096), exact count and maximum;
//   2. 1000 pseudo-random operand pairs from a 31-bit LCG; sum and checksum;
//   3. spot values, among them the all-255 window (a = 2295): 254 / 253.
// Reference figures were computed separately from the dot-diagram netlists.
module tb_adm12_trunc;
  import adm_pkg::*;
  logic [11:0] a, b;
  logic [7:0]  p_aa, p_app;
  int checks = 0, failures = 0;
  longint sum_aa = 0, sum_app = 0, err_aa = 0, err_app = 0;
  int unsigned w_aa = 0, w_app = 0, lcg = 1;
  int ex_aa = 0, ex_app = 0, max_aa = 0, max_app = 0;

  adm12_trunc #(.VARIANT(MULT_ADMAA))  dut_aa  (.a(a), .b(b), .p_hi(p_aa));
  adm12_trunc #(.VARIANT(MULT_ADMAPP)) dut_app (.a(a), .b(b), .p_hi(p_app));

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

  task automatic spot(input int x, input int y, input int want_aa, input int want_app);
    a = 12'(x); b = 12'(y);
    #1;
    expect_eq($sformatf("ADMAA  %0d*%0d", x, y), longint'(p_aa),  longint'(want_aa));
    expect_eq($sformatf("ADMAPP %0d*%0d", x, y), longint'(p_app), longint'(want_app));
  endtask

  initial begin

    // 1. the mean-filter operand range
    b = 12'(INV9_Q12);
    for (int s = 0; s <= 2295; s++) begin
      int e;
      a = 12'(s);
      #1;
      e = (s * 455) >>> 12;
      sum_aa  += longint'(p_aa);
      sum_app += longint'(p_app);
      w_aa  += int'(p_aa)  * (s + 1);
      w_app += int'(p_app) * (s + 1);
      err_aa  += longint'(abs_int(int'(p_aa) - e));
      err_app += longint'(abs_int(int'(p_app) - e));
      if (int'(p_aa)  == e) ex_aa++;
      if (int'(p_app) == e) ex_app++;
      if (int'(p_aa)  > max_aa)  max_aa  = int'(p_aa);
      if (int'(p_app) > max_app) max_app = int'(p_app);
    end
    expect_eq("ADMAA  sweep sum",      sum_aa, 293198);
    expect_eq("ADMAA  sweep checksum", longint'(w_aa), 448852515);
    expect_eq("ADMAA  sweep |error|",  err_aa, 2243);
    expect_eq("ADMAA  sweep exact",    longint'(ex_aa), 1529);
    expect_eq("ADMAA  sweep max",      longint'(max_aa), 254);
    expect_eq("ADMAPP sweep sum",      sum_app, 298759);
    expect_eq("ADMAPP sweep checksum", longint'(w_app), 460512693);
    expect_eq("ADMAPP sweep |error|",  err_app, 8902);
    expect_eq("ADMAPP sweep exact",    longint'(ex_app), 1195);
    expect_eq("ADMAPP sweep max",      longint'(max_app), 253);
    $display("mean use: ADMAA exact %0d/2296 mean|err| %0.3f, ADMAPP exact %0d/2296 mean|err| %0.3f",
             ex_aa, real'(err_aa) / 2296.0, ex_app, real'(err_app) / 2296.0);

    // 2. general operands
    sum_aa = 0; sum_app = 0; w_aa = 0; w_app = 0;
    for (int i = 0; i < 1000; i++) begin
      lcg = (lcg * 1103515245 + 12345) & 32'h7fff_ffff;
      a = lcg[11:0];
      lcg = (lcg * 1103515245 + 12345) & 32'h7fff_ffff;
      b = lcg[11:0];
      #1;
      sum_aa  += longint'(p_aa);
      sum_app += longint'(p_app);
      w_aa  += int'(p_aa)  * (i + 1);
      w_app += int'(p_app) * (i + 1);
    end
    expect_eq("ADMAA  random sum",      sum_aa, 120252);
    expect_eq("ADMAA  random checksum", longint'(w_aa), 58921659);
    expect_eq("ADMAPP random sum",      sum_app, 112840);
    expect_eq("ADMAPP random checksum", longint'(w_app), 56518139);

    // 3. spot values
    spot(2295, 455, 254, 253);   // nine pixels of 255
    spot(1234, 455, 136, 136);
    spot(4095, 4095, 50, 21);    // product wraps above bit 19
    spot(0, 455, 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
