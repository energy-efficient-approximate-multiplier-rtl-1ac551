// tb_mean_filter: end-to-end test of the mean filter at its default
// configuration (ADMAA sub-multipliers), with no parameter overridden.
//   1. the all-255 window: running sums s1..s7 must read 510, 765, ..., 2040,
//      the window sum 2295 and the mean 254;
//   2. an all-zero window and single-pixel windows;
//   3. 20000 windows of pseudo-random pixels (31-bit LCG, one byte per pixel
//      taken from bits 23:16): each window sum is checked against the sum
//      worked out here, and the means against a sum and a weighted checksum
//      computed separately from the dot-diagram netlists.
// It counts how often each effect of the datapath shows up and fails if one
// never does: the approximate multiplier departing from the exact product,
// the approximate multiplier being exact, and the 455/4096 constant itself
// rounding below floor(s/9).
module tb_mean_filter;
  import adm_pkg::*;
  logic [WIN_N-1:0][PIX_W-1:0] pix;
  logic [SUM_W-1:0]            sum;
  logic [PIX_W-1:0]            ymean;
  int checks = 0, failures = 0;
  int unsigned x = 1, wsum = 0;
  longint ysum = 0;
  int n_approx_err = 0, n_approx_exact = 0, n_const_trunc = 0;

  mean_filter dut (.pix(pix), .sum(sum), .ymean(ymean));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin

    // 1. all pixels 255
    for (int k = 0; k < WIN_N; k++) pix[k] = 8'd255;
    #1;
    for (int k = 1; k < WIN_N - 1; k++)
      expect_eq($sformatf("s%0d", k), longint'(dut.chain[k]), longint'(int'(255 * (k + 1))));
    expect_eq("all-255 sum",  longint'(sum),   2295);
    expect_eq("all-255 mean", longint'(ymean), 254);

    // 2. all zero, then one pixel set at a time
    pix = '0;
    #1;
    expect_eq("all-0 mean", longint'(ymean), 0);
    for (int k = 0; k < WIN_N; k++) begin
      pix = '0;
      pix[k] = 8'd180;
      #1;
      expect_eq($sformatf("single pixel %0d sum", k), longint'(sum), 180);
      expect_eq($sformatf("single pixel %0d mean", k), longint'(ymean), 19);
    end

    // 3. random windows
    for (int i = 0; i < 20000; i++) begin
      int s, e;
      s = 0;
      for (int k = 0; k < WIN_N; k++) begin
        x = (x * 1103515245 + 12345) & 32'h7fff_ffff;
        pix[k] = x[23:16];
        s += int'(x[23:16]);
      end
      #1;
      expect_eq("window sum", longint'(sum), longint'(s));
      e = (s * 455) >>> 12;
      if (int'(ymean) != e) n_approx_err++; else n_approx_exact++;
      if (e != s / 9) n_const_trunc++;
      ysum += longint'(ymean);
      wsum += int'(ymean) * (i + 1);
    end
    expect_eq("random mean sum",      ysum, 2566234);
    expect_eq("random mean checksum", longint'(wsum), 64'd4202738688);
    expect_eq("windows off the exact product", longint'(n_approx_err), 7030);

    $display("effects: approximate!=exact %0d, approximate==exact %0d, 455/4096 below s/9 %0d",
             n_approx_err, n_approx_exact, n_const_trunc);
    checks++; if (n_approx_err   == 0) failures++;
    checks++; if (n_approx_exact == 0) failures++;
    checks++; if (n_const_trunc  == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
