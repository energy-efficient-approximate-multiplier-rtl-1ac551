// tb_mean_filter_image: the image-denoising workload. A 256x256 8-bit test
// image is generated here: a diagonal ramp, (r + c) / 2, inverted inside a
// central 128x128 square, plus roughly Gaussian noise (sum of four LCG bytes
// minus 510, divided by 8, so sigma is about 18), clipped to 0..255.
// Every interior 3x3 window (254 x 254) is filtered by three mean filters
// side by side: ADMAA, ADMAPP, and an exact reference computed here as
// floor(s * 455 / 4096). For each variant it prints the MSE and PSNR against
// the noise-free image and against the exact filter, and checks output sums,
// checksums and squared-error totals computed separately from the
// dot-diagram netlists. ADMAA must come out closer to the exact filter than
// ADMAPP.
module tb_mean_filter_image;
  import adm_pkg::*;
  localparam int N = 256;

  logic [PIX_W-1:0] img  [N][N];
  logic [PIX_W-1:0] base [N][N];
  logic [WIN_N-1:0][PIX_W-1:0] pix;
  logic [SUM_W-1:0] sum_aa, sum_app;
  logic [PIX_W-1:0] y_aa, y_app;
  int checks = 0, failures = 0;
  int unsigned x = 1, imgchk = 0;
  int unsigned w_ex = 0, w_aa = 0, w_app = 0;
  longint s_ex = 0, s_aa = 0, s_app = 0;
  longint se_aa_ref = 0, se_app_ref = 0, se_ex_base = 0, se_aa_base = 0, se_app_base = 0;
  int nwin = 0;

  mean_filter #(.VARIANT(MULT_ADMAA))  dut_aa  (.pix(pix), .sum(sum_aa),  .ymean(y_aa));
  mean_filter #(.VARIANT(MULT_ADMAPP)) dut_app (.pix(pix), .sum(sum_app), .ymean(y_app));

  initial begin : watchdog
    #100000000;
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

  function automatic real psnr(input longint se, input int n);
    return 10.0 * $log10(255.0 * 255.0 * real'(n) / real'(se));
  endfunction

  initial begin

    // image generation
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int b, nz, v;
        b = (r + c) >>> 1;
        if (r >= 64 && r < 192 && c >= 64 && c < 192) b = 255 - b;
        nz = -510;
        for (int k = 0; k < 4; k++) begin
          x = (x * 1103515245 + 12345) & 32'h7fff_ffff;
          nz += int'(x[23:16]);
        end
        nz = nz >>> 3;
        v = b + nz;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        base[r][c] = 8'(b);
        img[r][c]  = 8'(v);
        imgchk += int'(v) * (r * N + c + 1);
      end
    expect_eq("image checksum", longint'(imgchk), 64'd3827578290);

    // filter every interior window
    for (int r = 1; r < N - 1; r++)
      for (int c = 1; c < N - 1; c++) begin
        int s, e, k, d;
        s = 0;
        k = 0;
        for (int i = -1; i <= 1; i++)
          for (int j = -1; j <= 1; j++) begin
            pix[k] = img[r + i][c + j];
            s += int'(img[r + i][c + j]);
            k++;
          end
        #1;
        nwin++;
        checks++;
        if (int'(sum_aa) != s || int'(sum_app) != s) failures++;
        e = (s * 455) >>> 12;
        s_ex += longint'(e);             w_ex  += e * nwin;
        s_aa += longint'(y_aa);          w_aa  += int'(y_aa) * nwin;
        s_app += longint'(y_app);        w_app += int'(y_app) * nwin;
        d = int'(y_aa) - e;              se_aa_ref  += longint'(d * d);
        d = int'(y_app) - e;             se_app_ref += longint'(d * d);
        d = e - int'(base[r][c]);        se_ex_base += longint'(d * d);
        d = int'(y_aa) - int'(base[r][c]);  se_aa_base  += longint'(d * d);
        d = int'(y_app) - int'(base[r][c]); se_app_base += longint'(d * d);
      end

    expect_eq("windows", longint'(nwin), 64516);
    expect_eq("exact  output sum", s_ex, 8168432);
    expect_eq("exact  checksum", longint'(w_ex), 64'd1156312492);
    expect_eq("ADMAA  output sum", s_aa, 8224278);
    expect_eq("ADMAA  checksum", longint'(w_aa), 64'd2960445688);
    expect_eq("ADMAPP output sum", s_app, 8338834);
    expect_eq("ADMAPP checksum", longint'(w_app), 64'd1106253843);
    expect_eq("ADMAA  sq. error vs exact filter", se_aa_ref, 252362);
    expect_eq("ADMAPP sq. error vs exact filter", se_app_ref, 3103670);
    expect_eq("exact  sq. error vs clean image", se_ex_base, 3087881);
    expect_eq("ADMAA  sq. error vs clean image", se_aa_base, 3257759);
    expect_eq("ADMAPP sq. error vs clean image", se_app_base, 6211023);
    checks++;
    if (!(se_aa_ref < se_app_ref)) failures++;

    $display("vs clean image: exact MSE %0.2f PSNR %0.2f dB | ADMAA MSE %0.2f PSNR %0.2f dB | ADMAPP MSE %0.2f PSNR %0.2f dB",
             real'(se_ex_base) / nwin, psnr(se_ex_base, nwin),
             real'(se_aa_base) / nwin, psnr(se_aa_base, nwin),
             real'(se_app_base) / nwin, psnr(se_app_base, nwin));
    $display("vs exact filter: ADMAA MSE %0.3f, ADMAPP MSE %0.3f",
             real'(se_aa_ref) / nwin, real'(se_app_ref) / nwin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
