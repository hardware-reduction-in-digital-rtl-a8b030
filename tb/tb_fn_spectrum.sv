// tb_fn_spectrum: low-frequency noise of the dithered bus-splitting
// modulators against a conventional 20-bit dithered EFM3.
//
// Zeroth-order dither, input 104857: the fractional-N channel of ddsm_top
// (nested 1-2-3, 7-7-6) and the 14-6 bus-splitting 1-3 EFM3 are compared
// with a conventional 20-bit EFM3. First-order dither, input 3277: the
// 11-9 bus-splitting 2-3 EFM3 is compared with a conventional 20-bit EFM3.
// All instances share the dither seed, so each pair sees the same dither.
// For every output record of NS samples (Hann window) the power in two
// bands is evaluated from the DFT bins:
//   low band  : bins 3 .. B   (below the corner where the shaped EFM3
//               noise meets the dither floor)
//   mid band  : bins B+1 .. 4B (shaped EFM3 noise dominates)
// with B = NS / (2 pi 2^(N/3)) for zeroth-order and NS / (2 pi 2^(N/2))
// for first-order dither (N = 20). A fifth instance, a 5-9-6 split that
// breaks the rule N_MSB > N/3, must show clearly more mid-band noise (at
// least 2 dB): it shows that the comparison can tell masked from unmasked
// lower-stage errors. If the lower stages' shaped errors are
// masked, as the word-length rules intend, the band powers of each
// bus-splitting design match the conventional one; the check allows 1 dB,
// and 2 dB for the first-order case, whose bands hold few bins and so give
// a coarser estimate.
// Bins 0 .. 2 are left out: with a finite record they hold the edge terms
// of the bounded running error, not noise. The record starts after WARM
// samples.
module tb_fn_spectrum;

  localparam int NS  = 1 << 18;
  localparam real PI = 3.14159265358979323846;
  localparam int B0  = int'(real'(NS) / (2.0 * PI * (2.0 ** (20.0 / 3.0))));
  localparam int B1  = int'(real'(NS) / (2.0 * PI * (2.0 ** 10.0)));
  localparam int WARM = 1024;
  localparam logic [22:0] SEED = 23'h5A5A5A;   // the top's default seed

  logic clk = 1'b0;
  logic rst_n;
  logic en;

  logic signed [3:0] y_top, y_c0, y_13, y_c1, y_23, y_bad;
  logic signed [1:0] l_top, l_c0, l_13, l_c1, l_23, l_bad;
  logic signed [2:0] i_top, i_c0, i_13, i_c1, i_23, i_bad;
  logic signed [3:0] dac_y;
  logic signed [1:0] dac_y_lsb;
  logic signed [2:0] dac_y_isb;
  logic signed [9:0] rq_y;

  ddsm_top dut (
    .clk, .rst_n,
    .fn_en(en), .fn_s(20'd104857), .fn_dither_en(1'b1),
    .fn_y(y_top), .fn_y_lsb(l_top), .fn_y_isb(i_top),
    .dac_en(1'b0), .dac_x(16'd0), .dac_y, .dac_y_lsb, .dac_y_isb,
    .rq_en(1'b0), .rq_x(16'd0), .rq_y
  );
  dithered_bs_efm3 #(.N_MSB(20), .N_ISB(0), .N_LSB(0), .R(0), .SEED(SEED)) conv0 (
    .clk, .rst_n, .en, .s(20'd104857), .dither_en(1'b1), .y(y_c0), .y_lsb(l_c0), .y_isb(i_c0));
  dithered_bs_efm3 #(.N_MSB(14), .N_ISB(0), .N_LSB(6), .R(0), .SEED(SEED)) bs13 (
    .clk, .rst_n, .en, .s(20'd104857), .dither_en(1'b1), .y(y_13), .y_lsb(l_13), .y_isb(i_13));
  // a split that breaks the masking rule N_MSB > N/3 (5 < 20/3)
  dithered_bs_efm3 #(.N_MSB(5), .N_ISB(9), .N_LSB(6), .R(0), .SEED(SEED)) bad (
    .clk, .rst_n, .en, .s(20'd104857), .dither_en(1'b1), .y(y_bad), .y_lsb(l_bad), .y_isb(i_bad));
  dithered_bs_efm3 #(.N_MSB(20), .N_ISB(0), .N_LSB(0), .R(1), .SEED(SEED)) conv1 (
    .clk, .rst_n, .en, .s(20'd3277), .dither_en(1'b1), .y(y_c1), .y_lsb(l_c1), .y_isb(i_c1));
  dithered_bs_efm3 #(.N_MSB(11), .N_ISB(9), .N_LSB(0), .R(1), .SEED(SEED)) bs23 (
    .clk, .rst_n, .en, .s(20'd3277), .dither_en(1'b1), .y(y_23), .y_lsb(l_23), .y_isb(i_23));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  real rec [6][NS];
  real cos_t [NS];
  real win [NS];

  // power summed over DFT bins lo .. hi of record r (mean removed)
  function automatic real band_power(int r, int lo, int hi);
    real re, im, p, mean;
    int idx;
    mean = 0.0;
    for (int n = 0; n < NS; n++) mean += rec[r][n];
    mean = mean / real'(NS);
    p = 0.0;
    for (int k = lo; k <= hi; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NS; n++) begin
        idx = int'((longint'(k) * n) % longint'(NS));
        re += (rec[r][n] - mean) * win[n] * cos_t[idx];
        im += (rec[r][n] - mean) * win[n] * cos_t[(idx + NS / 4) % NS];
      end
      p += re * re + im * im;
    end
    return p;
  endfunction

  task automatic compare(string what, int r_bs, int r_ref, int lo, int hi,
                         real db_lo = -1.0, real db_hi = 1.0);
    real pb, pr, db;
    pb = band_power(r_bs, lo, hi);
    pr = band_power(r_ref, lo, hi);
    db = 10.0 * $log10(pb / pr);
    checks++;
    $display("%-40s bins %4d..%4d : %6.2f dB against conventional (%g %g)", what, lo, hi, db, pb, pr);
    if (db > db_hi || db < db_lo) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (NS + WARM + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      cos_t[n] = $cos(2.0 * PI * real'(n) / real'(NS));
      win[n]   = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(NS));
    end
    rst_n = 1'b0; en = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1; en = 1'b1;
    repeat (WARM) @(negedge clk);   // let the start-up transient pass
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      rec[0][n] = real'(y_top);
      rec[1][n] = real'(y_c0);
      rec[2][n] = real'(y_13);
      rec[3][n] = real'(y_c1);
      rec[4][n] = real'(y_23);
      rec[5][n] = real'(y_bad);
    end
    $display("corner bins: zeroth-order dither %0d, first-order dither %0d", B0, B1);
    compare("7-7-6 1-2-3, R=0, low band", 0, 1, 3, B0);
    compare("7-7-6 1-2-3, R=0, mid band", 0, 1, B0 + 1, 4 * B0);
    compare("14-6 1-3, R=0, low band", 2, 1, 3, B0);
    compare("14-6 1-3, R=0, mid band", 2, 1, B0 + 1, 4 * B0);
    compare("11-9 2-3, R=1, low band", 4, 3, 3, B1, -2.0, 2.0);
    compare("11-9 2-3, R=1, mid band", 4, 3, B1 + 1, 4 * B1, -2.0, 2.0);
    // the masking rule matters: the 5-9-6 split must show its EFM2 noise
    compare("5-9-6 1-2-3 (rule broken), mid band", 5, 1, B0 + 1, 4 * B0, 2.0, 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
