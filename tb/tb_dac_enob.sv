// tb_dac_enob: effective number of bits of the DAC channel for a
// full-scale 16-bit sinusoid at an oversampling ratio of 128.
//
// The DAC channel of ddsm_top (nested 1-2-3 EFM3, 5-6-5) runs beside two
// reference modulators fed with the same samples: a conventional 16-bit
// EFM3 and the 10-6 bus-splitting 1-3 EFM3. The input is a full-scale
// sinusoid, x = round(32767.5 + 32767 sin(2 pi K0 n / NS)), coherent with
// the NS-point record. Each output record is Hann-windowed and only the
// in-band DFT bins (0 .. NS / (2 OSR)) are evaluated, from a cosine table.
// The SNR is the power of the three bins around K0 over the power of the
// remaining in-band bins (the three bins at DC, which carry the offset of
// the offset-binary code, are left out), and ENOB = (SNR_dB - 1.76) / 6.02.
// Expected from the noise model of the design method: 19.41 (16-bit),
// 19.02 (10-6) and 19.14 (5-6-5) bits; the checks allow 0.35 bit around
// those values and require the 5-6-5 design to lose less than 0.6 bit
// against the conventional modulator.
module tb_dac_enob;

  localparam int NS   = 1 << 20;        // record length
  localparam int OSR  = 128;
  localparam int NB   = NS / (2 * OSR); // last in-band bin
  localparam int K0   = 293;            // signal bin
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [15:0] x;

  // design under test: the top's DAC channel (fractional-N channel idle)
  logic signed [3:0] fn_y, dac_y;
  logic signed [1:0] fn_y_lsb, dac_y_lsb;
  logic signed [2:0] fn_y_isb, dac_y_isb;
  logic signed [9:0] rq_y;
  ddsm_top dut (
    .clk, .rst_n,
    .fn_en(1'b0), .fn_s(20'd0), .fn_dither_en(1'b0),
    .fn_y, .fn_y_lsb, .fn_y_isb,
    .dac_en(en), .dac_x(x), .dac_y, .dac_y_lsb, .dac_y_isb,
    .rq_en(1'b0), .rq_x(16'd0), .rq_y
  );

  // references: conventional 16-bit EFM3 and 10-6 bus-splitting 1-3 EFM3
  logic signed [3:0] yc, y13;
  logic signed [1:0] lc, l13;
  logic signed [2:0] ic, i13;
  bs_efm3 #(.N_MSB(16), .N_ISB(0), .N_LSB(0)) ref_conv (
    .clk, .rst_n, .en, .x, .dith(2'sd0), .y(yc), .y_lsb(lc), .y_isb(ic));
  bs_efm3 #(.N_MSB(10), .N_ISB(0), .N_LSB(6)) ref_13 (
    .clk, .rst_n, .en, .x, .dith(2'sd0), .y(y13), .y_lsb(l13), .y_isb(i13));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  real rec [3][NS];
  real cos_t [NS];
  real win [NS];

  function automatic real enob_of(int r);
    real ps, pn, re, im, p;
    int idx;
    ps = 0.0; pn = 0.0;
    for (int k = 3; k <= NB; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NS; n++) begin
        idx = int'((longint'(k) * n) % longint'(NS));
        re += rec[r][n] * win[n] * cos_t[idx];
        im += rec[r][n] * win[n] * cos_t[(idx + NS / 4) % NS];
      end
      p = re * re + im * im;
      if (k >= K0 - 1 && k <= K0 + 1) ps += p; else pn += p;
    end
    return (10.0 * $log10(ps / pn) - 1.76) / 6.02;
  endfunction

  task automatic check_range(string what, real v, real lo, real hi);
    checks++;
    $display("%-34s %8.3f  (allowed %6.2f .. %6.2f)", what, v, lo, hi);
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e_565, e_conv, e_13;
    for (int n = 0; n < NS; n++) begin
      cos_t[n] = $cos(2.0 * PI * real'(n) / real'(NS));
      win[n]   = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(NS));
    end
    rst_n = 1'b0; en = 1'b0; x = 16'd32768;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1; en = 1'b1;
    // one extra sample to fill the output register, then NS samples
    for (int n = 0; n <= NS; n++) begin
      x = 16'($rtoi(32767.5 + 32767.0 * $sin(2.0 * PI * real'(K0) * real'(n) / real'(NS))));
      @(negedge clk);
      if (n >= 1) begin
        rec[0][n-1] = real'(dac_y);
        rec[1][n-1] = real'(yc);
        rec[2][n-1] = real'(y13);
      end
    end
    e_565  = enob_of(0);
    e_conv = enob_of(1);
    e_13   = enob_of(2);
    check_range("ENOB conventional 16-bit EFM3", e_conv, 19.06, 19.76);
    check_range("ENOB 10-6 bus-splitting 1-3 EFM3", e_13, 18.67, 19.37);
    check_range("ENOB 5-6-5 nested 1-2-3 EFM3 (top)", e_565, 18.79, 19.49);
    check_range("ENOB loss of 5-6-5 vs conventional", e_conv - e_565, -0.2, 0.6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
