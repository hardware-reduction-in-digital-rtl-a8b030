// tb_dac_osr32: effective number of bits of the DAC channel when the
// oversampling ratio is cut to 32.
//
// At OSR = 32 the rising third-order noise of the EFM3 no longer stays
// below the floor of the 16-bit sinusoid: it dominates the band, and the
// ENOB falls to about 14 bits (noise model of the design method: 13.96).
// This shows why the DAC channel needs OSR of about 128. The DAC channel
// of ddsm_top (nested 1-2-3 EFM3, 5-6-5) runs beside a conventional 16-bit
// EFM3 fed with the same samples. The input is a full-scale sinusoid,
// x = round(32767.5 + 32767 sin(2 pi K0 n / NS)), coherent with the
// NS-point record. Each record is Hann-windowed and only the in-band DFT
// bins (0 .. NS / (2 OSR)) are evaluated, from a cosine table. The SNR is
// the power of the three bins around K0 over the power of the remaining
// in-band bins, leaving out the three bins at DC, and
// ENOB = (SNR_dB - 1.76) / 6.02. The checks allow 0.35 bit around 13.96
// for both modulators: the extra noise of the lower stages is masked.
module tb_dac_osr32;

  localparam int NS   = 1 << 16;        // record length
  localparam int OSR  = 32;
  localparam int NB   = NS / (2 * OSR); // last in-band bin
  localparam int K0   = 73;             // signal bin
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

  // reference: conventional 16-bit EFM3
  logic signed [3:0] yc;
  logic signed [1:0] lc;
  logic signed [2:0] ic;
  bs_efm3 #(.N_MSB(16), .N_ISB(0), .N_LSB(0)) ref_conv (
    .clk, .rst_n, .en, .x, .dith(2'sd0), .y(yc), .y_lsb(lc), .y_isb(ic));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  real rec [2][NS];
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
    real e_565, e_conv;
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
      end
    end
    e_565  = enob_of(0);
    e_conv = enob_of(1);
    check_range("ENOB conventional 16-bit EFM3", e_conv, 13.61, 14.31);
    check_range("ENOB 5-6-5 nested 1-2-3 EFM3 (top)", e_565, 13.61, 14.31);
    check_range("ENOB loss of 5-6-5 vs conventional", e_conv - e_565, -0.2, 0.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
