// tb_requant_enob: effective number of bits after word-length reduction
// by bus-splitting alone (16 bits to 8 bits, OSR = 64).
//
// The word-length reducer of ddsm_top (8/8 split, second-order EFM on the
// LSBs) runs beside a first-order variant of the same scheme. Both get a
// full-scale 16-bit sinusoid, x = round(32767.5 + 32767 sin(2 pi K0 n/NS)).
// Each NS-sample output record is Hann-windowed and the in-band DFT bins
// (0 .. NS / (2 OSR)) are evaluated; SNR is the power of the three bins
// around K0 over the other in-band bins (bins 0 .. 2 left out) and
// ENOB = (SNR_dB - 1.76) / 6.02. The noise model of the design method
// predicts 16.13 bits for the first-order and 18.95 bits for the
// second-order variant (the 16-bit word alone gives 19.0 at this OSR); the
// checks allow 0.35 bit around these values and require the second-order
// variant to be at least 2 bits better.
module tb_requant_enob;

  localparam int NS   = 1 << 17;
  localparam int OSR  = 64;
  localparam int NB   = NS / (2 * OSR);
  localparam int K0   = 37;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [15:0] x;

  logic signed [3:0] fn_y, dac_y;
  logic signed [1:0] fn_y_lsb, dac_y_lsb;
  logic signed [2:0] fn_y_isb, dac_y_isb;
  logic signed [9:0] rq_y, rq1_y;

  ddsm_top dut (
    .clk, .rst_n,
    .fn_en(1'b0), .fn_s(20'd0), .fn_dither_en(1'b0),
    .fn_y, .fn_y_lsb, .fn_y_isb,
    .dac_en(1'b0), .dac_x(16'd0), .dac_y, .dac_y_lsb, .dac_y_isb,
    .rq_en(en), .rq_x(x), .rq_y
  );

  split_requant #(.N_MSB(8), .N_LSB(8), .ORDER(1)) ref_l1 (
    .clk, .rst_n, .en, .x, .y(rq1_y));

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
    $display("%-36s %8.3f  (allowed %6.2f .. %6.2f)", what, v, lo, hi);
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
    real e1, e2;
    for (int n = 0; n < NS; n++) begin
      cos_t[n] = $cos(2.0 * PI * real'(n) / real'(NS));
      win[n]   = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(NS));
    end
    rst_n = 1'b0; en = 1'b0; x = 16'd32768;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1; en = 1'b1;
    for (int n = 0; n <= NS; n++) begin
      x = 16'($rtoi(32767.5 + 32767.0 * $sin(2.0 * PI * real'(K0) * real'(n % longint'(NS)) / real'(NS))));
      @(negedge clk);
      if (n >= 1) begin
        rec[0][n-1] = real'(rq_y);
        rec[1][n-1] = real'(rq1_y);
      end
    end
    e2 = enob_of(0);
    e1 = enob_of(1);
    check_range("ENOB 8/8 split, first-order EFM", e1, 15.78, 16.48);
    check_range("ENOB 8/8 split, second-order EFM", e2, 18.60, 19.30);
    check_range("ENOB gain of second over first order", e2 - e1, 2.0, 5.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
