// tb_ddsm_top: end-to-end testbench of the two-channel modulator top at
// its default parameters (fractional-N channel 7-7-6 with zeroth-order
// dither, DAC channel 5-6-5 without dither, 8/8 word-length reducer with a
// second-order EFM).
//
// Fractional-N channel: constant words (104857, half scale, 0, full scale)
// with the dither switched on and off, then random words. DAC channel: a
// full-scale 16-bit sinusoid in offset binary, period 1000 samples, then
// random words. The word-length reducer gets the DAC words with a fixed
// bit pattern flipped. All sample enables drop at random. A behavioural model of
// the LFSR dither and of each EFM stage predicts every output bit-exactly,
// one enabled cycle late, and the running sum of 2^N*y - x - d must stay
// bounded (unity DC gain). The testbench counts each mechanism of the design
// and fails if one never happened: dither active and inactive, each carry
// value of EFM1 (0, 1) and EFM2 (-1 .. 2), both extremes of the 4-bit
// output (-3 and 4), the extreme carries (-1, 2) of the reducer's
// second-order EFM, and a held sample on each channel.
module tb_ddsm_top;

  localparam int NCYC = 60000;

  logic clk = 1'b0;
  logic rst_n;
  logic fn_en, fn_dither_en, dac_en;
  logic [19:0] fn_s;
  logic [15:0] dac_x;
  logic signed [3:0] fn_y, dac_y;
  logic signed [1:0] fn_y_lsb, dac_y_lsb;
  logic signed [2:0] fn_y_isb, dac_y_isb;
  logic rq_en;
  logic [15:0] rq_x;
  logic signed [9:0] rq_y;

  ddsm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  longint fh1 [1:3], fh2 [1:3], fh3 [1:3];
  longint dh1 [1:3], dh2 [1:3], dh3 [1:3];
  longint rh [1:3];
  longint f_ey, f_el, f_ei, d_ey, d_el, d_ei, f_cum, d_cum, r_ey, r_cum;

  // mechanism counters
  int n_dither_on, n_dither_off, n_fn_hold, n_dac_hold;
  int n_c1 [0:1];
  int n_c2 [-1:2];
  int n_ymin, n_ymax, n_rq_hold;
  int n_rq_c [-1:2];

  function automatic longint fdiv(longint v, longint m);
    return (v >= 0) ? v / m : -((-v + m - 1) / m);
  endfunction

  function automatic longint efm_step(int order, int w, longint xin, ref longint h [1:3], input bit enable);
    longint v, m, yy;
    m = longint'(1) << w;
    case (order)
      1: v = xin + h[1];
      2: v = xin + 2 * h[1] - h[2];
      default: v = xin + 3 * h[1] - 3 * h[2] + h[3];
    endcase
    yy = fdiv(v, m);
    if (enable) begin h[3] = h[2]; h[2] = h[1]; h[1] = v - yy * m; end
    return yy;
  endfunction

  task automatic check_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check_count(string what, int cnt);
    checks++;
    $display("mechanism %-28s : %0d", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (NCYC * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [22:0] lf;
    longint sv, xv, d, y1v, y2v, y3v;
    real ph;
    lf = 23'h5A5A5A;   // default seed of the top
    foreach (fh1[k]) begin fh1[k] = 0; fh2[k] = 0; fh3[k] = 0; dh1[k] = 0; dh2[k] = 0; dh3[k] = 0; end
    f_ey = 0; f_el = 0; f_ei = 0; d_ey = 0; d_el = 0; d_ei = 0; f_cum = 0; d_cum = 0;
    foreach (rh[k]) rh[k] = 0;
    r_ey = 0; r_cum = 0; n_rq_hold = 0; n_rq_c = '{0, 0, 0, 0};
    n_dither_on = 0; n_dither_off = 0; n_fn_hold = 0; n_dac_hold = 0;
    n_c1 = '{0, 0}; n_c2 = '{0, 0, 0, 0}; n_ymin = 0; n_ymax = 0;
    rq_en = 1'b0; rq_x = '0;
    rst_n = 1'b0; fn_en = 1'b0; dac_en = 1'b0; fn_dither_en = 1'b0; fn_s = '0; dac_x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      check_eq("fn_y", longint'(fn_y), f_ey);
      check_eq("fn_y_lsb", longint'(fn_y_lsb), f_el);
      check_eq("fn_y_isb", longint'(fn_y_isb), f_ei);
      check_eq("dac_y", longint'(dac_y), d_ey);
      check_eq("dac_y_lsb", longint'(dac_y_lsb), d_el);
      check_eq("dac_y_isb", longint'(dac_y_isb), d_ei);
      check_eq("rq_y", longint'(rq_y), r_ey);

      // ---- stimulus ------------------------------------------------------
      fn_en  = ($urandom_range(0, 19) != 0);
      dac_en = ($urandom_range(0, 19) != 0);
      if (n < NCYC / 2) begin
        case ((n / 3000) % 4)
          0: sv = 104857;
          1: sv = 64'h80000;
          2: sv = 0;
          default: sv = 64'hFFFFF;
        endcase
        fn_dither_en = ((n / 1500) % 2) == 1;
        ph = 2.0 * 3.14159265358979 * real'(n % 1000) / 1000.0;
        xv = 32768 + longint'($rtoi(32767.0 * $sin(ph) + 32768.5)) - 32768;
      end else begin
        sv = longint'($urandom) & 64'hFFFFF;
        xv = longint'($urandom) & 64'hFFFF;
        fn_dither_en = $urandom_range(0, 1) != 0;
      end
      fn_s = 20'(sv); dac_x = 16'(xv);
      rq_en = ($urandom_range(0, 19) != 0);
      rq_x = dac_x ^ 16'h0F0F;

      // ---- model: word-length reducer, 8/8 split, second-order EFM -------
      y1v = (longint'(rq_x) & 255) + 2 * rh[1] - rh[2];
      y2v = fdiv(y1v, 256);
      if (rq_en) begin
        rh[2] = rh[1]; rh[1] = y1v - 256 * y2v;
        r_ey = (longint'(rq_x) >> 8) + y2v;
        r_cum += 256 * r_ey - longint'(rq_x);
        if (y2v >= -1 && y2v <= 2) n_rq_c[int'(y2v)]++;
      end else n_rq_hold++;

      // ---- model: fractional-N channel, 7-7-6 with R = 0 dither ----------
      d = fn_dither_en ? longint'(lf[22]) : 0;
      y1v = efm_step(1, 6, (sv & 63) + d, fh1, fn_en);
      y2v = efm_step(2, 7, ((sv >> 6) & 127) + y1v, fh2, fn_en);
      y3v = efm_step(3, 7, (sv >> 13) + y2v, fh3, fn_en);
      if (fn_en) begin
        f_ey = y3v; f_el = y1v; f_ei = y2v;
        f_cum += (y3v << 20) - sv - d;
        lf = {lf[21:0], lf[22] ^ lf[17]};
        if (fn_dither_en) n_dither_on++; else n_dither_off++;
        if (y1v >= 0 && y1v <= 1) n_c1[int'(y1v)]++;
        if (y2v >= -1 && y2v <= 2) n_c2[int'(y2v)]++;
        if (y3v == -3) n_ymin++;
        if (y3v == 4) n_ymax++;
      end else n_fn_hold++;

      // ---- model: DAC channel, 5-6-5, no dither ----------------------------
      y1v = efm_step(1, 5, xv & 31, dh1, dac_en);
      y2v = efm_step(2, 6, ((xv >> 5) & 63) + y1v, dh2, dac_en);
      y3v = efm_step(3, 5, (xv >> 11) + y2v, dh3, dac_en);
      if (dac_en) begin
        d_ey = y3v; d_el = y1v; d_ei = y2v;
        d_cum += (y3v << 16) - xv;
        if (y3v == -3) n_ymin++;
        if (y3v == 4) n_ymax++;
      end else n_dac_hold++;

      checks++;
      if (f_cum > (longint'(8) << 20) || f_cum < -(longint'(8) << 20) ||
          d_cum > (longint'(8) << 16) || d_cum < -(longint'(8) << 16) ||
          r_cum > 8 * 256 || r_cum < -8 * 256) begin
        failures++;
        if (failures < 10) $display("FAIL running DC error fn=%0d dac=%0d rq=%0d", f_cum, d_cum, r_cum);
      end
    end
    check_count("dither on (fn)", n_dither_on);
    check_count("dither off (fn)", n_dither_off);
    check_count("EFM1 carry 0 (fn)", n_c1[0]);
    check_count("EFM1 carry 1 (fn)", n_c1[1]);
    check_count("EFM2 carry -1 (fn)", n_c2[-1]);
    check_count("EFM2 carry 0 (fn)", n_c2[0]);
    check_count("EFM2 carry 1 (fn)", n_c2[1]);
    check_count("EFM2 carry 2 (fn)", n_c2[2]);
    check_count("output at -3", n_ymin);
    check_count("output at 4", n_ymax);
    check_count("sample held (fn_en low)", n_fn_hold);
    check_count("sample held (dac_en low)", n_dac_hold);
    check_count("reducer carry -1", n_rq_c[-1]);
    check_count("reducer carry 2", n_rq_c[2]);
    check_count("sample held (rq_en low)", n_rq_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
