// tb_dithered_bs_efm3: self-checking testbench for the dithered
// bus-splitting EFM3.
//
// Two instances with a 20-bit input:
//   A: nested 1-2-3, 7-7-6, zeroth-order dither (R = 0, the default)
//   B: 2-3, 11-9, first-order shaped dither (R = 1)
// The input s steps through constants (104857 and 3277, the values used
// for the spectra of the described design, plus 0 and half scale) while
// dither_en is switched on and off. A model of the LFSR, the dither shaping
// and the stage chain predicts y, y_lsb and y_isb bit-exactly, one enabled
// cycle late. The testbench also checks that the average output equals
// (s + d)/2^20 (running error bounded) and, for the half-scale constant
// input, that the undithered modulator falls into a short limit cycle (a
// tone) while the dithered one does not repeat within the window.
module tb_dithered_bs_efm3;

  localparam int NSEG = 8;
  localparam int SEGLEN = 6000;
  localparam int NCYC = NSEG * SEGLEN;
  localparam logic [22:0] SEED = 23'h5A5A5A;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [19:0] s;
  logic dither_en;
  logic signed [3:0] ya, yb;
  logic signed [1:0] la, lb;
  logic signed [2:0] ia, ib;

  dithered_bs_efm3 #(.N_MSB(7), .N_ISB(7), .N_LSB(6), .R(0), .SEED(SEED)) dut_a (
    .clk, .rst_n, .en, .s, .dither_en, .y(ya), .y_lsb(la), .y_isb(ia));
  dithered_bs_efm3 #(.N_MSB(11), .N_ISB(9), .N_LSB(0), .R(1), .SEED(SEED)) dut_b (
    .clk, .rst_n, .en, .s, .dither_en, .y(yb), .y_lsb(lb), .y_isb(ib));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // model state, index 0 = A, 1 = B
  longint h1 [2][1:3], h2 [2][1:3], h3 [2][1:3];
  longint ey [2], el [2], ei [2], cum [2];

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

  initial begin
    repeat (NCYC * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // limit-cycle detection on instance A: the last 64 outputs of a segment
  // compared with the 64 outputs one candidate period earlier
  longint hist_a [0:SEGLEN-1];
  int     seg_cnt;
  int     periodic_undithered = 0;
  int     aperiodic_dithered  = 0;

  function automatic bit has_period(int len, int maxp);
    for (int p = 1; p <= maxp; p++) begin
      bit same = 1'b1;
      for (int k = len - 64; k < len; k++) if (hist_a[k] != hist_a[k-p]) same = 1'b0;
      if (same) return 1'b1;
    end
    return 1'b0;
  endfunction

  initial begin
    bit [22:0] lf;
    int dbit, dprev;
    longint sv, da, db, c, ya_m, yb_m, y1v, y2v;
    lf = SEED; dprev = 0;
    for (int k = 0; k < 2; k++) begin
      foreach (h1[k][d]) begin h1[k][d] = 0; h2[k][d] = 0; h3[k][d] = 0; end
      ey[k] = 0; el[k] = 0; ei[k] = 0; cum[k] = 0;
    end
    rst_n = 1'b0; en = 1'b0; s = '0; dither_en = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int seg = 0; seg < NSEG; seg++) begin
      case (seg % 4)
        0: sv = 104857;
        1: sv = 3277;
        2: sv = 64'h80000;
        default: sv = 0;
      endcase
      seg_cnt = 0;
      for (int n = 0; n < SEGLEN; n++) begin
        @(negedge clk);
        check_eq("A y", longint'(ya), ey[0]);  check_eq("A y_lsb", longint'(la), el[0]);
        check_eq("A y_isb", longint'(ia), ei[0]);
        check_eq("B y", longint'(yb), ey[1]);  check_eq("B y_lsb", longint'(lb), el[1]);
        check_eq("B y_isb", longint'(ib), ei[1]);
        // segments 0-3 undithered, 4-7 dithered; en mostly high
        dither_en = (seg >= 4);
        en = ($urandom_range(0, 15) != 0);
        s = 20'(sv);
        dbit = int'(lf[22]);
        da = dither_en ? longint'(dbit) : 0;
        db = dither_en ? longint'(dbit) - longint'(dprev) : 0;
        // A: 1-2-3, 7-7-6
        y1v = efm_step(1, 6, (sv & 63) + da, h1[0], en);
        y2v = efm_step(2, 7, ((sv >> 6) & 127) + y1v, h2[0], en);
        ya_m = efm_step(3, 7, (sv >> 13) + y2v, h3[0], en);
        if (en) begin ey[0] = ya_m; el[0] = y1v; ei[0] = y2v; end
        // B: 2-3, 11-9
        c = efm_step(2, 9, (sv & 511) + db, h2[1], en);
        yb_m = efm_step(3, 11, (sv >> 9) + c, h3[1], en);
        if (en) begin ey[1] = yb_m; el[1] = 0; ei[1] = c; end
        if (en) begin
          cum[0] += (ya_m << 20) - sv - da;
          cum[1] += (yb_m << 20) - sv - db;
          for (int k = 0; k < 2; k++) begin
            checks++;
            if (cum[k] > (longint'(8) << 20) || cum[k] < -(longint'(8) << 20)) begin
              failures++;
              if (failures < 10) $display("FAIL DC error inst %0d: %0d", k, cum[k]);
            end
          end
          hist_a[seg_cnt] = ya_m; seg_cnt++;
          dprev = dbit;
          lf = {lf[21:0], lf[22] ^ lf[17]};
        end
      end
      // tone behaviour for the half-scale segments
      if (sv == 64'h80000) begin
        if (seg < 4 && has_period(seg_cnt, 2048)) periodic_undithered++;
        if (seg >= 4 && !has_period(seg_cnt, 2048)) aperiodic_dithered++;
      end
    end
    check_eq("undithered constant input settles to a limit cycle", periodic_undithered, 1);
    check_eq("dithered constant input shows no short cycle", aperiodic_dithered, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
