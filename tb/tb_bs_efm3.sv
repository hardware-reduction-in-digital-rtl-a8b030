// tb_bs_efm3: self-checking testbench for the bus-splitting EFM3.
//
// Four 20-bit instances run from the same random input word and dither:
//   cfg 0: nested 1-2-3, 7-7-6 (the default)
//   cfg 1: 1-3, N_MSB = 14, N_LSB = 6
//   cfg 2: 2-3, N_MSB = 11, N_ISB = 9
//   cfg 3: conventional 20-bit EFM3 (no splitting)
// A behavioural model of the chain (field split, per-stage EFM recursion
// with floor division, carry added to the next field) predicts y, y_lsb
// and y_isb one enabled cycle after the input. The testbench also checks
// that each instance has unity DC gain (the running sum of
// 2^20*y - x - dither stays bounded), that the output stays in -3..4 and
// that the low-order stages produced each carry value they can produce.
module tb_bs_efm3;

  localparam int NCYC = 40000;
  localparam int NCFG = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [19:0] x;
  logic signed [1:0] dith;

  logic signed [3:0] y     [NCFG];
  logic signed [1:0] y_lsb [NCFG];
  logic signed [2:0] y_isb [NCFG];

  bs_efm3 #(.N_MSB(7),  .N_ISB(7), .N_LSB(6)) dut0 (.clk, .rst_n, .en, .x, .dith,
    .y(y[0]), .y_lsb(y_lsb[0]), .y_isb(y_isb[0]));
  bs_efm3 #(.N_MSB(14), .N_ISB(0), .N_LSB(6)) dut1 (.clk, .rst_n, .en, .x, .dith,
    .y(y[1]), .y_lsb(y_lsb[1]), .y_isb(y_isb[1]));
  bs_efm3 #(.N_MSB(11), .N_ISB(9), .N_LSB(0)) dut2 (.clk, .rst_n, .en, .x, .dith,
    .y(y[2]), .y_lsb(y_lsb[2]), .y_isb(y_isb[2]));
  bs_efm3 #(.N_MSB(20), .N_ISB(0), .N_LSB(0)) dut3 (.clk, .rst_n, .en, .x, .dith,
    .y(y[3]), .y_lsb(y_lsb[3]), .y_isb(y_isb[3]));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  int nm [NCFG] = '{7, 14, 11, 20};
  int ni [NCFG] = '{7, 0, 9, 0};
  int nl [NCFG] = '{6, 6, 0, 0};

  longint hist [NCFG][1:3][1:3];   // [cfg][stage order][delay]
  longint exp_y [NCFG], exp_l [NCFG], exp_i [NCFG];
  longint cum [NCFG];
  int     seen_l [NCFG][-1:1];
  int     seen_i [NCFG][-1:3];
  int     seen_y [NCFG][-3:4];

  function automatic longint fdiv(longint v, longint m);
    return (v >= 0) ? v / m : -((-v + m - 1) / m);
  endfunction

  // one EFM stage of the given order; updates the residue history when en
  function automatic longint stage(int c, int order, int w, longint xin, bit enable);
    longint v, m, yy;
    m = longint'(1) << w;
    case (order)
      1: v = xin + hist[c][1][1];
      2: v = xin + 2 * hist[c][2][1] - hist[c][2][2];
      default: v = xin + 3 * hist[c][3][1] - 3 * hist[c][3][2] + hist[c][3][3];
    endcase
    yy = fdiv(v, m);
    if (enable) begin
      hist[c][order][3] = hist[c][order][2];
      hist[c][order][2] = hist[c][order][1];
      hist[c][order][1] = v - yy * m;
    end
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

  initial begin
    longint xv, dv, carry, y1v, y2v, y3v, xl, xi, xm;
    for (int c = 0; c < NCFG; c++) begin
      foreach (hist[c][o, d]) hist[c][o][d] = 0;
      exp_y[c] = 0; exp_l[c] = 0; exp_i[c] = 0; cum[c] = 0;
      foreach (seen_l[c][k]) seen_l[c][k] = 0;
      foreach (seen_i[c][k]) seen_i[c][k] = 0;
      foreach (seen_y[c][k]) seen_y[c][k] = 0;
    end
    rst_n = 1'b0; en = 1'b0; x = '0; dith = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      // registered outputs reflect the last enabled sample
      for (int c = 0; c < NCFG; c++) begin
        check_eq($sformatf("cfg%0d y", c), longint'(y[c]), exp_y[c]);
        check_eq($sformatf("cfg%0d y_lsb", c), longint'(y_lsb[c]), exp_l[c]);
        check_eq($sformatf("cfg%0d y_isb", c), longint'(y_isb[c]), exp_i[c]);
      end
      en = ($urandom_range(0, 7) != 0);
      // input: slowly drifting ramps, random words and the extremes
      case ((n / 5000) % 4)
        0: xv = longint'($urandom) & 64'hFFFFF;
        1: xv = (longint'(n) * 37) & 64'hFFFFF;
        2: xv = ($urandom_range(0, 1) != 0) ? 64'hFFFFF : 0;
        default: xv = 104857;
      endcase
      dv = longint'($urandom_range(0, 2)) - 1;
      x = 20'(xv); dith = 2'(dv);
      for (int c = 0; c < NCFG; c++) begin
        xl = xv & ((longint'(1) << nl[c]) - 1);
        xi = (xv >> nl[c]) & ((longint'(1) << ni[c]) - 1);
        xm = xv >> (nl[c] + ni[c]);
        carry = dv;
        y1v = 0; y2v = 0;
        if (nl[c] > 0) begin y1v = stage(c, 1, nl[c], xl + carry, en); carry = y1v; end
        if (ni[c] > 0) begin y2v = stage(c, 2, ni[c], xi + carry, en); carry = y2v; end
        y3v = stage(c, 3, nm[c], xm + carry, en);
        if (en) begin
          exp_y[c] = y3v; exp_l[c] = y1v; exp_i[c] = y2v;
          cum[c] += (y3v << 20) - xv - dv;
          seen_l[c][int'(y1v)]++; seen_i[c][int'(y2v)]++;
          if (y3v >= -3 && y3v <= 4) seen_y[c][int'(y3v)]++;
          checks++;
          if (y3v < -3 || y3v > 4 || cum[c] > (longint'(8) << 20) || cum[c] < -(longint'(8) << 20)) begin
            failures++;
            if (failures < 10) $display("FAIL cfg%0d range/DC: y=%0d cum=%0d", c, y3v, cum[c]);
          end
        end
      end
    end
    // the low-order stages must have produced their full carry alphabets
    for (int k = -1; k <= 1; k++) begin
      checks++; if (seen_l[0][k] == 0) begin failures++; $display("FAIL EFM1 carry %0d never seen", k); end
    end
    for (int k = -1; k <= 2; k++) begin
      checks++; if (seen_i[0][k] == 0) begin failures++; $display("FAIL EFM2 carry %0d never seen", k); end
    end
    for (int k = -3; k <= 4; k++) begin
      $display("cfg0 y=%0d count %0d", k, seen_y[0][k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
