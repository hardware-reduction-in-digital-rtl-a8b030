// tb_efm: self-checking testbench for the l-th order error feedback
// modulator.
//
// Three instances are driven side by side: EFM1 and EFM2 with a 6-bit
// quantizer and EFM3 with the full 20-bit quantizer. Each gets random
// inputs over the carry-extended range -1 .. 2^W + 2 and a random clock
// enable. A behavioural model written from the defining equations
//   v[n] = x[n] + sum_i h_i q[n-i],  y[n] = floor(v / 2^W),  q[n] = v mod 2^W,
// with the taps of 1 - (1 - z^-1)^l spelled out by hand, predicts y and q
// every cycle. The testbench also checks that the running sum of
// 2^W*y - x stays bounded (unity DC gain: the error is a difference of the
// stored residues) and that each output stays inside its overload-free
// range for plain W-bit inputs.
module tb_efm;

  localparam int unsigned WS = 6;    // quantizer width of EFM1 / EFM2
  localparam int unsigned WL = 20;   // quantizer width of EFM3
  localparam int NCYC = 20000;

  logic clk = 1'b0;
  logic rst_n;
  logic en;

  logic signed [WS+1:0] x1, x2;
  logic signed [WL+1:0] x3;
  logic signed [1:0] y1;
  logic signed [2:0] y2;
  logic signed [3:0] y3;
  logic [WS-1:0] q1, q2;
  logic [WL-1:0] q3;

  efm #(.ORDER(1), .W(WS), .XW(WS+2), .YW(2)) dut1 (.clk, .rst_n, .en, .x(x1), .y(y1), .q(q1));
  efm #(.ORDER(2), .W(WS), .XW(WS+2), .YW(3)) dut2 (.clk, .rst_n, .en, .x(x2), .y(y2), .q(q2));
  efm #(.ORDER(3), .W(WL), .XW(WL+2), .YW(4)) dut3 (.clk, .rst_n, .en, .x(x3), .y(y3), .q(q3));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // model state: residues of the last three enabled samples, per order
  longint qh [1:3][1:3];
  longint cum [1:3];   // running sum of 2^W*y - x
  longint ymin [1:3];
  longint ymax [1:3];

  function automatic longint tap(int order, int i);
    case (order)
      1: return (i == 1) ? 1 : 0;
      2: return (i == 1) ? 2 : (i == 2) ? -1 : 0;
      default: return (i == 1) ? 3 : (i == 2) ? -3 : 1;
    endcase
  endfunction

  task automatic check_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic step_model(int order, int w, longint x, longint y_dut, longint q_dut,
                            bit plain, bit enable);
    longint v, yr, qr, m;
    m = longint'(1) << w;
    v = x;
    for (int i = 1; i <= order; i++) v += tap(order, i) * qh[order][i];
    yr = (v >= 0) ? v / m : -((-v + m - 1) / m);   // floor division
    qr = v - yr * m;
    check_eq($sformatf("EFM%0d y", order), y_dut, yr);
    check_eq($sformatf("EFM%0d q", order), q_dut, qr);
    if (plain) begin
      if (yr < ymin[order]) ymin[order] = yr;
      if (yr > ymax[order]) ymax[order] = yr;
    end
    if (enable) begin
      for (int i = 3; i >= 2; i--) qh[order][i] = qh[order][i-1];
      qh[order][1] = qr;
      cum[order] += yr * m - x;
    end
  endtask

  // plain: a W-bit field; otherwise the field plus a carry of -1 .. hi,
  // the range the bus-splitting chain applies (hi = 1 into EFM1 / EFM2,
  // hi = 3 into EFM3)
  function automatic longint rand_in(int w, bit plain, int hi);
    longint m;
    m = longint'(1) << w;
    if (plain) return longint'({$urandom, $urandom}) & (m - 1);
    case ($urandom_range(0, 7))
      0: return -1;
      1: return m;
      2: return m - 1 + ((hi >= 2) ? 2 : 1);
      3: return m - 1 + longint'(hi);
      4: return m - 1;
      5: return 0;
      default: return longint'({$urandom, $urandom}) & (m - 1);
    endcase
  endfunction

  // watchdog
  initial begin
    repeat (NCYC * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit plain;
    longint xa, xb, xc;
    for (int o = 1; o <= 3; o++) begin
      for (int i = 1; i <= 3; i++) qh[o][i] = 0;
      cum[o] = 0; ymin[o] = 100; ymax[o] = -100;
    end
    rst_n = 1'b0; en = 1'b0; x1 = '0; x2 = '0; x3 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      plain = (n < NCYC / 2);
      en = ($urandom_range(0, 9) != 0);
      xa = rand_in(WS, plain, 1); xb = rand_in(WS, plain, 1); xc = rand_in(WL, plain, 3);
      x1 = (WS+2)'(xa); x2 = (WS+2)'(xb); x3 = (WL+2)'(xc);
      #1;
      step_model(1, WS, xa, longint'(y1), longint'(q1), plain, en);
      step_model(2, WS, xb, longint'(y2), longint'(q2), plain, en);
      step_model(3, WL, xc, longint'(y3), longint'(q3), plain, en);
      // cumulative DC error stays within a few quantizer steps
      for (int o = 1; o <= 3; o++) begin
        longint m;
        m = longint'(1) << ((o == 3) ? WL : WS);
        checks++;
        if (cum[o] > 8 * m || cum[o] < -8 * m) begin
          failures++;
          if (failures < 10) $display("FAIL EFM%0d running DC error %0d", o, cum[o]);
        end
      end
    end
    // overload-free output ranges for W-bit inputs, and that they were reached
    check_eq("EFM1 min y", ymin[1], 0);  check_eq("EFM1 max y", ymax[1], 1);
    check_eq("EFM2 min y", ymin[2], -1); check_eq("EFM2 max y", ymax[2], 2);
    checks++;
    if (ymin[3] < -3 || ymax[3] > 4) begin
      failures++; $display("FAIL EFM3 range %0d..%0d", ymin[3], ymax[3]);
    end
    $display("EFM3 output range seen: %0d..%0d", ymin[3], ymax[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
