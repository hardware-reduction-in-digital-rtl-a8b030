// tb_split_requant: self-checking testbench for the bus-splitting word-
// length reducer.
//
// Three instances (8/8 split with first-, second- and third-order EFM on
// the LSBs) get the same random 16-bit words and a random clock enable. A
// model of the EFM recursion on the lower field predicts the output
// X_MSB + carry one enabled cycle late. The testbench also checks that the
// running sum of 2^8*y - x stays bounded (no DC error from dropping the
// LSBs) and that the second-order carry took each of its values -1 .. 2.
module tb_split_requant;

  localparam int NCYC = 30000;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [15:0] x;
  logic signed [9:0] y [1:3];

  split_requant #(.N_MSB(8), .N_LSB(8), .ORDER(1)) dut1 (.clk, .rst_n, .en, .x, .y(y[1]));
  split_requant #(.N_MSB(8), .N_LSB(8), .ORDER(2)) dut2 (.clk, .rst_n, .en, .x, .y(y[2]));
  split_requant #(.N_MSB(8), .N_LSB(8), .ORDER(3)) dut3 (.clk, .rst_n, .en, .x, .y(y[3]));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  longint h [1:3][1:3];
  longint ey [1:3];
  longint cum [1:3];
  int     seen2 [-1:2];

  function automatic longint fdiv(longint v, longint m);
    return (v >= 0) ? v / m : -((-v + m - 1) / m);
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
    longint xv, v, c;
    foreach (h[o, d]) h[o][d] = 0;
    foreach (ey[o]) begin ey[o] = 0; cum[o] = 0; end
    foreach (seen2[k]) seen2[k] = 0;
    rst_n = 1'b0; en = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      for (int o = 1; o <= 3; o++) check_eq($sformatf("order %0d y", o), longint'(y[o]), ey[o]);
      en = ($urandom_range(0, 9) != 0);
      case ((n / 10000) % 3)
        0: xv = longint'($urandom_range(0, 65535));
        1: xv = 32768 + longint'($rtoi(32767.0 * $sin(real'(n) / 50.0)));
        default: xv = ($urandom_range(0, 1) != 0) ? 65535 : longint'($urandom_range(0, 255));
      endcase
      x = 16'(xv);
      if (en) begin
        for (int o = 1; o <= 3; o++) begin
          case (o)
            1: v = (xv & 255) + h[o][1];
            2: v = (xv & 255) + 2 * h[o][1] - h[o][2];
            default: v = (xv & 255) + 3 * h[o][1] - 3 * h[o][2] + h[o][3];
          endcase
          c = fdiv(v, 256);
          h[o][3] = h[o][2]; h[o][2] = h[o][1]; h[o][1] = v - 256 * c;
          ey[o] = (xv >> 8) + c;
          cum[o] += 256 * ey[o] - xv;
          if (o == 2 && c >= -1 && c <= 2) seen2[int'(c)]++;
          checks++;
          if (cum[o] > 8 * 256 || cum[o] < -8 * 256) begin
            failures++;
            if (failures < 10) $display("FAIL order %0d running DC error %0d", o, cum[o]);
          end
        end
      end
    end
    for (int k = -1; k <= 2; k++) begin
      checks++;
      if (seen2[k] == 0) begin failures++; $display("FAIL second-order carry %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
