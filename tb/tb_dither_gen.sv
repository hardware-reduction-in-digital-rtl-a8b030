// tb_dither_gen: self-checking testbench for the LSB dither generator.
//
// Two instances, R = 0 (white 1-bit dither) and R = 1 (first-order shaped
// dither), with the same seed. An independent model of the 23-bit
// Fibonacci LFSR (taps 23 and 18) predicts the raw bit d[n]; the testbench
// checks dout = d[n] for R = 0 and dout = d[n] - d[n-1] for R = 1 every
// cycle, that the generators hold while en is low, that the density of
// ones is close to one half and that the shaped dither sums to at most one
// in magnitude (its DC content is removed by the (1 - z^-1) filter).
module tb_dither_gen;

  localparam int NCYC = 100000;
  localparam logic [22:0] SEED = 23'h1234AB;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [1:0] d0, d1;

  dither_gen #(.R(0), .SEED(SEED)) dut0 (.clk, .rst_n, .en, .dout(d0));
  dither_gen #(.R(1), .SEED(SEED)) dut1 (.clk, .rst_n, .en, .dout(d1));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [22:0] s;
    int bit_now, bit_prev, ones, shaped_sum, held;
    s = SEED; bit_prev = 0; ones = 0; shaped_sum = 0; held = 0;
    rst_n = 1'b0; en = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      bit_now = int'(s[22]);
      #1;
      check_eq("R=0 dout", int'(d0), bit_now);
      check_eq("R=1 dout", int'(d1), bit_now - bit_prev);
      if (en) begin
        ones += bit_now;
        shaped_sum += bit_now - bit_prev;
        bit_prev = bit_now;
        s = {s[21:0], s[22] ^ s[17]};
      end else begin
        held++;
      end
      checks++;
      if (shaped_sum > 1 || shaped_sum < -1) begin
        failures++;
        if (failures < 10) $display("FAIL shaped dither running sum %0d", shaped_sum);
      end
    end
    // ones density of the white dither: 0.5 within +-2 %
    checks++;
    if (ones * 100 < (NCYC - held) * 48 || ones * 100 > (NCYC - held) * 52) begin
      failures++;
      $display("FAIL ones density %0d of %0d", ones, NCYC - held);
    end
    $display("ones %0d of %0d enabled cycles, held %0d", ones, NCYC - held, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
