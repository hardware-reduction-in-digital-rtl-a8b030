// dither_gen: pseudorandom 1-bit LSB dither with optional spectral shaping.
//
// A 1-bit pseudorandom sequence d[n] in {0,1} is filtered by
// V(z) = (1 - z^-1)^R and the result is delivered as a small signed word:
//   R = 0 : dout = d[n]            (values 0, 1; white, zeroth-order dither)
//   R = 1 : dout = d[n] - d[n-1]   (values -1, 0, 1; first-order shaped)
// For a third-order modulator R <= 1 keeps its quantization noise white, so
// these are the two cases supported. The shaping filter follows the
// described dither scheme. The bit source is this design's choice: a
// 23-bit maximal-length Fibonacci LFSR (x^23 + x^18 + 1, period 2^23 - 1)
// seeded by the SEED parameter.
//
// Interface: dout (signed 2 bits) is registered-state only, so it is stable
// for the whole cycle. The LFSR advances on a rising clk edge when en = 1.
// rst_n (synchronous, active low) reloads SEED and clears d[n-1].
module dither_gen #(
  parameter int unsigned R    = 0,
  parameter logic [22:0] SEED = 23'h5A5A5A
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic signed [1:0] dout
);

  logic [22:0] lfsr;
  logic        d_cur;

  assign d_cur = lfsr[22];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr <= SEED;
    end else if (en) begin
      lfsr <= {lfsr[21:0], lfsr[22] ^ lfsr[17]};
    end
  end

  if (R == 0) begin : g_r0
    assign dout = $signed({1'b0, d_cur});
  end else begin : g_r1
    logic d_prev;   // d[n-1]
    always_ff @(posedge clk) begin
      if (!rst_n)  d_prev <= 1'b0;
      else if (en) d_prev <= d_cur;
    end
    assign dout = $signed({1'b0, d_cur}) - $signed({1'b0, d_prev});
  end

  // Parameter ranges, checked at elaboration.
  if (R > 1) begin : g_bad_r
    $error("dither_gen: only R = 0 or R = 1 is supported");
  end
  if (SEED == '0) begin : g_bad_seed
    $error("dither_gen: SEED must be non-zero");
  end

endmodule
