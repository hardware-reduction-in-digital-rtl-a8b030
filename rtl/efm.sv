// efm: l-th order digital error feedback modulator (EFMl).
//
// The modulator adds the filtered truncation error of past samples to the
// input, v[n] = x[n] + sum_i h_i * q[n-i], keeps the upper bits of v as the
// output, y[n] = floor(v[n] / 2^W), and stores the lower W bits
// q[n] = v[n] mod 2^W (the negative of the quantization error) in a delay
// line of ORDER registers. With H(z) = 1 - (1 - z^-1)^ORDER this gives
//   2^W * Y(z) = X(z) - (1 - z^-1)^ORDER * Q(z),
// i.e. a unity signal transfer and an ORDER-th order high-pass noise
// transfer. The structure (truncator, error register chain and FIR
// feedback filter) is that of the conventional EFM; register widths,
// reset, the clock enable and the signed input range are choices of this
// design.
//
// Interface
//   x   : signed input, XW bits. A plain W-bit field plus a small signed
//         carry from a lower stage (range -1 .. 2^W + 2) is what the
//         bus-splitting chain applies.
//   y   : signed output, YW bits (default ORDER+1, the overload-free
//         truncator width). y is combinational in x and the stored errors.
//   q   : the W LSBs of v for the current sample (combinational).
// Timing: the error delay line advances on a rising clk edge when en = 1.
// rst_n (active low, synchronous) clears the delay line.
module efm
  import ddsm_pkg::*;
#(
  parameter int unsigned ORDER = 3,
  parameter int unsigned W     = 20,
  parameter int unsigned XW    = W + 2,
  parameter int unsigned YW    = efm_out_width(ORDER)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y,
  output logic        [W-1:0]  q
);

  // |sum h_i q_i| < 2^ORDER * 2^W, so W+ORDER+1 bits hold the feedback
  // term; two more bits leave room for the sum with x.
  localparam int unsigned VW = umax(XW, W + ORDER + 1) + 2;

  logic [W-1:0]          q_dly [1:ORDER];   // q[n-1] .. q[n-ORDER]
  logic signed [VW-1:0]  v;
  logic signed [VW-W-1:0] y_full;

  always_comb begin
    v = VW'(x);
    for (int i = 1; i <= int'(ORDER); i++) begin
      v = v + VW'(efm_tap(ORDER, i)) * $signed(VW'(q_dly[i]));
    end
  end

  assign q      = v[W-1:0];
  assign y_full = v[VW-1:W];
  assign y      = y_full[YW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i <= int'(ORDER); i++) q_dly[i] <= '0;
    end else if (en) begin
      q_dly[1] <= q;
      for (int i = 2; i <= int'(ORDER); i++) q_dly[i] <= q_dly[i-1];
    end
  end

  // The truncated output must hold the full quotient floor(v / 2^W).
  a_no_overload: assert property (@(posedge clk) disable iff (!rst_n)
    en |-> (y_full == (VW-W)'(y)));

  // Parameter ranges, checked at elaboration.
  if (ORDER < 1 || ORDER > MAX_ORDER) begin : g_bad_order
    $error("efm: ORDER out of range");
  end
  if (W < 1) begin : g_bad_w
    $error("efm: W must be at least 1");
  end

endmodule
