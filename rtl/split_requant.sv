// split_requant: word-length reduction by bus-splitting alone.
//
// An N-bit word x = X_MSB * 2^N_LSB + X_LSB is shortened to its upper field
// without plain truncation: the lower N_LSB bits go through an ORDER-th
// order EFM (step 2^N_LSB) and its small carry is added to X_MSB,
//   y = X_MSB + floor-carry,  Y = X / 2^N_LSB + (1 - z^-1)^ORDER E / 2^N_LSB.
// The truncation error is thereby pushed out of the signal band instead of
// being spread over it. With a 16-bit oversampled sinusoid at OSR = 64 and
// an 8/8 split, ORDER = 2 keeps the full in-band resolution of the 16-bit
// word while ORDER = 1 loses about three bits. The scheme (split, low-order
// EFM on the LSBs, recombination) follows the described one; the output
// width, the registered output and the clock enable are this design's
// choices. The sum can leave the N_MSB-bit range by the carry (-1 .. 2 for
// ORDER = 2), so y is a signed word of N_MSB + 2 bits.
//
// Interface: x (N bits, unsigned offset binary), y (signed N_MSB+2 bits),
// latency one enabled cycle; rst_n synchronous, active low.
module split_requant #(
  parameter int unsigned N_MSB = 8,
  parameter int unsigned N_LSB = 8,
  parameter int unsigned ORDER = 2,
  localparam int unsigned N    = N_MSB + N_LSB
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic        [N-1:0]      x,
  output logic signed [N_MSB+1:0]  y
);

  logic signed [N_LSB+1:0] x_lsb;
  logic signed [ORDER:0]   carry;
  logic [N_LSB-1:0]        q_unused;

  assign x_lsb = $signed({2'b00, x[N_LSB-1:0]});

  efm #(.ORDER(ORDER), .W(N_LSB), .XW(N_LSB + 2), .YW(ORDER + 1)) u_efm (
    .clk, .rst_n, .en, .x(x_lsb), .y(carry), .q(q_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= $signed({2'b00, x[N-1 -: N_MSB]}) + (N_MSB+2)'(carry);
  end

endmodule
