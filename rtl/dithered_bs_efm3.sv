// dithered_bs_efm3: bus-splitting EFM3 with additive LSB dither.
//
// The modulator input is x = s + v*d: a constant (or slowly varying)
// N-bit word s plus a pseudorandom 1-bit dither d shaped by
// V(z) = (1 - z^-1)^R. The dither is only one LSB wide, so it is added at
// the input of the least significant EFM stage, which is the same sum as
// adding it to the whole word. It whitens the quantization noise and so
// removes the spurious tones a constant input would otherwise cause.
//
// Field widths for a spectrum close to that of a full N-bit dithered EFM3:
//   R = 0 : N_MSB = ceil(N/3), N_ISB = floor(2N/3) - N_MSB, N_LSB = rest
//           (N = 20 -> 7-7-6, the default)
//   R = 1 : N_MSB = ceil(N/2), N_ISB = N - N_MSB, N_LSB = 0 (2-3 EFM3;
//           N = 20 -> 11-9)
// Both the structure and these sizes follow the described design. The
// dither_en input (dither switched off gives the plain bus-splitting
// modulator) is this design's addition.
//
// Interface: s (N bits, unsigned), dither_en, y (signed 4 bits, -3..4),
// y_lsb / y_isb (carries of EFM1 / EFM2). Latency one enabled cycle from s
// to y; rst_n is synchronous and active low.
module dithered_bs_efm3 #(
  parameter int unsigned N_MSB = 7,
  parameter int unsigned N_ISB = 7,
  parameter int unsigned N_LSB = 6,
  parameter int unsigned R     = 0,
  parameter logic [22:0] SEED  = 23'h5A5A5A,
  localparam int unsigned N    = N_MSB + N_ISB + N_LSB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic        [N-1:0] s,
  input  logic                dither_en,
  output logic signed [3:0]   y,
  output logic signed [1:0]   y_lsb,
  output logic signed [2:0]   y_isb
);

  logic signed [1:0] d_shaped;
  logic signed [1:0] dith;

  dither_gen #(.R(R), .SEED(SEED)) u_dither (
    .clk, .rst_n, .en, .dout(d_shaped)
  );

  assign dith = dither_en ? d_shaped : 2'sd0;

  bs_efm3 #(.N_MSB(N_MSB), .N_ISB(N_ISB), .N_LSB(N_LSB)) u_mod (
    .clk, .rst_n, .en, .x(s), .dith, .y, .y_lsb, .y_isb
  );

endmodule
