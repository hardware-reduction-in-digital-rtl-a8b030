// bs_efm3: bus-splitting third-order error feedback modulator.
//
// The N-bit input word is cut into up to three fields,
//   x = X_MSB * 2^(N_ISB+N_LSB) + X_ISB * 2^N_LSB + X_LSB,
// and each field is handled by an EFM whose order rises with the
// significance of the field:
//   X_LSB (N_LSB bits) -> first-order EFM1, step 2^N_LSB, 2-bit carry out
//   X_ISB (N_ISB bits) + carry -> second-order EFM2, step 2^N_ISB, 3-bit out
//   X_MSB (N_MSB bits) + carry -> third-order EFM3, step 2^N_MSB, 4-bit out
// The carry of each lower stage is added to the next field up, so the
// output obeys
//   Y = X / 2^N + (1-z^-1) E1/2^N + (1-z^-1)^2 E2/2^(N_ISB+N_MSB)
//       + (1-z^-1)^3 E3/2^N_MSB.
// The low-order stages only need short words, which is where the area and
// power saving over a full N-bit EFM3 comes from; choosing the field widths
// so that their shaped errors are masked by the EFM3 error and the input
// noise floor is a design-time decision.
//
// Parameter sets of the described architectures:
//   N_ISB = 0, N_LSB = 0 : conventional N-bit EFM3 (reference)
//   N_ISB = 0            : bus-splitting 1-3 EFM3
//   N_LSB = 0            : bus-splitting 2-3 EFM3
//   all three > 0        : nested bus-splitting 1-2-3 EFM3 (default, 7-7-6)
// The field split, the stage orders and the carry recombination follow the
// described architecture. Choices of this design: the input is an unsigned
// (offset binary) word; an optional signed LSB dither (-1..1) enters the
// lowest stage present; the stages are combinational in series and the
// outputs are registered once.
//
// Interface: x (N bits, unsigned), dith (signed 2 bits), y (signed 4 bits,
// -3..4), y_lsb / y_isb (the carries leaving EFM1 / EFM2, for monitoring;
// zero when the stage is absent). Latency: y reflects the x and dith
// applied in the previous enabled cycle. rst_n is synchronous, active low.
module bs_efm3
  import ddsm_pkg::*;
#(
  parameter int unsigned N_MSB = 7,
  parameter int unsigned N_ISB = 7,
  parameter int unsigned N_LSB = 6,
  localparam int unsigned N    = N_MSB + N_ISB + N_LSB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic        [N-1:0] x,
  input  logic signed [1:0]   dith,
  output logic signed [3:0]   y,
  output logic signed [1:0]   y_lsb,
  output logic signed [2:0]   y_isb
);

  logic signed [2:0] c_isb;   // carry into the ISB stage (or MSB stage)
  logic signed [2:0] c_msb;   // carry into the MSB stage
  logic signed [1:0] y1;
  logic signed [2:0] y2;
  logic signed [3:0] y3;

  // ---- EFM1 on the least significant field -------------------------------
  if (N_LSB > 0) begin : g_lsb
    logic signed [N_LSB+1:0] x1;
    logic [N_LSB-1:0]        q1_unused;
    assign x1 = $signed({2'b00, x[N_LSB-1:0]}) + (N_LSB+2)'(dith);
    efm #(.ORDER(1), .W(N_LSB), .XW(N_LSB + 2), .YW(2)) u_efm1 (
      .clk, .rst_n, .en, .x(x1), .y(y1), .q(q1_unused)
    );
    assign c_isb = 3'(y1);
  end else begin : g_no_lsb
    assign y1    = '0;
    assign c_isb = 3'(dith);
  end

  // ---- EFM2 on the intermediate field -------------------------------------
  if (N_ISB > 0) begin : g_isb
    logic signed [N_ISB+1:0] x2;
    logic [N_ISB-1:0]        q2_unused;
    assign x2 = $signed({2'b00, x[N_LSB +: N_ISB]}) + (N_ISB+2)'(c_isb);
    efm #(.ORDER(2), .W(N_ISB), .XW(N_ISB + 2), .YW(3)) u_efm2 (
      .clk, .rst_n, .en, .x(x2), .y(y2), .q(q2_unused)
    );
    assign c_msb = y2;
  end else begin : g_no_isb
    assign y2    = '0;
    assign c_msb = c_isb;
  end

  // ---- EFM3 on the most significant field ---------------------------------
  logic signed [N_MSB+1:0] x3;
  logic [N_MSB-1:0]        q3_unused;
  assign x3 = $signed({2'b00, x[N-1 -: N_MSB]}) + (N_MSB+2)'(c_msb);
  efm #(.ORDER(3), .W(N_MSB), .XW(N_MSB + 2), .YW(4)) u_efm3 (
    .clk, .rst_n, .en, .x(x3), .y(y3), .q(q3_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y     <= '0;
      y_lsb <= '0;
      y_isb <= '0;
    end else if (en) begin
      y     <= y3;
      y_lsb <= y1;
      y_isb <= y2;
    end
  end

  // Parameter range, checked at elaboration.
  if (N_MSB < 2) begin : g_bad_msb
    $error("bs_efm3: N_MSB must be at least 2");
  end

endmodule
