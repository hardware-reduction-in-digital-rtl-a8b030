// ddsm_top: the bus-splitting modulator design points side by side, each
// with its own ports.
//
//  * Fractional-N channel (fn_*): a 20-bit word with zeroth-order LSB
//    dither, split 7-7-6 (N_MSB-N_ISB-N_LSB). This is the dithered design
//    for a frequency synthesizer's divider control: s_fn sets the
//    fractional part, y_fn (-3..4) is added to the integer division ratio.
//  * DAC channel (dac_*): a 16-bit oversampled sinusoid (offset binary),
//    undithered, split 5-6-5. This is the design for an oversampling
//    delta-sigma DAC at OSR = 128; y_dac (-3..4, 8 levels) drives a
//    multibit DAC.
//  * Word-length reducer (rq_*): a 16-bit oversampled sinusoid shortened to
//    its upper 8 bits by passing the lower 8 bits through a second-order
//    EFM and adding the carry (bus-splitting without a final EFM3, for
//    OSR = 64). rq_y is a signed 10-bit word.
// All channels share the clock and synchronous active-low reset; each
// has its own sample enable. The word sizes and field splits are those of
// the described design examples; the clock enables, the offset-binary
// input coding and the monitor outputs (carries of the low-order stages)
// are this design's choices. Latency is one enabled cycle per channel.
// With zeroth-order dither the first-order stage never sees a negative
// input, so bit 1 of fn_y_lsb (and of dac_y_lsb, which has no dither) is
// always 0; the monitor ports keep the 2-bit width that first-order
// dither needs.
module ddsm_top #(
  parameter int unsigned FN_N_MSB  = 7,
  parameter int unsigned FN_N_ISB  = 7,
  parameter int unsigned FN_N_LSB  = 6,
  parameter int unsigned FN_R      = 0,
  parameter int unsigned DAC_N_MSB = 5,
  parameter int unsigned DAC_N_ISB = 6,
  parameter int unsigned DAC_N_LSB = 5,
  parameter int unsigned RQ_N_MSB  = 8,
  parameter int unsigned RQ_N_LSB  = 8,
  parameter int unsigned RQ_ORDER  = 2,
  localparam int unsigned FN_N     = FN_N_MSB + FN_N_ISB + FN_N_LSB,
  localparam int unsigned DAC_N    = DAC_N_MSB + DAC_N_ISB + DAC_N_LSB,
  localparam int unsigned RQ_N     = RQ_N_MSB + RQ_N_LSB
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // fractional-N channel
  input  logic                    fn_en,
  input  logic        [FN_N-1:0]  fn_s,
  input  logic                    fn_dither_en,
  output logic signed [3:0]       fn_y,
  output logic signed [1:0]       fn_y_lsb,
  output logic signed [2:0]       fn_y_isb,
  // DAC channel
  input  logic                    dac_en,
  input  logic        [DAC_N-1:0] dac_x,
  output logic signed [3:0]       dac_y,
  output logic signed [1:0]       dac_y_lsb,
  output logic signed [2:0]       dac_y_isb,
  // word-length reducer
  input  logic                    rq_en,
  input  logic        [RQ_N-1:0]  rq_x,
  output logic signed [RQ_N_MSB+1:0] rq_y
);

  dithered_bs_efm3 #(
    .N_MSB(FN_N_MSB), .N_ISB(FN_N_ISB), .N_LSB(FN_N_LSB), .R(FN_R)
  ) u_fn (
    .clk, .rst_n, .en(fn_en), .s(fn_s), .dither_en(fn_dither_en),
    .y(fn_y), .y_lsb(fn_y_lsb), .y_isb(fn_y_isb)
  );

  bs_efm3 #(
    .N_MSB(DAC_N_MSB), .N_ISB(DAC_N_ISB), .N_LSB(DAC_N_LSB)
  ) u_dac (
    .clk, .rst_n, .en(dac_en), .x(dac_x), .dith(2'sd0),
    .y(dac_y), .y_lsb(dac_y_lsb), .y_isb(dac_y_isb)
  );

  split_requant #(
    .N_MSB(RQ_N_MSB), .N_LSB(RQ_N_LSB), .ORDER(RQ_ORDER)
  ) u_rq (
    .clk, .rst_n, .en(rq_en), .x(rq_x), .y(rq_y)
  );

endmodule
