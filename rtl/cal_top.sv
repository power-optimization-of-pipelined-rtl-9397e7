// cal_top: second-order digital gain-calibration unit for the first stage of a
// pipelined ADC.
//
// The first pipeline stage resolves a digit D in {-1,0,+1} and amplifies its
// residue by two; the residue amplifier has a gain error that depends on the
// output level, dg = dg0 + dg2*y^2. The rest of the pipeline digitises the
// residue as the Y_W-bit word Y. This unit corrects Y by (1 + dg_hat) and
// estimates dg0 and dg2 in the background, using a pseudo-random dither PN that
// is also injected at the first-stage sub-ADC input:
//
//   pn_generator --pn_dither--> (analogue first stage, outside this block)
//        |
//   ADC_LAT-clock delay, so PN lines up with the Y and D of the same sample
//        v
//   correction_block --Y_cal--> ypn_compute --Y_PN--> estimation_block
//        ^                          |                        |
//        |                       OUT_cal               dg0, dg2
//        +------------------- coef_delay <-------------------+
//
// The reduced precisions YSQ_BITS (bits of Y used for Y^2) and YPN_BITS (bits of
// Y_PN used by the estimator) are the power-saving parameters; 7 and 7 form the
// optimised configuration, 13 and 13 the full-precision one.
//
// Interface: y (Y_W-bit signed fraction) and d arrive once per clock, ADC_LAT
// clocks after the pn_dither value that was applied to the same sample.
// out_cal is the calibrated M-bit output word (LSB 2^-(M-1)), valid two clocks
// after its y and d. y_pn is the estimator input at the same time, and dg0_hat /
// dg2_hat are the running estimates (DG0_FRAC / DG2_FRAC fraction bits).
// ADC_LAT and the register stages are this design's own choices.
module cal_top
  import cal_pkg::*;
#(
  parameter int unsigned YSQ_BITS  = YSQ_BITS_DEF,
  parameter int unsigned YPN_BITS  = YPN_BITS_DEF,
  parameter int unsigned K0        = K0_DEF,
  parameter int unsigned K2        = K2_DEF,
  parameter int unsigned KE        = KE_DEF,
  parameter int unsigned COEF_FRAC = COEF_FRAC_DEF,
  parameter int unsigned ADC_LAT   = 7,
  parameter logic [30:0] PN_SEED   = 31'h5A5A_1234,
  parameter int unsigned DG0_FRAC  = YPN_BITS - 1 + K0,
  parameter int unsigned DG2_FRAC  = 3 * (YPN_BITS - 1) + K2,
  parameter int unsigned DG0_W     = COEF_INT + DG0_FRAC,
  parameter int unsigned DG2_W     = COEF_INT + DG2_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     pn_dither,   // to the first-stage sub-ADC dither input
  input  logic signed [Y_W-1:0]    y,           // digitised first-stage residue
  input  digit_t                   d,           // first-stage sub-ADC digit
  output logic signed [M_BITS-1:0] out_cal,     // calibrated ADC output word
  output logic signed [Y_W-1:0]    y_pn,        // Y_PN, as seen by the estimator
  output logic signed [DG0_W-1:0]  dg0_hat,
  output logic signed [DG2_W-1:0]  dg2_hat
);

  localparam int unsigned COEF_W = COEF_INT + COEF_FRAC;

  logic                     pn_aligned;
  logic signed [Y_W-1:0]    y_cal;
  digit_t                   d_c;
  logic                     pn_c, pn_e;
  logic signed [COEF_W-1:0] dg0_c, dg2_c;

  pn_generator #(.SEED(PN_SEED)) u_pn (.clk, .rst_n, .pn(pn_dither));

  // Align the dither with the sample it was applied to
  if (ADC_LAT == 0) begin : g_no_lat
    assign pn_aligned = pn_dither;
  end else begin : g_lat
    logic [ADC_LAT-1:0] pn_pipe;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pn_pipe <= '0;
      else        pn_pipe <= ADC_LAT'({pn_pipe, pn_dither});
    end
    assign pn_aligned = pn_pipe[ADC_LAT-1];
  end

  correction_block #(
    .YW(Y_W), .YSQ_BITS(YSQ_BITS), .COEF_FRAC(COEF_FRAC)
  ) u_corr (
    .clk, .rst_n, .y, .d, .pn(pn_aligned), .dg0_c, .dg2_c,
    .y_cal, .d_o(d_c), .pn_o(pn_c)
  );

  ypn_compute #(.YW(Y_W), .MW(M_BITS)) u_ypn (
    .clk, .rst_n, .y_cal, .d(d_c), .pn(pn_c),
    .out_cal, .y_pn, .pn_o(pn_e)
  );

  estimation_block #(
    .YW(Y_W), .YPN_BITS(YPN_BITS), .K0(K0), .K2(K2), .KE(KE), .CI(COEF_INT)
  ) u_est (
    .clk, .rst_n, .y_pn, .pn(pn_e), .dg0(dg0_hat), .dg2(dg2_hat)
  );

  coef_delay #(
    .CI(COEF_INT), .DG0_FRAC(DG0_FRAC), .DG2_FRAC(DG2_FRAC), .COEF_FRAC(COEF_FRAC), .DELAY(1)
  ) u_delay (
    .clk, .rst_n, .dg0(dg0_hat), .dg2(dg2_hat), .dg0_c, .dg2_c
  );

endmodule
