// coef_delay: the delay in the feedback path from the estimation block to the
// correction block.
//
// The estimates dg0 and dg2 leave the estimation block with many fraction bits
// (their accumulators are exact). This block truncates both to COEF_FRAC fraction
// bits (towards minus infinity), the precision the correction multiplier works
// with, and delays them by DELAY clocks (DELAY >= 1) through a register chain.
// The delay itself follows the calibration loop; its length, the truncation and
// COEF_FRAC are this design's own choices.
//
// Interface: dg0 has DG0_FRAC and dg2 DG2_FRAC fraction bits, both with CI integer
// bits (sign included); dg0_c/dg2_c have COEF_FRAC fraction bits and CI integer
// bits. Timing: outputs follow the inputs DELAY clocks later; reset clears them.
module coef_delay
  import cal_pkg::*;
#(
  parameter int unsigned CI        = COEF_INT,
  parameter int unsigned DG0_FRAC  = YPN_BITS_DEF - 1 + K0_DEF,
  parameter int unsigned DG2_FRAC  = 3 * (YPN_BITS_DEF - 1) + K2_DEF,
  parameter int unsigned COEF_FRAC = COEF_FRAC_DEF,
  parameter int unsigned DELAY     = 1,
  parameter int unsigned DG0_W     = CI + DG0_FRAC,
  parameter int unsigned DG2_W     = CI + DG2_FRAC,
  parameter int unsigned COEF_W    = CI + COEF_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DG0_W-1:0]  dg0,
  input  logic signed [DG2_W-1:0]  dg2,
  output logic signed [COEF_W-1:0] dg0_c,
  output logic signed [COEF_W-1:0] dg2_c
);

  logic signed [COEF_W-1:0] t0, t2;
  logic signed [COEF_W-1:0] pipe0 [DELAY];
  logic signed [COEF_W-1:0] pipe2 [DELAY];

  // Re-scale to COEF_FRAC fraction bits: keep the top CI+COEF_FRAC bits when
  // the estimate is finer, append zeros when it is coarser.
  if (DG0_FRAC >= COEF_FRAC) begin : g_t0_trunc
    assign t0 = dg0[DG0_W-1 -: COEF_W];
  end else begin : g_t0_pad
    assign t0 = {dg0, {(COEF_FRAC - DG0_FRAC){1'b0}}};
  end
  if (DG2_FRAC >= COEF_FRAC) begin : g_t2_trunc
    assign t2 = dg2[DG2_W-1 -: COEF_W];
  end else begin : g_t2_pad
    assign t2 = {dg2, {(COEF_FRAC - DG2_FRAC){1'b0}}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) begin
        pipe0[i] <= '0;
        pipe2[i] <= '0;
      end
    end else begin
      pipe0[0] <= t0;
      pipe2[0] <= t2;
      for (int i = 1; i < DELAY; i++) begin
        pipe0[i] <= pipe0[i-1];
        pipe2[i] <= pipe2[i-1];
      end
    end
  end

  assign dg0_c = pipe0[DELAY-1];
  assign dg2_c = pipe2[DELAY-1];

  initial begin
    assert (DELAY >= 1) else $error("coef_delay: DELAY must be at least 1");
  end

endmodule
