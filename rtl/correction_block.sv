// correction_block: gain-error correction of the first-stage residue.
//
// Multiplies the digitised residue Y by (1 + dg), where the estimated gain error
// is dg = dg0 + dg2 * Yt^2 (second-order model). Y itself is used at its full
// Y_W-bit precision in the final product, but Y^2 is formed from Yt, the YSQ_BITS
// most significant bits of Y (LSBs truncated, i.e. rounded towards minus
// infinity). Lowering YSQ_BITS shrinks the squarer and the dg2*Y^2 multiplier,
// which is the power-saving measure for this block; 7 bits is the precision of
// the optimised design, Y_W = 13 is full precision.
//
// Interface: y is a Y_W-bit signed fraction (LSB 2^-(Y_W-1)); dg0_c and dg2_c are
// COEF_W-bit signed with COEF_FRAC fraction bits. d and pn are the sub-ADC digit
// and dither bit of the same sample and are carried along so that they stay
// aligned with y_cal.
// Timing: one register stage; y_cal, d_o and pn_o appear one clock after y.
// The product Y*dg is truncated to the LSB of Y, and y_cal saturates at the
// ends of the Y_W-bit range. Register placement, truncation and saturation are
// this design's own choices.
module correction_block
  import cal_pkg::*;
#(
  parameter int unsigned YW        = Y_W,
  parameter int unsigned YSQ_BITS  = YSQ_BITS_DEF,
  parameter int unsigned COEF_FRAC = COEF_FRAC_DEF,
  parameter int unsigned COEF_W    = COEF_INT + COEF_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [YW-1:0]     y,
  input  digit_t                   d,
  input  logic                     pn,
  input  logic signed [COEF_W-1:0] dg0_c,
  input  logic signed [COEF_W-1:0] dg2_c,
  output logic signed [YW-1:0]     y_cal,
  output digit_t                   d_o,
  output logic                     pn_o
);

  localparam int unsigned YSQF  = YSQ_BITS - 1;          // fraction bits of Yt
  localparam int unsigned SQ_W  = 2 * YSQ_BITS;          // width of Yt^2
  localparam int unsigned P2_W  = COEF_W + SQ_W;         // width of dg2*Yt^2
  localparam int unsigned DGH_W = COEF_W + 2;            // width of dg (COEF_FRAC fraction bits)
  localparam int unsigned PC_W  = YW + DGH_W;            // width of Y*dg
  localparam int unsigned SUM_W = PC_W + 1;

  logic signed [YSQ_BITS-1:0] yt;
  logic signed [SQ_W-1:0]     ysq;
  logic signed [P2_W-1:0]     p2;
  logic signed [DGH_W-1:0]    dgh;
  logic signed [PC_W-1:0]     pc;
  logic signed [SUM_W-1:0]    ycal_w;
  logic signed [YW-1:0]       ycal_sat;

  always_comb begin
    yt     = y[YW-1 -: YSQ_BITS];
    ysq    = yt * yt;
    p2     = dg2_c * ysq;
    // dg = dg0 + dg2*Yt^2, the product brought back to COEF_FRAC fraction bits
    dgh    = DGH_W'(dg0_c) + DGH_W'(p2 >>> (2 * YSQF));
    pc     = y * dgh;
    // Y_cal = Y + Y*dg, product truncated to the LSB of Y
    ycal_w = SUM_W'(y) + SUM_W'(pc >>> COEF_FRAC);
    ycal_sat = YW'(sat_s(64'(ycal_w), YW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_cal <= '0;
      d_o   <= '0;
      pn_o  <= 1'b0;
    end else begin
      y_cal <= ycal_sat;
      d_o   <= d;
      pn_o  <= pn;
    end
  end

endmodule
