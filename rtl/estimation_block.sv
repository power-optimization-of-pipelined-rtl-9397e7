// estimation_block: background estimation of the zero- and second-order gain
// errors dg0 and dg2 of the first pipeline stage.
//
// Every clock it applies the iterative relations
//   dg0(n+1) = dg0(n) + mu0 * PN * Y_PN
//   dg2(n+1) = dg2(n) + mu2 * ( E[PN*Y_PN^3] - 3 * E[PN*Y_PN] * E[Y_PN^2] )
// with mu0 = 2^-K0, mu2 = 2^-K2, and each average E[.] taken by an lpf_accum
// low-pass filter with mu_e = 2^-KE. Multiplication by PN (+1/-1) is a
// conditional negation and the step sizes are shifts, so the only multipliers
// are the squarer and cuber of Y_PN and the product E[PN*Y_PN]*E[Y_PN^2].
//
// Y_PN enters at YW bits; only its YPN_BITS most significant bits are used
// (LSBs truncated). Every internal width follows from YPN_BITS, so reducing it
// shrinks the multipliers, filters and accumulators; YPN_BITS = 7 is the
// optimised precision, YPN_BITS = YW the full one. The two accumulators are
// exact: dg0 has F+K0 and dg2 has 3F+K2 fraction bits (F = YPN_BITS-1), with
// COEF_INT integer bits including the sign, and both saturate instead of
// wrapping. Exact accumulator widths, saturation and the reset value 0 are this
// design's own choices.
//
// Interface: y_pn (YW-bit signed, LSB 2^-(YW-1)) and pn (1 = +1, 0 = -1) of one
// sample per clock; dg0/dg2 are the estimates in the formats above.
// Timing: the estimates are registers; a sample at the inputs is reflected in
// dg0 one clock later and, through the filters, in dg2 two clocks later.
module estimation_block
  import cal_pkg::*;
#(
  parameter int unsigned YW       = Y_W,
  parameter int unsigned YPN_BITS = YPN_BITS_DEF,
  parameter int unsigned K0       = K0_DEF,
  parameter int unsigned K2       = K2_DEF,
  parameter int unsigned KE       = KE_DEF,
  parameter int unsigned CI       = COEF_INT,
  parameter int unsigned DG0_FRAC = YPN_BITS - 1 + K0,
  parameter int unsigned DG2_FRAC = 3 * (YPN_BITS - 1) + K2,
  parameter int unsigned DG0_W    = CI + DG0_FRAC,
  parameter int unsigned DG2_W    = CI + DG2_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [YW-1:0]    y_pn,
  input  logic                    pn,
  output logic signed [DG0_W-1:0] dg0,
  output logic signed [DG2_W-1:0] dg2
);

  localparam int unsigned A1_W = YPN_BITS + 1;      // PN*Y_PN,   F fraction bits
  localparam int unsigned Y2_W = 2 * YPN_BITS;      // Y_PN^2,   2F fraction bits
  localparam int unsigned Y3_W = 3 * YPN_BITS;      // Y_PN^3,   3F fraction bits
  localparam int unsigned A3_W = Y3_W + 1;          // PN*Y_PN^3
  localparam int unsigned P_W  = A1_W + Y2_W;       // E1*E2,    3F fraction bits
  localparam int unsigned P3_W = P_W + 2;           // 3*E1*E2
  localparam int unsigned G_W  = P3_W + 1;          // E3 - 3*E1*E2

  logic signed [YPN_BITS-1:0] yt;
  logic signed [A1_W-1:0]     a1, e1;
  logic signed [Y2_W-1:0]     y2, e2;
  logic signed [Y3_W-1:0]     y3;
  logic signed [A3_W-1:0]     a3, e3;
  logic signed [P_W-1:0]      p;
  logic signed [P3_W-1:0]     p3;
  logic signed [G_W-1:0]      g;
  logic signed [DG0_W:0]      dg0_sum;
  logic signed [DG2_W:0]      dg2_sum;
  logic signed [DG0_W-1:0]    dg0_d;
  logic signed [DG2_W-1:0]    dg2_d;

  always_comb begin
    yt = y_pn[YW-1 -: YPN_BITS];
    a1 = pn ? A1_W'(yt) : -A1_W'(yt);
    y2 = yt * yt;
    y3 = Y3_W'(y2) * Y3_W'(yt);
    a3 = pn ? A3_W'(y3) : -A3_W'(y3);
  end

  lpf_accum #(.XW(A1_W), .KE(KE)) u_lpf_pny  (.clk, .rst_n, .x(a1), .mean(e1));
  lpf_accum #(.XW(Y2_W), .KE(KE)) u_lpf_y2   (.clk, .rst_n, .x(y2), .mean(e2));
  lpf_accum #(.XW(A3_W), .KE(KE)) u_lpf_pny3 (.clk, .rst_n, .x(a3), .mean(e3));

  always_comb begin
    p  = P_W'(e1) * P_W'(e2);
    p3 = P3_W'(p) + (P3_W'(p) <<< 1);
    g  = G_W'(e3) - G_W'(p3);
    // mu*x at the accumulator LSB is x itself: the accumulators are exact
    dg0_sum = (DG0_W + 1)'(dg0) + (DG0_W + 1)'(a1);
    dg2_sum = (DG2_W + 1)'(dg2) + (DG2_W + 1)'(g);
    dg0_d = DG0_W'(sat_s(64'(dg0_sum), DG0_W));
    dg2_d = DG2_W'(sat_s(64'(dg2_sum), DG2_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dg0 <= '0;
      dg2 <= '0;
    end else begin
      dg0 <= dg0_d;
      dg2 <= dg2_d;
    end
  end

  // The exact-accumulator formats need the sums to fit the 64-bit helper
  initial begin
    assert (DG2_W < 63 && G_W < 63) else $error("estimation_block: widths exceed 62 bits");
  end

endmodule
