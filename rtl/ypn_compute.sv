// ypn_compute: forms the calibrated ADC output word and the signal Y_PN.
//
//   OUT_cal = (D + Y_cal) / 2
//   Dbar    = D/2 - PN/4
//   Y_PN    = OUT_cal - Dbar
// D is the first-stage digit (-1, 0, +1) and PN the dither (+1 or -1). OUT_cal is
// the M-bit output of the calibrated converter, LSB 2^-(M-1); because D/2 is a
// multiple of 1/2 and Y_cal/2 lies in [-1/2, 1/2), OUT_cal always fits M bits.
// Y_PN is formed exactly at the OUT_cal scale and handed on with Y_W = M-1 bits
// (LSB 2^-(Y_W-1)), which drops its lowest bit; it always lies within +-3/4.
// The equations are those of the calibration algorithm; the output scaling of
// Y_PN and the register stage are this design's own choices.
//
// Timing: one register stage; out_cal, y_pn and pn_o appear one clock after
// y_cal, d and pn.
module ypn_compute
  import cal_pkg::*;
#(
  parameter int unsigned YW = Y_W,
  parameter int unsigned MW = YW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [YW-1:0] y_cal,
  input  digit_t               d,
  input  logic                 pn,
  output logic signed [MW-1:0] out_cal,
  output logic signed [YW-1:0] y_pn,
  output logic                 pn_o
);

  localparam int unsigned WW = MW + 1;

  logic signed [WW-1:0] half_d;     // D/2  at LSB 2^-(MW-1)
  logic signed [WW-1:0] quarter_pn; // PN/4 at LSB 2^-(MW-1)
  logic signed [WW-1:0] out_w, dbar_w, ypn_w;

  always_comb begin
    half_d     = WW'(d) <<< (MW - 2);
    quarter_pn = pn ? (WW'(1) <<< (MW - 3)) : -(WW'(1) <<< (MW - 3));
    // Y_cal/2 at LSB 2^-(MW-1) is the Y_cal code itself
    out_w  = half_d + WW'(y_cal);
    dbar_w = half_d - quarter_pn;
    ypn_w  = out_w - dbar_w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_cal <= '0;
      y_pn    <= '0;
      pn_o    <= 1'b0;
    end else begin
      out_cal <= MW'(out_w);
      y_pn    <= YW'(ypn_w >>> 1);
      pn_o    <= pn;
    end
  end

endmodule
