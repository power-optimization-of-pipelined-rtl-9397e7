// pn_generator: pseudo-random dither sequence PN for the calibration.
//
// The calibration correlates the residue with a known binary dither PN (+1/-1)
// that is added at the first-stage sub-ADC input. This generator is a 31-bit
// Fibonacci LFSR with the maximal-length polynomial x^31 + x^28 + 1 (period
// 2^31 - 1), advanced once per clock; PN is its last bit, 1 meaning +1 and 0
// meaning -1. The choice of an LFSR, the polynomial and the seed are this
// design's own; only the need for a known pseudo-random +1/-1 sequence comes
// from the calibration method.
//
// Interface: pn is valid every clock after reset. SEED must be non-zero.
module pn_generator #(
  parameter logic [30:0] SEED = 31'h5A5A_1234
) (
  input  logic clk,
  input  logic rst_n,
  output logic pn
);

  logic [30:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= SEED;
    else        lfsr <= {lfsr[29:0], lfsr[30] ^ lfsr[27]};
  end

  assign pn = lfsr[30];

  initial begin
    assert (SEED != '0) else $error("pn_generator: SEED must be non-zero");
  end

endmodule
