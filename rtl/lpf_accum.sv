// lpf_accum: first-order low-pass filter used to form the averages E[.].
//
//   E(n+1) = E(n) + 2^-KE * (x - E(n))
// The filter is a single accumulator S that holds E scaled by 2^KE, so E carries
// KE more fraction bits than x inside the register:
//   S(n+1) = S(n) + x - (S(n) >>> KE),   mean = S >>> KE.
// The output mean has the same width and scale as x (the extra KE bits are
// truncated towards minus infinity), which keeps the multipliers that follow
// as narrow as the input. That output truncation is this design's own choice.
// The time constant is about 2^KE samples.
//
// Interface: x is XW-bit signed; mean is XW-bit signed with the scale of x.
// Timing: S is updated at every clock; mean is taken from S, so it reflects all
// inputs up to the previous clock. Reset clears S.
module lpf_accum #(
  parameter int unsigned XW = 8,
  parameter int unsigned KE = 19
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] x,
  output logic signed [XW-1:0] mean
);

  // |S| <= 2^KE * max|x| at steady state; one guard bit for the transient sum
  localparam int unsigned SW = XW + KE + 1;

  logic signed [SW-1:0] s_q, s_d, e_full;

  always_comb begin
    e_full = s_q >>> KE;
    s_d    = s_q + SW'(x) - e_full;
    mean   = XW'(e_full);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_q <= '0;
    else        s_q <= s_d;
  end

endmodule
