// cal_precision_sweep_tb: runs the calibration unit at the data precisions of
// the three precision sweeps that motivate the design: (a) reduced Y for Y^2
// with full 13-bit Y_PN, (b) reduced Y_PN with full Y, (c) both reduced
// together, each from 5 to 13 bits in steps of two or more. All instances see
// the same behavioural first stage (0.9 sine, dither PN/8, dg = 0.02 + 0.01 y^2)
// and the design's step sizes, and each is compared every clock with its own
// bit-exact reference model. It prints, per configuration, the mean squared
// difference between OUT_cal and the full-precision (13/13) OUT_cal, showing
// how far each truncation moves the output in this run.
module cal_precision_sweep_tb;
  import cal_pkg::*;
  import cal_ref_pkg::*;

  localparam int NC = 10;
  localparam int CY  [NC] = '{13, 5, 7, 9, 13, 13, 13, 5, 7, 9};
  localparam int CYPN[NC] = '{13, 13, 13, 13, 5, 7, 9, 5, 7, 9};
  localparam int LAT = 7, NCYC = 1 << 17;
  localparam logic [30:0] SEED = 31'h5A5A_1234;
  localparam real G0 = 0.02, G2 = 0.01, FIN = 0.01234, AMP = 0.9;

  logic clk = 0, rst_n = 0;
  logic signed [12:0] y;
  digit_t d;
  logic   pn_dither [NC];
  longint out_l [NC], ypn_l [NC], dg0_l [NC], dg2_l [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int W0 = 2 + CYPN[g] - 1 + K0_DEF;
    localparam int W2 = 2 + 3 * (CYPN[g] - 1) + K2_DEF;
    logic signed [13:0]   out_cal;
    logic signed [12:0]   y_pn;
    logic signed [W0-1:0] dg0;
    logic signed [W2-1:0] dg2;
    cal_top #(.YSQ_BITS(CY[g]), .YPN_BITS(CYPN[g]), .ADC_LAT(LAT), .PN_SEED(SEED)) dut
      (.clk, .rst_n, .pn_dither(pn_dither[g]), .y, .d, .out_cal, .y_pn, .dg0_hat(dg0), .dg2_hat(dg2));
    always_comb begin
      out_l[g] = longint'(out_cal);
      ypn_l[g] = longint'(y_pn);
      dg0_l[g] = longint'(dg0);
      dg2_l[g] = longint'(dg2);
    end
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int g, longint got, longint exp, int n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d config %0d %s: got %0d expected %0d", n, g, what, got, exp);
    end
  endtask

  initial begin
    cal_ref m [NC];
    longint qy[$];
    int qd[$];
    longint ys;
    int ds;
    real msd [NC];
    for (int g = 0; g < NC; g++) begin
      m[g] = new(CY[g], CYPN[g], K0_DEF, K2_DEF, KE_DEF, COEF_FRAC_DEF, LAT, SEED);
      msd[g] = 0.0;
    end
    for (int i = 0; i < LAT; i++) begin qy.push_back(0); qd.push_back(0); end
    y = 0; d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      for (int g = 0; g < NC; g++) check("pn_dither", g, longint'(pn_dither[g]), longint'(m[g].pn_dither()), n);
      stage1_sample(AMP * $sin(2.0 * 3.14159265358979 * FIN * real'(n)), pn_dither[0], G0, G2, ys, ds);
      qy.push_back(ys); qd.push_back(ds);
      y = 13'(qy.pop_front());
      d = digit_t'(qd.pop_front());
      for (int g = 0; g < NC; g++) m[g].step(longint'(y), int'(d));
      @(posedge clk); #1;
      for (int g = 0; g < NC; g++) begin
        check("out_cal", g, out_l[g], m[g].o_out, n);
        check("y_pn", g, ypn_l[g], m[g].o_ypn, n);
        check("dg0_hat", g, dg0_l[g], m[g].dg0, n);
        check("dg2_hat", g, dg2_l[g], m[g].dg2, n);
        msd[g] += real'((out_l[g] - out_l[0]) * (out_l[g] - out_l[0]));
      end
      @(negedge clk);
    end
    for (int g = 0; g < NC; g++)
      $display("Y bits %2d, Y_PN bits %2d: dg0 %f dg2 %f, mean squared OUT_cal difference to 13/13: %f LSB^2",
               CY[g], CYPN[g], real'(m[g].dg0) / real'(longint'(1) << m[g].dg0_frac),
               real'(m[g].dg2) / real'(longint'(1) << m[g].dg2_frac), msd[g] / real'(NCYC));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
