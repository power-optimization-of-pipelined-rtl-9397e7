// cal_top_tb: end-to-end test of the calibration unit with the first pipeline
// stage modelled behaviourally (0.9 sine input, dither PN/8 at the sub-ADC,
// residue gain error dg = 0.02 + 0.01 y^2, ideal 13-bit back end, ADC_LAT clocks
// of converter latency). Every clock the outputs OUT_cal, Y_PN, dg0_hat and
// dg2_hat and the dither bit are compared with the bit-exact reference model.
// The step sizes are made large here (mu0 = 2^-8, mu2 = 2^-4, mu_e = 2^-6) so
// that within a short run the estimates move, feed back into the correction and
// drive it into saturation. It counts each mechanism and fails if one never
// happened: both dither polarities, all three digits, a correction that changes
// Y, dg0 rising and falling, dg2 changing, and Y_cal saturating.
module cal_top_tb;
  import cal_pkg::*;
  import cal_ref_pkg::*;

  localparam int YSQ = 7, YPN = 7, K0 = 8, K2 = 4, KE = 6, CF = 16, LAT = 7;
  localparam int NCYC = 20000;
  localparam logic [30:0] SEED = 31'h5A5A_1234;
  localparam real G0 = 0.02, G2 = 0.01, FIN = 0.01234, AMP = 0.9;
  localparam int DG0_W = 2 + YPN - 1 + K0, DG2_W = 2 + 3 * (YPN - 1) + K2;

  logic clk = 0, rst_n = 0;
  logic pn_dither;
  logic signed [12:0] y;
  digit_t d;
  logic signed [13:0] out_cal;
  logic signed [12:0] y_pn;
  logic signed [DG0_W-1:0] dg0_hat;
  logic signed [DG2_W-1:0] dg2_hat;

  cal_top #(.YSQ_BITS(YSQ), .YPN_BITS(YPN), .K0(K0), .K2(K2), .KE(KE),
            .COEF_FRAC(CF), .ADC_LAT(LAT), .PN_SEED(SEED)) dut
    (.clk, .rst_n, .pn_dither, .y, .d, .out_cal, .y_pn, .dg0_hat, .dg2_hat);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pnp = 0, n_pnm = 0, n_dm = 0, n_d0 = 0, n_dp = 0, n_corr = 0;
  int n_dg0_up = 0, n_dg0_dn = 0, n_dg2 = 0, n_sat = 0;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp, int n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d %s: got %0d expected %0d", n, what, got, exp);
    end
  endtask

  initial begin
    cal_ref m;
    longint qy[$];
    int qd[$];
    longint ys, prev0, prev2;
    int ds;
    m = new(YSQ, YPN, K0, K2, KE, CF, LAT, SEED);
    for (int i = 0; i < LAT; i++) begin qy.push_back(0); qd.push_back(0); end
    y = 0; d = 0; prev0 = 0; prev2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      check("pn_dither", longint'(pn_dither), longint'(m.pn_dither()), n);
      // analogue sample taken now with the current dither; its codes leave
      // the converter LAT clocks later
      stage1_sample(AMP * $sin(2.0 * 3.14159265358979 * FIN * real'(n)), pn_dither, G0, G2, ys, ds);
      if (pn_dither) n_pnp++; else n_pnm++;
      qy.push_back(ys); qd.push_back(ds);
      y = 13'(qy.pop_front());
      d = digit_t'(qd.pop_front());
      if (n >= LAT) begin
        if (d == -2'sd1) n_dm++; else if (d == 2'sd0) n_d0++; else n_dp++;
      end
      m.step(longint'(y), int'(d));
      @(posedge clk); #1;
      check("out_cal", longint'(out_cal), m.o_out, n);
      check("y_pn", longint'(y_pn), m.o_ypn, n);
      check("dg0_hat", longint'(dg0_hat), m.dg0, n);
      check("dg2_hat", longint'(dg2_hat), m.dg2, n);
      if (m.c_ycal != longint'(y)) n_corr++;
      if (m.c_ycal == 4095 || m.c_ycal == -4096) n_sat++;
      if (m.dg0 > prev0) n_dg0_up++;
      if (m.dg0 < prev0) n_dg0_dn++;
      if (m.dg2 != prev2) n_dg2++;
      prev0 = m.dg0; prev2 = m.dg2;
      @(negedge clk);
    end
    $display("mechanisms: pn+ %0d pn- %0d | D=-1 %0d D=0 %0d D=+1 %0d | corrected %0d | dg0 up %0d down %0d | dg2 moves %0d | Y_cal saturated %0d",
             n_pnp, n_pnm, n_dm, n_d0, n_dp, n_corr, n_dg0_up, n_dg0_dn, n_dg2, n_sat);
    $display("final dg0_hat = %f, dg2_hat = %f", real'(m.dg0) / real'(longint'(1) << (YPN - 1 + K0)),
             real'(m.dg2) / real'(longint'(1) << (3 * (YPN - 1) + K2)));
    checks += 10;
    if (n_pnp == 0)    begin failures++; $display("FAIL: PN=+1 never applied"); end
    if (n_pnm == 0)    begin failures++; $display("FAIL: PN=-1 never applied"); end
    if (n_dm == 0)     begin failures++; $display("FAIL: D=-1 never seen"); end
    if (n_d0 == 0)     begin failures++; $display("FAIL: D=0 never seen"); end
    if (n_dp == 0)     begin failures++; $display("FAIL: D=+1 never seen"); end
    if (n_corr == 0)   begin failures++; $display("FAIL: correction never changed Y"); end
    if (n_dg0_up == 0) begin failures++; $display("FAIL: dg0 never rose"); end
    if (n_dg0_dn == 0) begin failures++; $display("FAIL: dg0 never fell"); end
    if (n_dg2 == 0)    begin failures++; $display("FAIL: dg2 never moved"); end
    if (n_sat == 0)    begin failures++; $display("FAIL: Y_cal never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
