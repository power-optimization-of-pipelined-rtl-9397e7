// estimation_block_tb: drives random Y_PN / PN sequences into three estimation
// blocks and compares dg0 and dg2 every clock with an integer reference of
//   dg0 += 2^-K0 * PN * Y_PN
//   dg2 += 2^-K2 * (E[PN*Y_PN^3] - 3 E[PN*Y_PN] E[Y_PN^2]),  E[.] by eq.-(17) filters.
// Instances: the optimised design (7-bit Y_PN, mu0 = 2^-23, mu2 = 2^-17,
// mu_e = 2^-19), full 13-bit Y_PN, and a 7-bit one with very large steps that
// drives both accumulators into saturation. It also checks the one-clock
// latency of dg0 and that the reduced precision changes the estimates.
module estimation_block_tb;
  import cal_ref_pkg::*;

  localparam int NCFG = 3;
  localparam int YB [NCFG] = '{7, 13, 7};
  localparam int KK0[NCFG] = '{23, 23, 1};
  localparam int KK2[NCFG] = '{17, 17, 0};
  localparam int KKE[NCFG] = '{19, 19, 2};

  logic clk = 0, rst_n = 0;
  logic signed [12:0] ypn;
  logic pn;
  logic signed [30:0] dg0_a;  logic signed [36:0] dg2_a;   // 7-bit, F=6
  logic signed [36:0] dg0_b;  logic signed [54:0] dg2_b;   // 13-bit, F=12
  logic signed [8:0]  dg0_c;  logic signed [19:0] dg2_c;   // 7-bit, small K
  longint r_dg0[NCFG], r_dg2[NCFG], r_s1[NCFG], r_s2[NCFG], r_s3[NCFG];
  int checks = 0, failures = 0, sat0 = 0, sat2 = 0, differ = 0;

  estimation_block #(.YPN_BITS(7))  dut_a (.clk, .rst_n, .y_pn(ypn), .pn, .dg0(dg0_a), .dg2(dg2_a));
  estimation_block #(.YPN_BITS(13)) dut_b (.clk, .rst_n, .y_pn(ypn), .pn, .dg0(dg0_b), .dg2(dg2_b));
  estimation_block #(.YPN_BITS(7), .K0(1), .K2(0), .KE(2)) dut_c
    (.clk, .rst_n, .y_pn(ypn), .pn, .dg0(dg0_c), .dg2(dg2_c));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic void ref_step(int c, longint y, bit p);
    longint yt, a1, y2, a3, e1, e2, e3, g;
    int f;
    f  = YB[c] - 1;
    yt = fdiv(y, 13 - YB[c]);
    a1 = p ? yt : -yt;
    y2 = yt * yt;
    a3 = p ? yt * yt * yt : -(yt * yt * yt);
    e1 = fdiv(r_s1[c], KKE[c]); e2 = fdiv(r_s2[c], KKE[c]); e3 = fdiv(r_s3[c], KKE[c]);
    g  = e3 - 3 * e1 * e2;
    r_s1[c] += a1 - e1; r_s2[c] += y2 - e2; r_s3[c] += a3 - e3;
    r_dg0[c] = clamp(r_dg0[c] + a1, 2 + f + KK0[c]);
    r_dg2[c] = clamp(r_dg2[c] + g, 2 + 3 * f + KK2[c]);
  endfunction

  initial begin
    longint old0;
    ypn = 0; pn = 0;
    for (int c = 0; c < NCFG; c++) begin
      r_dg0[c] = 0; r_dg2[c] = 0; r_s1[c] = 0; r_s2[c] = 0; r_s3[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // Y_PN = Y_cal/2 + PN/4: biased by PN, magnitude up to 3/4
      pn  = 1'($urandom);
      ypn = 13'(int'($urandom_range(0, 4096)) - 2048 + (pn ? 1024 : -1024));
      if (i % 50 == 0) ypn = pn ? 13'sd3071 : -13'sd3072;
      old0 = longint'(dg0_a);
      for (int c = 0; c < NCFG; c++) ref_step(c, longint'(ypn), pn);
      @(posedge clk); #1;
      check("dg0 7b", longint'(dg0_a), r_dg0[0]);
      check("dg2 7b", longint'(dg2_a), r_dg2[0]);
      check("dg0 13b", longint'(dg0_b), r_dg0[1]);
      check("dg2 13b", longint'(dg2_b), r_dg2[1]);
      check("dg0 fast", longint'(dg0_c), r_dg0[2]);
      check("dg2 fast", longint'(dg2_c), r_dg2[2]);
      // dg0 moves in the clock after its sample, by PN*Y_PN at its LSB
      check("dg0 latency", longint'(dg0_a) - old0,
            (pn ? 1 : -1) * fdiv(longint'(ypn), 6));
      if (dg0_c == 9'sh0FF || dg0_c == -9'sh100) sat0++;
      if (dg2_c == 20'sh7FFFF || dg2_c == -20'sh80000) sat2++;
      if (fdiv(longint'(dg0_b), 6) != longint'(dg0_a)) differ++;
    end
    checks += 3;
    if (sat0 == 0)   begin failures++; $display("FAIL: dg0 never saturated"); end
    if (sat2 == 0)   begin failures++; $display("FAIL: dg2 never saturated"); end
    if (differ == 0) begin failures++; $display("FAIL: Y_PN precision never mattered"); end
    $display("dg0 7b=%0d 13b=%0d; dg2 7b=%0d 13b=%0d; saturations %0d/%0d, differ %0d",
             dg0_a, dg0_b, dg2_a, dg2_b, sat0, sat2, differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
