// correction_block_tb: drives random and corner-case residues and coefficients
// into two correction blocks, one with the reduced 7-bit Y^2 precision and one
// at the full 13 bits, and compares Y_cal, D and PN one clock later with an
// integer reference. It also checks that the reduced and full precisions give
// different results for some samples and that saturation is exercised.
module correction_block_tb;
  import cal_pkg::*;
  import cal_ref_pkg::*;

  localparam int CF = 16;
  localparam int CW = 2 + CF;

  logic clk = 0, rst_n = 0;
  logic signed [12:0] y;
  digit_t d;
  logic pn;
  logic signed [CW-1:0] dg0c, dg2c;
  logic signed [12:0] ycal7, ycal13;
  digit_t d7, d13;
  logic pn7, pn13;

  int checks = 0, failures = 0, differ = 0, sats = 0;

  correction_block #(.YSQ_BITS(7),  .COEF_FRAC(CF)) dut7
    (.clk, .rst_n, .y, .d, .pn, .dg0_c(dg0c), .dg2_c(dg2c), .y_cal(ycal7), .d_o(d7), .pn_o(pn7));
  correction_block #(.YSQ_BITS(13), .COEF_FRAC(CF)) dut13
    (.clk, .rst_n, .y, .d, .pn, .dg0_c(dg0c), .dg2_c(dg2c), .y_cal(ycal13), .d_o(d13), .pn_o(pn13));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (y=%0d dg0=%0d dg2=%0d)",
                                  what, got, exp, y, dg0c, dg2c);
    end
  endtask

  initial begin
    longint e7, e13;
    y = 0; d = 0; pn = 0; dg0c = 0; dg2c = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // stimulus
      if (i % 7 == 0)      y = (i % 2 == 1) ? 13'sh0FFF : -13'sh1000;   // range ends
      else                 y = $signed(13'($urandom));
      d  = digit_t'(int'($urandom_range(0, 2)) - 1);
      pn = 1'($urandom);
      if (i % 5 == 0) begin         // large coefficients push Y_cal into saturation
        dg0c = $signed(CW'(int'($urandom_range(0, 1 << CF)) + (1 << (CF - 1))));
        dg2c = $signed(CW'(int'($urandom_range(0, 1 << CF))));
      end else begin                // realistic gain errors, a few percent
        dg0c = $signed(CW'(int'($urandom_range(0, 1 << (CF - 4))) - (1 << (CF - 5))));
        dg2c = $signed(CW'(int'($urandom_range(0, 1 << (CF - 3))) - (1 << (CF - 4))));
      end
      e7  = ref_correct(longint'(y), longint'(dg0c), longint'(dg2c), 7, CF);
      e13 = ref_correct(longint'(y), longint'(dg0c), longint'(dg2c), 13, CF);
      if (e7 != e13) differ++;
      if (e7 == 4095 || e7 == -4096) sats++;
      @(posedge clk);
      #1;
      check("ycal7", longint'(ycal7), e7);
      check("ycal13", longint'(ycal13), e13);
      check("d", longint'(d7), longint'(d));
      check("pn", longint'(pn7), longint'(pn));
      check("d13", longint'(d13), longint'(d));
      check("pn13", longint'(pn13), longint'(pn));
    end
    checks++;
    if (differ == 0) begin failures++; $display("FAIL: reduced precision never mattered"); end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("precision differences %0d, saturations %0d", differ, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
