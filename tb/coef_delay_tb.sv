// coef_delay_tb: feeds random estimates into two coefficient delays (one and
// three clocks) and checks that each output is the estimate of DELAY clocks
// earlier, truncated towards minus infinity to 16 fraction bits.
module coef_delay_tb;
  import cal_ref_pkg::*;

  localparam int F0 = 29, F2 = 35, CF = 16;
  logic clk = 0, rst_n = 0;
  logic signed [F0+1:0] dg0;
  logic signed [F2+1:0] dg2;
  logic signed [CF+1:0] c0a, c2a, c0b, c2b;
  longint h0[$], h2[$];
  int checks = 0, failures = 0;

  coef_delay #(.DG0_FRAC(F0), .DG2_FRAC(F2), .COEF_FRAC(CF), .DELAY(1)) dut1
    (.clk, .rst_n, .dg0, .dg2, .dg0_c(c0a), .dg2_c(c2a));
  coef_delay #(.DG0_FRAC(F0), .DG2_FRAC(F2), .COEF_FRAC(CF), .DELAY(3)) dut3
    (.clk, .rst_n, .dg0, .dg2, .dg0_c(c0b), .dg2_c(c2b));

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
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    dg0 = 0; dg2 = 0;
    for (int i = 0; i < 3; i++) begin h0.push_front(0); h2.push_front(0); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      dg0 = $signed((F0 + 2)'({$urandom, $urandom}));
      dg2 = $signed((F2 + 2)'({$urandom, $urandom}));
      h0.push_front(fdiv(longint'(dg0), F0 - CF));
      h2.push_front(fdiv(longint'(dg2), F2 - CF));
      @(posedge clk); #1;
      check("dg0 delay 1", longint'(c0a), h0[0]);
      check("dg2 delay 1", longint'(c2a), h2[0]);
      check("dg0 delay 3", longint'(c0b), h0[2]);
      check("dg2 delay 3", longint'(c2b), h2[2]);
      void'(h0.pop_back()); void'(h2.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
