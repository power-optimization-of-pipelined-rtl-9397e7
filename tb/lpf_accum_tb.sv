// lpf_accum_tb: checks the low-pass filter E(n+1) = E(n) + 2^-KE (x - E(n))
// clock by clock against an integer reference, for a short time constant
// (KE = 4) and for the design's mu_e = 2^-19. It also checks the step
// response: with KE = 4 a constant input is reproduced exactly at the output
// after a few hundred clocks, and the first output after a step equals
// floor(x / 2^KE).
module lpf_accum_tb;
  import cal_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [7:0]  x;
  logic signed [7:0]  m4, m19;
  int checks = 0, failures = 0;
  longint s4, s19;

  lpf_accum #(.XW(8), .KE(4))  dut4  (.clk, .rst_n, .x, .mean(m4));
  lpf_accum #(.XW(8), .KE(19)) dut19 (.clk, .rst_n, .x, .mean(m19));

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
    x = 0; s4 = 0; s19 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // step response
    @(negedge clk);
    x = 8'sd100;
    @(posedge clk); #1;
    s4 = s4 + 100; s19 = s19 + 100;
    check("first output after step", longint'(m4), 100 / 16);
    repeat (400) begin
      @(posedge clk); #1;
      s4 = s4 + 100 - fdiv(s4, 4); s19 = s19 + 100 - fdiv(s19, 19);
    end
    check("settled mean", longint'(m4), 100);
    check("slow filter still small", longint'(m19 < 8'sd2), 1);
    // random input, clock-by-clock comparison
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      x = (i % 3 == 0) ? -8'sd128 : $signed(8'($urandom));
      @(posedge clk); #1;
      s4  = s4 + longint'(x) - fdiv(s4, 4);
      s19 = s19 + longint'(x) - fdiv(s19, 19);
      check("mean KE=4", longint'(m4), fdiv(s4, 4));
      check("mean KE=19", longint'(m19), fdiv(s19, 19));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
