// pn_generator_tb: checks the dither sequence. The first 31 bits out must be
// the seed, most significant bit first; every later bit must satisfy the
// recurrence of x^31 + x^28 + 1, out(n+31) = out(n) xor out(n+3); and over
// 20000 clocks the sequence must be balanced (+1 and -1 within 2% of even)
// with no run longer than 31.
module pn_generator_tb;
  localparam logic [30:0] SEED = 31'h1234_5678;
  logic clk = 0, rst_n = 0;
  logic pn;
  bit hist[$];
  int checks = 0, failures = 0, ones = 0, run = 0, maxrun = 0;
  bit last;

  pn_generator #(.SEED(SEED)) dut (.clk, .rst_n, .pn);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      #1;
      hist.push_back(pn);
      if (n < 31) check("seed bit", int'(pn), int'(SEED[30 - n]));
      else        check("recurrence", int'(pn), int'(hist[n - 31]) ^ int'(hist[n - 28]));
      ones += int'(pn);
      if (n > 0 && pn == last) run++; else run = 1;
      if (run > maxrun) maxrun = run;
      last = pn;
      @(negedge clk);
    end
    check("balanced", int'(ones > 9800 && ones < 10200), 1);
    check("run length", int'(maxrun <= 31), 1);
    $display("ones %0d of 20000, longest run %0d", ones, maxrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
