// ypn_compute_tb: applies every combination of D and PN with random and
// end-of-range Y_cal values and checks OUT_cal = (D + Y_cal)/2 and
// Y_PN = OUT_cal - (D/2 - PN/4) one clock later, computed in real arithmetic
// and converted to the output scales.
module ypn_compute_tb;
  import cal_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [12:0] ycal;
  digit_t d;
  logic pn;
  logic signed [13:0] out_cal;
  logic signed [12:0] ypn;
  logic pn_o;
  int checks = 0, failures = 0;

  ypn_compute dut (.clk, .rst_n, .y_cal(ycal), .d, .pn, .out_cal, .y_pn(ypn), .pn_o);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, real got, real exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f expected %f (ycal=%0d d=%0d pn=%0d)",
                                  what, got, exp, ycal, d, pn);
    end
  endtask

  initial begin
    real yv, outv, dbar, ypnv;
    ycal = 0; d = 0; pn = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      case (i % 4)
        0: ycal = 13'sh0FFF;
        1: ycal = -13'sh1000;
        default: ycal = $signed(13'($urandom));
      endcase
      d  = digit_t'(int'((i / 4) % 3) - 1);
      pn = 1'((i / 12) % 2);
      yv   = real'(ycal) / 4096.0;
      outv = (real'(d) + yv) / 2.0;
      dbar = real'(d) / 2.0 - (pn ? 0.25 : -0.25);
      ypnv = outv - dbar;
      @(posedge clk);
      #1;
      check("out_cal", real'(out_cal) / 8192.0, outv);
      // Y_PN leaves with the LSB of Y_cal: floor to 2^-12
      check("y_pn", real'(ypn) / 4096.0, $floor(ypnv * 4096.0) / 4096.0);
      check("pn", real'(pn_o), real'(pn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
