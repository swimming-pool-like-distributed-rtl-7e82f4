// loop_filter_tb: drives the PI loop filter with random errors and gain
// settings and compares every control word with a reference model written
// with 64-bit integers: I += e*2^ki, cw = sat((e*2^kp + I) / 2^8, rounded
// down), the integrator clamped to +-128*2^8. It checks the one-cycle
// latency (cw answers the error of the previous edge), saturation in both
// directions, and that loop_en low clears the state and holds cw at zero.
//
// A PI filter is the design's choice of loop filter; the shift-coded gains,
// clamping and widths modelled here are this design's own.
module loop_filter_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import clkgen_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   loop_en = 1'b0;
  shift_t kp_sh = 4'd6;
  shift_t ki_sh = 4'd1;
  err_t   err = '0;
  cw_t    cw;
  int     checks = 0;
  int     failures = 0;
  longint integ_m = 0;
  int     sat_hi = 0, sat_lo = 0;

  loop_filter dut (
    .clk(clk), .rst_n(rst_n), .loop_en(loop_en),
    .kp_sh(kp_sh), .ki_sh(ki_sh), .err(err), .cw(cw)
  );

  initial forever #2000 clk = ~clk;

  function automatic longint floor_div256(longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  task automatic step_and_check(int e);
    longint p, w;
    err = err_t'(e);
    @(posedge clk);
    if (loop_en) begin
      p = longint'(e) <<< kp_sh;
      integ_m = integ_m + (longint'(e) <<< ki_sh);
      if (integ_m > 127 * 256)  integ_m = 127 * 256;
      if (integ_m < -128 * 256) integ_m = -128 * 256;
      w = floor_div256(p + integ_m);
      if (w > 127) begin w = 127; sat_hi++; end
      if (w < -128) begin w = -128; sat_lo++; end
    end else begin
      integ_m = 0;
      w = 0;
    end
    #1;
    checks++;
    if (longint'(cw) != w) begin
      failures++;
      $display("FAIL e=%0d kp=%0d ki=%0d en=%0b cw=%0d expected=%0d",
               e, kp_sh, ki_sh, loop_en, cw, w);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // open loop: cw stays 0 whatever the error
    repeat (5) step_and_check(40);
    loop_en = 1'b1;
    // overdamped setting, small errors
    repeat (200) step_and_check(int'($urandom_range(16)) - 8);
    // constant positive error: integrator ramps into saturation
    kp_sh = 4'd4; ki_sh = 4'd6;
    repeat (100) step_and_check(60);
    repeat (200) step_and_check(-64);
    // random gains and errors
    repeat (500) begin
      kp_sh = shift_t'($urandom_range(9));
      ki_sh = shift_t'($urandom_range(6));
      step_and_check(int'($urandom_range(128)) - 64);
    end
    // back to open loop
    loop_en = 1'b0;
    repeat (3) step_and_check(10);
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised hi=%0d lo=%0d", sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(4000 * 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
