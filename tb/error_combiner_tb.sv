// error_combiner_tb: checks the averaging of PFD codes for the three node
// variants (2, 3 and 4 inputs) on random and extreme codes. The reference
// value is computed in floating point: trunc(4 * sum / N).
//
// Averaging the PFD codes is the design's rule; the two fractional bits and
// rounding toward zero are this design's own choices, and the test models them.
module error_combiner_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import clkgen_pkg::*;

  pfd_code_t c4 [4];
  pfd_code_t c3 [3];
  pfd_code_t c2 [2];
  err_t      a4, a3, a2;
  int        checks = 0;
  int        failures = 0;

  error_combiner #(.N_IN(4)) u4 (.code(c4), .avg(a4));
  error_combiner #(.N_IN(3)) u3 (.code(c3), .avg(a3));
  error_combiner #(.N_IN(2)) u2 (.code(c2), .avg(a2));

  function automatic int ref_avg(int s, int n);
    return $rtoi(real'(s) * 4.0 / real'(n));
  endfunction

  task automatic check(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d expected=%0d", tag, got, exp);
    end
  endtask

  initial begin
    int s;
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < 4; k++) begin
        int v;
        v = (t == 0) ? 15 : (t == 1) ? -16 : int'($urandom_range(31)) - 16;
        c4[k] = pfd_code_t'(v);
        if (k < 3) c3[k] = pfd_code_t'(v);
        if (k < 2) c2[k] = pfd_code_t'(v);
      end
      #1;
      s = 0; for (int k = 0; k < 4; k++) s += int'(c4[k]);
      check("n4", int'(a4), ref_avg(s, 4));
      s = 0; for (int k = 0; k < 3; k++) s += int'(c3[k]);
      check("n3", int'(a3), ref_avg(s, 3));
      s = 0; for (int k = 0; k < 2; k++) s += int'(c2[k]);
      check("n2", int'(a2), ref_avg(s, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
