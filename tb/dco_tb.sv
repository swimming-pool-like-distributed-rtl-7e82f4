// dco_tb: measures the DCO period for several control words and trims and
// compares it with 1e6 / (1000 + (cw + trim) * 2.26) ps, within 0.01 ps.
// Also checks that the output is held low while disabled and that the
// first rising edge comes half a nominal period after enable.
//
// The 1 GHz centre and 2.26 MHz step are the design's numbers; the enable
// behaviour checked here is this design's own addition.
module dco_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import clkgen_pkg::*;

  cw_t   cw = '0;
  trim_t trim = '0;
  logic  clk;
  int    checks = 0;
  int    failures = 0;

  logic  en = 1'b0;

  dco dut (.en(en), .cw(cw), .trim(trim), .clk(clk));

  int cws   [6] = '{0, 1, -1, 127, -128, 37};
  int trims [6] = '{0, 0, 5, -20, 10, -37};

  initial begin
    real t0, t1, exp_p, got_p;
    #(1000.0);
    checks++;
    if (clk !== 1'b0) begin failures++; $display("FAIL clock runs while disabled"); end
    en = 1'b1;
    t0 = $realtime;
    @(posedge clk);
    checks++;
    if ($realtime - t0 - 500.0 > 0.01 || t0 + 500.0 - $realtime > 0.01) begin
      failures++;
      $display("FAIL first edge %0.3f ps after enable, expected 500", $realtime - t0);
    end
    foreach (cws[i]) begin
      cw = cw_t'(cws[i]);
      trim = trim_t'(trims[i]);
      repeat (2) @(posedge clk);   // new value in effect
      @(posedge clk); t0 = $realtime;
      repeat (10) @(posedge clk); t1 = $realtime;
      got_p = (t1 - t0) / 10.0;
      exp_p = 1.0e6 / (1000.0 + real'(cws[i] + trims[i]) * 2.26);
      checks++;
      if (got_p - exp_p > 0.01 || exp_p - got_p > 0.01) begin
        failures++;
        $display("FAIL cw=%0d trim=%0d period=%0.4f expected=%0.4f",
                 cws[i], trims[i], got_p, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
