// pfd_tb: self-checking test of the phase-frequency detector model.
//
// Two 250 MHz clocks are generated, the neighbour clock shifted so that its
// rising edge comes d ps before the local one (d < 0: after). For each d the
// code sampled at a local rising edge must equal round(d / 20 ps) saturated
// to -16..15. A neighbour clock that runs faster must then give mostly
// positive codes (frequency detection), a slower one mostly negative codes.
//
// The 5-bit code and the 20 ps step are the design's; the sign convention,
// rounding and saturation checked here are this design's own choices.
module pfd_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import clkgen_pkg::*;

  localparam real PERIOD = 4000.0;
  localparam real RES    = 20.0;

  logic      rst_n = 1'b0;
  logic      clk_loc = 1'b0;
  logic      clk_nb = 1'b0;
  pfd_code_t code;
  int        checks = 0;
  int        failures = 0;
  real       d_ps = 0.0;          // neighbour lead, ps
  real       nb_period = PERIOD;
  bit        locked_nb = 1'b1;    // nb follows loc with an offset

  pfd #(.RES_PS(RES)) dut (
    .rst_n  (rst_n),
    .clk_loc(clk_loc),
    .clk_nb (clk_nb),
    .code   (code)
  );

  // Local clock: rising edges at k*PERIOD + PERIOD/2.
  initial forever #(PERIOD / 2.0) clk_loc = ~clk_loc;

  // Neighbour clock: rising edge d_ps before each local rising edge, or a
  // free-running clock of period nb_period.
  always @(posedge clk_loc) begin
    if (locked_nb) begin
      fork
        begin
          #(PERIOD - d_ps) clk_nb = 1'b1;
          #(PERIOD / 2.0) clk_nb = 1'b0;
        end
      join_none
    end
  end

  initial begin
    wait (!locked_nb);
    forever #(nb_period / 2.0) clk_nb = ~clk_nb;
  end

  function automatic int expected(real d);
    int n;
    n = (d >= 0.0) ? $rtoi(d / RES + 0.5) : -$rtoi(-d / RES + 0.5);
    if (n > 15) n = 15;
    if (n < -16) n = -16;
    return n;
  endfunction

  real offsets [12] = '{0.0, 5.0, -5.0, 33.0, -47.0, 90.0, -150.0, 299.0,
                        -305.0, 500.0, -700.0, 12.0};
  int  pos, neg;

  initial begin
    repeat (3) @(posedge clk_loc);
    rst_n = 1'b1;
    foreach (offsets[i]) begin
      d_ps = offsets[i];
      repeat (4) @(posedge clk_loc);
      checks++;
      if (int'(code) != expected(d_ps)) begin
        failures++;
        $display("FAIL d=%0.1f ps code=%0d expected=%0d", d_ps, code, expected(d_ps));
      end
    end
    // Frequency detection: neighbour 5 % faster, then 5 % slower.
    locked_nb = 1'b0;
    nb_period = PERIOD * 0.95;
    pos = 0; neg = 0;
    repeat (80) begin
      @(posedge clk_loc);
      if (code > 0) pos++;
      if (code < 0) neg++;
    end
    checks++;
    if (pos < 3 * neg || pos < 40) begin
      failures++;
      $display("FAIL faster neighbour: pos=%0d neg=%0d", pos, neg);
    end
    nb_period = PERIOD * 1.05;
    repeat (20) @(posedge clk_loc);
    pos = 0; neg = 0;
    repeat (80) begin
      @(posedge clk_loc);
      if (code > 0) pos++;
      if (code < 0) neg++;
    end
    checks++;
    if (neg < 3 * pos || neg < 40) begin
      failures++;
      $display("FAIL slower neighbour: pos=%0d neg=%0d", pos, neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 1000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
