// adpll_node_tb: one ADPLL node with four PFDs (the corner configuration),
// every input tied to a 250 MHz reference. The DCO is given a trim of +20
// steps (+45.2 MHz). With the loop open the divided clock must run at
// (1000 + 20 * 2.26) / 4 MHz. With the loop closed the node must pull in
// (the PFDs saturate during acquisition), lock within 3 us, then keep its
// phase error against the reference within +-20 ps (one PFD step plus
// rounding), with the integrator cancelling the trim: cw = -20 +- 1.
//
// The 20 ps step, 1 GHz / 2.26 MHz DCO and divide-by-4 are the design's
// numbers; the trim, the gains and the lock bounds are choices of this test.
module adpll_node_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import clkgen_pkg::*;

  localparam real REF_PERIOD = 4000.0;

  logic   ref_clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   loop_en = 1'b0;
  shift_t kp_sh = 4'd6;
  shift_t ki_sh = 4'd1;
  trim_t  trim = trim_t'(20);
  logic   nb [4];
  logic   clk_hf, clk_div;
  cw_t    cw;
  err_t   err;
  int     checks = 0;
  int     failures = 0;
  real    t_ref = 0.0, t_prev_div = 0.0, perr = 0.0, period = 0.0;
  int     sat_seen = 0;

  assign nb[0] = ref_clk;
  assign nb[1] = ref_clk;
  assign nb[2] = ref_clk;
  assign nb[3] = ref_clk;

  adpll_node #(.N_IN(4)) dut (
    .rst_n(rst_n), .loop_en(loop_en), .kp_sh(kp_sh), .ki_sh(ki_sh),
    .trim(trim), .nb_clk(nb), .clk_hf(clk_hf), .clk_div(clk_div),
    .cw(cw), .err(err)
  );

  initial #(1234.0) forever #(REF_PERIOD / 2.0) ref_clk = ~ref_clk;

  always @(posedge ref_clk) t_ref = $realtime;

  always @(posedge clk_div) begin
    period = $realtime - t_prev_div;
    t_prev_div = $realtime;
    perr = $realtime - t_ref;
    if (perr > REF_PERIOD / 2.0) perr = perr - REF_PERIOD;
    if (loop_en && (err == err_t'(15 * 4) || err == err_t'(-16 * 4))) sat_seen++;
  end

  initial begin
    real exp_period;
    int  lock_cycles, good;
    #(10000.0);
    rst_n = 1'b1;
    repeat (20) @(posedge clk_div);
    // open loop: free-running frequency
    exp_period = 4.0e6 / (1000.0 + 20.0 * 2.26);
    checks++;
    if (period - exp_period > 0.01 || exp_period - period > 0.01) begin
      failures++;
      $display("FAIL open-loop period %0.3f expected %0.3f", period, exp_period);
    end
    checks++;
    if (cw != '0) begin
      failures++;
      $display("FAIL open-loop cw=%0d", cw);
    end
    // close the loop and wait for 100 consecutive cycles within 20 ps
    loop_en = 1'b1;
    lock_cycles = 0; good = 0;
    while (good < 100 && lock_cycles < 750) begin
      @(posedge clk_div);
      #1;
      lock_cycles++;
      if (perr < 20.0 && perr > -20.0) good++; else good = 0;
    end
    checks++;
    if (good < 100) begin
      failures++;
      $display("FAIL no lock after %0d cycles, perr=%0.1f cw=%0d", lock_cycles, perr, cw);
    end else begin
      $display("locked after %0d divided cycles (%0.2f us)", lock_cycles - 100,
               real'(lock_cycles - 100) * REF_PERIOD / 1.0e6);
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL PFD saturation never seen during acquisition");
    end
    // steady state
    repeat (200) begin
      @(posedge clk_div);
      #1;
      checks++;
      if (perr >= 20.0 || perr <= -20.0 || cw > cw_t'(-19) || cw < cw_t'(-21)) begin
        failures++;
        $display("FAIL steady state perr=%0.1f cw=%0d", perr, cw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(REF_PERIOD * 3000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
