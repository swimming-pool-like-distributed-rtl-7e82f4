// swimming_pool_network_tb: end-to-end test of the full 10 x 10 network at
// its default parameters.
//
// Every DCO gets a random mismatch trim of up to +-10 steps (+-23 MHz). For
// each of two loop-filter settings (overdamped: kp_sh=6, ki_sh=1;
// underdamped: kp_sh=4, ki_sh=2) the test
//   1. resets the network and leaves the loops open for 3 us (configuration
//      phase): the free-running clocks must drift apart from the reference;
//   2. stops the oscillators and restarts them together, in step with the
//      reference, with the loops closed, and waits for lock: for 50
//      consecutive reference cycles every divided clock within 100 ps of the
//      reference and every pair of adjacent nodes within a bound (60 ps,
//      three PFD steps, underdamped; 100 ps overdamped, whose proportional
//      gain leaves a larger limit cycle); the PFDs must saturate during
//      acquisition, and the overdamped setting must acquire faster. A
//      network that has not locked after 20 us ends the test;
//   3. after 2 us of settling, measures the steady-state errors over 1.6 us,
//      separately for the border ring and the kernel (underdamped: the
//      mean absolute error of the border must not exceed that of the
//      kernel);
//   4. perturbs node (x=3,y=5) with a +15 step trim (+34 MHz) for 0.5 us and records
//      the largest phase excursion at (3,5), (2,5) and the border node
//      (1,5). The border must stay within its steady-state error band, since
//      the ring does not listen to the kernel, while (3,5) must move by more
//      than 150 ps and recover.
// Phase errors are taken against the reference clock once per reference
// cycle, half a period after the reference edge. Mechanism counters are
// printed; each mechanism that never happened is a failure.
//
// The 10 x 10 size, topology, PFD step, DCO numbers and the CLK35
// perturbation site follow the design; the trims, gain values, perturbation
// size and the numeric bounds are choices of this test.
module swimming_pool_network_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import clkgen_pkg::*;

  localparam int  ROWS = 10;
  localparam int  COLS = 10;
  localparam real REF_PERIOD = 4000.0;   // DCO nominal / 4
  localparam int  PERTURB    = 15;       // perturbation, DCO steps
  localparam int  TRIM_MAX   = 10;       // mismatch spread, +-DCO steps

  logic   ref_clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   loop_en = 1'b0;
  shift_t kp_sh = 4'd6;
  shift_t ki_sh = 4'd1;
  trim_t  dco_trim [ROWS][COLS];
  logic   clk_hf   [ROWS][COLS];
  logic   clk_div  [ROWS][COLS];
  cw_t    cw       [ROWS][COLS];
  err_t   node_err [ROWS][COLS];

  int  checks = 0;
  int  failures = 0;
  real t_ref = 0.0;
  real t_last [ROWS][COLS];
  real perr   [ROWS][COLS];
  int  sample_cnt = 0;

  // mechanism counters
  int n_open_drift = 0, n_pfd_sat = 0, n_lock = 0, n_perturb = 0,
      n_ring_isolated = 0, n_reconfig = 0;

  swimming_pool_network dut (
    .ref_clk(ref_clk), .rst_n(rst_n), .loop_en(loop_en),
    .kp_sh(kp_sh), .ki_sh(ki_sh), .dco_trim(dco_trim),
    .clk_hf(clk_hf), .clk_div(clk_div), .cw(cw), .node_err(node_err)
  );

  initial #(777.0) forever #(REF_PERIOD / 2.0) ref_clk = ~ref_clk;

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      initial t_last[r][c] = 0.0;
      always @(posedge clk_div[r][c]) t_last[r][c] = $realtime;
      // a PFD at either end of its code range counts as saturated
      for (genvar k = 0; k < node_n_in(r, c, ROWS, COLS); k++) begin : g_k
        always @(posedge clk_div[r][c])
          if (loop_en && dut.g_row[r].g_col[c].u_node.g_pfd[k].u_pfd.code inside
                         {pfd_code_t'(15), pfd_code_t'(-16)})
            n_pfd_sat++;
      end
    end
  end

  // sample all phase errors half a reference period after each ref edge
  always @(posedge ref_clk) begin
    t_ref = $realtime;
    #(REF_PERIOD / 2.0);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        real e;
        e = t_last[r][c] - t_ref;
        while (e > REF_PERIOD / 2.0) e = e - REF_PERIOD;
        while (e <= -REF_PERIOD / 2.0) e = e + REF_PERIOD;
        perr[r][c] = e;
      end
    sample_cnt++;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic bit is_border(int r, int c);
    return (r == 0 || c == 0 || r == ROWS - 1 || c == COLS - 1);
  endfunction

  // largest |error| to the reference and largest difference between two
  // nodes joined by a link
  task automatic sample_stats(output real max_abs, output real max_nb,
                              output real max_border, output real max_kernel);
    max_abs = 0.0; max_nb = 0.0; max_border = 0.0; max_kernel = 0.0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        real a;
        a = absr(perr[r][c]);
        if (a > max_abs) max_abs = a;
        if (is_border(r, c)) begin if (a > max_border) max_border = a; end
        else if (a > max_kernel) max_kernel = a;
        if (c + 1 < COLS && absr(perr[r][c] - perr[r][c+1]) > max_nb)
          max_nb = absr(perr[r][c] - perr[r][c+1]);
        if (r + 1 < ROWS && absr(perr[r][c] - perr[r+1][c]) > max_nb)
          max_nb = absr(perr[r][c] - perr[r+1][c]);
      end
  endtask

  task automatic wait_samples(int n);
    int s0;
    s0 = sample_cnt;
    wait (sample_cnt >= s0 + n);
    #1;
  endtask

  task automatic run_setting(string name, int kp, int ki, real abs_lim, real NB_LIM,
                             bit check_border, output real lock_us);
    real mx_abs, mx_nb, mx_b, mx_k, ss_abs, ss_nb, ss_b, ss_k;
    real sum_b, sum_k, mean_b, mean_k;
    int  n_b, n_k;
    real dev35, dev25, dev15, base35, base25, base15;
    int  good, waited, sat0;
    kp_sh = shift_t'(kp);
    ki_sh = shift_t'(ki);
    loop_en = 1'b0;
    rst_n = 1'b0;
    #(20000.0);
    rst_n = 1'b1;
    // 1. open loop
    wait_samples(750);
    sample_stats(mx_abs, mx_nb, mx_b, mx_k);
    checks++;
    if (mx_nb > 500.0) n_open_drift++;
    else begin
      failures++;
      $display("FAIL %s: free-running clocks did not drift (max nb %0.1f ps)", name, mx_nb);
    end
    // 2. close the loops
    sat0 = n_pfd_sat;
    rst_n = 1'b0;                 // stop all oscillators
    @(posedge ref_clk);
    #(REF_PERIOD - 500.0);        // first DCO edge lands on a ref edge
    rst_n = 1'b1;
    loop_en = 1'b1;
    good = 0; waited = 0;
    while (good < 50 && waited < 5000) begin
      wait_samples(1);
      waited++;
      sample_stats(mx_abs, mx_nb, mx_b, mx_k);
      if (mx_abs < abs_lim && mx_nb <= NB_LIM) good++; else good = 0;
    end
    checks++;
    if (good >= 50) begin
      n_lock++;
      lock_us = real'(waited - 50) * REF_PERIOD / 1.0e6;
      $display("%s: network locked %0.2f us after the loops closed", name, lock_us);
    end else begin
      failures++;
      lock_us = 1.0e9;
      $display("FAIL %s: no lock after %0.1f us (max abs %0.1f ps, max nb %0.1f ps)",
               name, real'(waited) * REF_PERIOD / 1.0e6, mx_abs, mx_nb);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    checks++;
    if (n_pfd_sat == sat0) begin
      failures++;
      $display("FAIL %s: PFDs never saturated during acquisition", name);
    end
    // 3. steady state, after 2 us of settling
    wait_samples(500);
    ss_abs = 0.0; ss_nb = 0.0; ss_b = 0.0; ss_k = 0.0;
    sum_b = 0.0; sum_k = 0.0; n_b = 0; n_k = 0;
    repeat (400) begin
      wait_samples(1);
      sample_stats(mx_abs, mx_nb, mx_b, mx_k);
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (is_border(r, c)) begin sum_b += absr(perr[r][c]); n_b++; end
          else begin sum_k += absr(perr[r][c]); n_k++; end
      if (mx_abs > ss_abs) ss_abs = mx_abs;
      if (mx_nb > ss_nb) ss_nb = mx_nb;
      if (mx_b > ss_b) ss_b = mx_b;
      if (mx_k > ss_k) ss_k = mx_k;
    end
    $display("%s: steady state max |err| %0.1f ps (border %0.1f, kernel %0.1f), max neighbour diff %0.1f ps",
             name, ss_abs, ss_b, ss_k, ss_nb);
    mean_b = sum_b / real'(n_b);
    mean_k = sum_k / real'(n_k);
    $display("%s: steady state mean |err| border %0.1f ps, kernel %0.1f ps", name, mean_b, mean_k);
    checks++;
    if (ss_nb > NB_LIM || ss_abs >= abs_lim) begin
      failures++;
      $display("FAIL %s: steady-state error out of bounds", name);
    end
    checks++;
    if (check_border && mean_b > mean_k) begin
      failures++;
      $display("FAIL %s: border errors larger on average than kernel errors", name);
    end
    // 4. perturbation on node (x=3,y=5) = [row 4][col 2]
    base35 = perr[4][2]; base25 = perr[4][1]; base15 = perr[4][0];
    dev35 = 0.0; dev25 = 0.0; dev15 = 0.0;
    dco_trim[4][2] = trim_t'(int'(dco_trim[4][2]) + PERTURB);
    n_perturb++;
    repeat (625) begin            // 0.5 us perturbation, 2 us observation
      wait_samples(1);
      if (absr(perr[4][2] - base35) > dev35) dev35 = absr(perr[4][2] - base35);
      if (absr(perr[4][1] - base25) > dev25) dev25 = absr(perr[4][1] - base25);
      if (absr(perr[4][0] - base15) > dev15) dev15 = absr(perr[4][0] - base15);
      if (good == 50 + 125) dco_trim[4][2] = trim_t'(int'(dco_trim[4][2]) - PERTURB);
      good++;
    end
    $display("%s: perturbation excursion CLK35 %0.1f ps, CLK25 %0.1f ps, CLK15 %0.1f ps",
             name, dev35, dev25, dev15);
    checks++;
    if (dev35 < 150.0 || dev25 >= dev35) begin
      failures++;
      $display("FAIL %s: perturbation not seen as expected", name);
    end
    checks++;
    if (dev15 <= 2.0 * ss_b + 1.0) n_ring_isolated++;
    else begin
      failures++;
      $display("FAIL %s: border node CLK15 disturbed by %0.1f ps", name, dev15);
    end
    sample_stats(mx_abs, mx_nb, mx_b, mx_k);
    checks++;
    if (absr(perr[4][2]) > abs_lim || mx_nb > NB_LIM) begin
      failures++;
      $display("FAIL %s: no recovery after perturbation (CLK35 %0.1f ps, nb %0.1f ps)",
               name, perr[4][2], mx_nb);
    end
  endtask

  initial begin
    real lock_od, lock_ud;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        dco_trim[r][c] = trim_t'(int'($urandom_range(2 * TRIM_MAX)) - TRIM_MAX);
    run_setting("overdamped", 6, 1, 100.0, 100.0, 1'b0, lock_od);
    n_reconfig++;
    run_setting("underdamped", 4, 2, 100.0, 60.0, 1'b1, lock_ud);
    checks++;
    if (lock_od >= lock_ud) begin
      failures++;
      $display("FAIL overdamped setting did not acquire faster (%0.2f us vs %0.2f us)",
               lock_od, lock_ud);
    end
    $display("mechanisms: open_loop_drift=%0d pfd_saturation=%0d lock=%0d perturbation=%0d ring_isolated=%0d reconfiguration=%0d",
             n_open_drift, n_pfd_sat, n_lock, n_perturb, n_ring_isolated, n_reconfig);
    checks++;
    if (n_open_drift == 0 || n_pfd_sat == 0 || n_lock < 2 || n_perturb == 0 ||
        n_ring_isolated == 0 || n_reconfig == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(REF_PERIOD * 40000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
