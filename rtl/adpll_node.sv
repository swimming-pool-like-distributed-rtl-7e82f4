// adpll_node: one local clock generator of the distributed network (an
// all-digital PLL whose reference is the set of neighbouring clocks).
//
// Structure: N_IN phase-frequency detectors compare the local divided clock
// with the divided clocks of the neighbours this node listens to (or with
// the reference clock); the error combiner averages their codes; the PI loop
// filter turns the average into a DCO control word; the DCO produces the
// local high-frequency clock, which also feeds the clock tree of this node's
// synchronous area; a divide-by-DIV_N counter gives the divided clock used in
// the feedback path and sent to the neighbours. The PFDs, combiner and loop
// filter run on the local divided clock.
//
// Timing: PFD codes change on the falling edge of clk_div, the loop filter
// registers the new control word on the next rising edge, and the DCO takes
// it within half a DCO period. rst_n low stops the DCO and clears the
// divider, PFDs and loop filter; releasing it starts the oscillator from
// phase zero, so nodes released together start in phase. This structure follows the published design;
// N_IN selects the kernel (4), border (2) or corner (3) variant, as set by
// the network. The PFD and DCO are behavioural models.
module adpll_node
  import clkgen_pkg::*;
#(
  parameter int  N_IN      = 4,       // number of compared clocks
  parameter int  DIV_N     = 4,       // feedback division ratio
  parameter real RES_PS    = 20.0,    // PFD resolution, ps
  parameter real F0_MHZ    = 1000.0,  // DCO nominal frequency, MHz
  parameter real STEP_MHZ  = 2.26,    // DCO step, MHz
  parameter real PHASE0_PS = 0.0      // DCO start delay, ps
) (
  input  logic   rst_n,
  input  logic   loop_en,             // 1: closed loop, 0: free running
  input  shift_t kp_sh,               // loop filter proportional shift
  input  shift_t ki_sh,               // loop filter integral shift
  input  trim_t  trim,                // DCO mismatch / perturbation offset
  input  logic   nb_clk [N_IN],       // compared clocks (neighbours / ref)
  output logic   clk_hf,              // local high-frequency clock
  output logic   clk_div,             // local divided clock
  output cw_t    cw,                  // DCO control word (monitor)
  output err_t   err                  // average phase error (monitor)
);
  timeunit 1ps;
  timeprecision 1fs;

  pfd_code_t code [N_IN];

  for (genvar k = 0; k < N_IN; k++) begin : g_pfd
    pfd #(.RES_PS(RES_PS)) u_pfd (
      .rst_n  (rst_n),
      .clk_loc(clk_div),
      .clk_nb (nb_clk[k]),
      .code   (code[k])
    );
  end

  error_combiner #(.N_IN(N_IN)) u_comb (
    .code(code),
    .avg (err)
  );

  loop_filter u_lf (
    .clk    (clk_div),
    .rst_n  (rst_n),
    .loop_en(loop_en),
    .kp_sh  (kp_sh),
    .ki_sh  (ki_sh),
    .err    (err),
    .cw     (cw)
  );

  dco #(
    .F0_MHZ   (F0_MHZ),
    .STEP_MHZ (STEP_MHZ),
    .PHASE0_PS(PHASE0_PS)
  ) u_dco (
    .en  (rst_n),
    .cw  (cw),
    .trim(trim),
    .clk (clk_hf)
  );

  clk_divider #(.N(DIV_N)) u_div (
    .clk_in (clk_hf),
    .rst_n  (rst_n),
    .clk_div(clk_div)
  );
endmodule
