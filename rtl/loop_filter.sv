// loop_filter: reconfigurable digital proportional-integral loop filter.
//
// Each rising edge of the local divided clock it takes the average phase
// error `err` and produces the DCO control word
//     I[n]  = I[n-1] + err[n] * 2^ki_sh
//     cw[n] = (err[n] * 2^kp_sh + I[n]) / 2^FRAC
// with the integrator clamped to the control-word range (anti-windup) and
// the output saturated to CW_W signed bits. The gains are power-of-two
// shifts set at run time (kp_sh, ki_sh), which is how the loop is
// reconfigured between damping settings. cw is registered: it changes one
// divided-clock cycle after the error it answers, which is the loop delay.
// While loop_en is low the loop is open: the integrator is held at zero and
// cw is zero, so the DCO runs at its free-running frequency (the
// configuration phase). A PI filter with programmable gains follows the
// published design; the shift gains, fixed-point format, clamping and the
// loop_en behaviour are choices of this implementation. rst_n is an
// asynchronous active-low reset.
module loop_filter
  import clkgen_pkg::*;
#(
  parameter int ACC_W = 24,       // accumulator width
  parameter int FRAC  = 8         // fractional bits of the accumulator
) (
  input  logic   clk,             // local divided clock
  input  logic   rst_n,
  input  logic   loop_en,         // 1: closed loop, 0: open loop
  input  shift_t kp_sh,           // proportional gain = 2^(kp_sh-FRAC)
  input  shift_t ki_sh,           // integral gain     = 2^(ki_sh-FRAC)
  input  err_t   err,             // average phase error
  output cw_t    cw               // DCO control word
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t CW_MAX  = acc_t'((1 << (CW_W - 1)) - 1);
  localparam acc_t CW_MIN  = -acc_t'(1 << (CW_W - 1));
  localparam acc_t INT_MAX = CW_MAX <<< FRAC;
  localparam acc_t INT_MIN = CW_MIN <<< FRAC;

  acc_t integ, integ_next, p_term, i_term, total, word;

  always_comb begin
    p_term     = acc_t'(err) <<< kp_sh;
    i_term     = acc_t'(err) <<< ki_sh;
    integ_next = integ + i_term;
    if (integ_next > INT_MAX) integ_next = INT_MAX;
    if (integ_next < INT_MIN) integ_next = INT_MIN;
    total = p_term + integ_next;
    word  = total >>> FRAC;
    if (word > CW_MAX) word = CW_MAX;
    if (word < CW_MIN) word = CW_MIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      cw    <= '0;
    end else if (!loop_en) begin
      integ <= '0;
      cw    <= '0;
    end else begin
      integ <= integ_next;
      cw    <= cw_t'(word);
    end
  end

  // The accumulator must hold the largest shifted error plus the clamp.
  if (ACC_W < ERR_W + (1 << SH_W) || ACC_W < CW_W + FRAC + 2) begin : g_bad_w
    $error("loop_filter: ACC_W too small");
  end
endmodule
