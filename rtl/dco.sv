// dco: behavioural model of the digitally controlled oscillator (analog
// part, not synthesizable).
//
// The output frequency is F0_MHZ + (cw + trim) * STEP_MHZ. cw is the
// control word from the loop filter; trim is a static or slowly varying
// offset in the same steps that stands for process mismatch between the
// oscillators of different nodes and lets a test inject a perturbation. The
// frequency is re-evaluated at every half period, so a new control word takes
// effect within half a DCO period. The nominal 1 GHz and the 2.26 MHz mean
// step follow the published design; the linear tuning law, the control-word
// width, the trim input and the enable are choices of this model. While en
// is low the output is held low; when en rises the oscillator starts from
// phase zero, its first rising edge half a period later (after an extra
// PHASE0_PS delay), so oscillators enabled together start in phase.
module dco
  import clkgen_pkg::*;
#(
  parameter real F0_MHZ    = 1000.0,  // nominal frequency, MHz
  parameter real STEP_MHZ  = 2.26,    // frequency step per code, MHz
  parameter real PHASE0_PS = 0.0      // start delay of the first edge, ps
) (
  input  logic  en,               // 1: oscillate, 0: stopped, output low
  input  cw_t   cw,               // control word
  input  trim_t trim,             // mismatch / perturbation offset, codes
  output logic  clk               // oscillator output
);
  timeunit 1ps;
  timeprecision 1fs;

  real f_mhz;
  real half_ps;

  initial clk = 1'b0;

  always begin
    if (!en) begin
      clk = 1'b0;
      @(posedge en);
      #(PHASE0_PS);
    end
    f_mhz = F0_MHZ + (real'(cw) + real'(trim)) * STEP_MHZ;
    if (f_mhz < 1.0) f_mhz = 1.0;
    half_ps = 1.0e6 / (2.0 * f_mhz);
    #(half_ps);
    if (en) clk = ~clk;
  end
endmodule
