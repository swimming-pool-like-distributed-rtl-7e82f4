// error_combiner: adds the PFD codes of one node and forms their average.
//
// The node's phase comparison block averages the phase errors against the
// neighbours it listens to (four in the kernel, two on the border ring,
// three at a corner where the reference is one of them). The average keeps
// ERR_FRAC fractional bits: avg = (sum * 2^ERR_FRAC) / N_IN, rounded toward
// zero, so it is expressed in quarter PFD steps. Averaging follows the
// published design; the fixed-point format is a choice of this
// implementation. Purely combinational.
module error_combiner
  import clkgen_pkg::*;
#(
  parameter int N_IN = 4          // number of PFD codes, 1..MAX_IN
) (
  input  pfd_code_t code [N_IN],  // PFD codes
  output err_t      avg           // average error, ERR_FRAC fractional bits
);
  timeunit 1ps;
  timeprecision 1fs;

  int sum;

  always_comb begin
    sum = 0;
    for (int k = 0; k < N_IN; k++) sum = sum + int'(code[k]);
    avg = err_t'((sum * (1 << ERR_FRAC)) / N_IN);
  end

  if (N_IN < 1 || N_IN > MAX_IN) begin : g_bad_n
    $error("error_combiner: N_IN must be 1..%0d", MAX_IN);
  end
endmodule
