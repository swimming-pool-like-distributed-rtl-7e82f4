// clk_divider: divides the DCO clock by N to give the local divided clock.
//
// A modulo-N counter runs on the high-frequency clock; the output is high
// for the first N/2 counts and low for the rest, registered so it is free of
// glitches (50 % duty cycle, N even). The divided clock feeds the node's
// PFDs, the loop filter and the neighbouring nodes. Division by 4 follows the
// published design; the counter form is a choice of this implementation.
// rst_n (asynchronous, active low) clears the counter and the output; the
// first rising edge of clk_div comes one clk_in edge after reset release.
module clk_divider #(
  parameter int N = 4             // division ratio, even, >= 2
) (
  input  logic clk_in,            // DCO clock
  input  logic rst_n,
  output logic clk_div            // clk_in / N
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int CNT_W = (N > 2) ? $clog2(N) : 1;

  logic [CNT_W-1:0] cnt, cnt_next;

  always_comb begin
    cnt_next = (cnt == CNT_W'(N - 1)) ? '0 : cnt + 1'b1;
  end

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= CNT_W'(N - 1);
      clk_div <= 1'b0;
    end else begin
      cnt     <= cnt_next;
      clk_div <= (cnt_next < CNT_W'(N / 2));
    end
  end

  if (N < 2 || (N % 2) != 0) begin : g_bad_n
    $error("clk_divider: N must be even and at least 2");
  end
endmodule
