// pfd: behavioural model of the phase-frequency detector with its
// time-to-digital conversion (mixed-signal part, not synthesizable).
//
// The detector compares the rising edges of the local divided clock
// (clk_loc) with those of one neighbour or reference clock (clk_nb). Two
// edge processes timestamp the rising edges of each clock; at every falling
// edge of clk_loc the edges seen since the previous sample are replayed in
// time order through a tri-state PFD state machine: the first edge to arrive opens a window, the
// edge of the other clock closes it. The window width is the time
// difference; it is positive when the neighbour edge came first (the local
// clock lags and must speed up) and negative when the local edge came first.
// A window still open is measured up to the sampling instant, so a frequency
// difference drives the code into saturation in the right direction.
//
// Timing: the difference is quantized to RES_PS steps (rounded to nearest),
// saturated to the PFD_W-bit signed range and presented on `code` at every
// falling edge of clk_loc, so it is stable at the next rising edge, where the
// loop filter samples it. The 5-bit signed code and the 20 ps resolution
// follow the published design; the tri-state window, the rounding and the
// falling-edge sampling are choices of this model. rst_n (active low) clears
// the detector and the code.
module pfd
  import clkgen_pkg::*;
#(
  parameter real RES_PS = 20.0    // time resolution of one code step, ps
) (
  input  logic      rst_n,
  input  logic      clk_loc,      // local divided clock
  input  logic      clk_nb,       // neighbour or reference clock
  output pfd_code_t code          // signed time difference, RES_PS per step
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int CODE_MAX = (1 << (PFD_W - 1)) - 1;
  localparam int CODE_MIN = -(1 << (PFD_W - 1));

  localparam int HIST = 8;         // edge timestamps kept per clock

  // Rising-edge timestamps, written only by their own edge process.
  real  nb_t  [HIST];
  real  loc_t [HIST];
  int   nb_wr, loc_wr;

  // Tri-state detector state, owned by the sampling process.
  int   nb_rd, loc_rd;
  logic up, dn;          // window opened by neighbour / by local edge
  logic done;            // a window closed since the last sample
  real  t_open;          // time the open window started
  real  diff_done;       // width of the last closed window (signed)
  real  val;

  function automatic pfd_code_t quantize(real t);
    int n;
    if (t >= 0.0) n = $rtoi(t / RES_PS + 0.5);
    else          n = -$rtoi(-t / RES_PS + 0.5);
    if (n > CODE_MAX) n = CODE_MAX;
    if (n < CODE_MIN) n = CODE_MIN;
    return pfd_code_t'(n);
  endfunction

  initial begin
    foreach (nb_t[i]) begin nb_t[i] = 0.0; loc_t[i] = 0.0; end
    nb_wr = 0; loc_wr = 0;
  end

  always @(posedge clk_nb or negedge rst_n) begin
    if (!rst_n) nb_wr <= 0;
    else begin
      nb_t[nb_wr % HIST] <= $realtime;
      nb_wr <= nb_wr + 1;
    end
  end

  always @(posedge clk_loc or negedge rst_n) begin
    if (!rst_n) loc_wr <= 0;
    else begin
      loc_t[loc_wr % HIST] <= $realtime;
      loc_wr <= loc_wr + 1;
    end
  end

  // At each local falling edge, replay the edges recorded since the last
  // sample in time order through the tri-state detector, then sample.
  initial begin
    nb_rd = 0; loc_rd = 0; up = 1'b0; dn = 1'b0; done = 1'b0;
    t_open = 0.0; diff_done = 0.0; val = 0.0; code = '0;
  end

  always @(negedge clk_loc or negedge rst_n) begin
    if (!rst_n) begin
      nb_rd = 0; loc_rd = 0; up = 1'b0; dn = 1'b0; done = 1'b0; code = '0;
    end else begin
      // an overrun (more than HIST edges unread) drops the oldest edges
      if (nb_wr - nb_rd > HIST)   nb_rd  = nb_wr - HIST;
      if (loc_wr - loc_rd > HIST) loc_rd = loc_wr - HIST;
      while (nb_rd < nb_wr || loc_rd < loc_wr) begin
        if (loc_rd >= loc_wr ||
            (nb_rd < nb_wr && nb_t[nb_rd % HIST] <= loc_t[loc_rd % HIST])) begin
          // neighbour rising edge
          if (dn) begin                     // local came first: local leads
            diff_done = t_open - nb_t[nb_rd % HIST];
            done = 1'b1; dn = 1'b0;
          end else if (!up) begin
            up = 1'b1; t_open = nb_t[nb_rd % HIST];
          end
          nb_rd = nb_rd + 1;
        end else begin
          // local rising edge
          if (up) begin                     // neighbour came first: local lags
            diff_done = loc_t[loc_rd % HIST] - t_open;
            done = 1'b1; up = 1'b0;
          end else if (!dn) begin
            dn = 1'b1; t_open = loc_t[loc_rd % HIST];
          end
          loc_rd = loc_rd + 1;
        end
      end
      if (done)    val = diff_done;
      else if (up) val = $realtime - t_open;
      else if (dn) val = t_open - $realtime;
      else         val = 0.0;
      code = quantize(val);
      done = 1'b0;
    end
  end
endmodule
