// swimming_pool_network: ROWS x COLS network of coupled ADPLLs giving one
// local clock per synchronous clock area of a large SoC, all in phase.
//
// Topology ("swimming pool"): the outer ring of nodes forms a bidirectionally
// coupled chain. Each non-corner ring node compares only with its two ring
// neighbours, and each corner node with its two ring neighbours and the
// reference clock, so the ring is a synchronous loop pinned to the reference
// at its four corners. Every ring node drives the kernel node next to it
// through a one-way link: kernel nodes compare with all four neighbours,
// border ones included, but the ring never listens to the kernel. Phase
// error waves in the kernel therefore end at the ring instead of being
// reflected back, like water spilling into a pool's overflow channel.
// Which clock feeds which PFD is computed by clkgen_pkg::node_src().
//
// Interface: ref_clk is the reference at the divided-clock frequency (DCO
// nominal / DIV_N). kp_sh, ki_sh and loop_en are shared by all nodes;
// dco_trim gives each DCO a frequency offset (mismatch or perturbation).
// clk_hf are the local clocks, clk_div the divided clocks exchanged between
// nodes, cw the control words. Indices are [row][col]. The 10 x 10 size,
// the topology and the node structure follow the published design; the
// reference frequency and the shared configuration are choices of this
// implementation. PFD and DCO inside the nodes are behavioural models.
module swimming_pool_network
  import clkgen_pkg::*;
#(
  parameter int  ROWS     = 10,
  parameter int  COLS     = 10,
  parameter int  DIV_N    = 4,
  parameter real RES_PS   = 20.0,
  parameter real F0_MHZ   = 1000.0,
  parameter real STEP_MHZ = 2.26
) (
  input  logic   ref_clk,                  // reference, F0_MHZ / DIV_N
  input  logic   rst_n,
  input  logic   loop_en,                  // 1: closed loop
  input  shift_t kp_sh,
  input  shift_t ki_sh,
  input  trim_t  dco_trim [ROWS][COLS],    // per-node DCO offset
  output logic   clk_hf   [ROWS][COLS],    // local clocks
  output logic   clk_div  [ROWS][COLS],    // divided clocks
  output cw_t    cw       [ROWS][COLS],    // DCO control words
  output err_t   node_err [ROWS][COLS]     // average phase errors (monitor)
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NODES = ROWS * COLS;

  logic src [NODES+1];     // divided clocks of all nodes, then the reference

  assign src[NODES] = ref_clk;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int NIN = node_n_in(r, c, ROWS, COLS);

      logic nb [NIN];

      for (genvar k = 0; k < NIN; k++) begin : g_in
        assign nb[k] = src[node_src(r, c, k, ROWS, COLS)];
      end

      adpll_node #(
        .N_IN    (NIN),
        .DIV_N   (DIV_N),
        .RES_PS  (RES_PS),
        .F0_MHZ  (F0_MHZ),
        .STEP_MHZ(STEP_MHZ)
      ) u_node (
        .rst_n  (rst_n),
        .loop_en(loop_en),
        .kp_sh  (kp_sh),
        .ki_sh  (ki_sh),
        .trim   (dco_trim[r][c]),
        .nb_clk (nb),
        .clk_hf (clk_hf[r][c]),
        .clk_div(clk_div[r][c]),
        .cw     (cw[r][c]),
        .err    (node_err[r][c])
      );

      assign src[r * COLS + c] = clk_div[r][c];
    end
  end

  if (ROWS < 3 || COLS < 3) begin : g_bad_size
    $error("swimming_pool_network: ROWS and COLS must be at least 3");
  end
endmodule
