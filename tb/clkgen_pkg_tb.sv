// clkgen_pkg_tb: checks the network topology computed by clkgen_pkg for a
// 10 x 10 and a 5 x 7 grid, against rules written out independently:
//   * every source of a node is the reference or a grid neighbour at
//     distance 1, and no source repeats except the reference;
//   * kernel nodes listen to 4 neighbours, ring nodes to their 2 ring
//     neighbours only (never to a kernel node), corners to 2 ring neighbours
//     and twice to the reference;
//   * the number of one-way links from the ring into the kernel is
//     2*(ROWS-2) + 2*(COLS-2) and the reference is used 8 times.
//
// The ring-to-kernel one-way rule and the reference at the corners are the
// topology of the design; the double reference input of a corner is this
// design's own choice, and the 5 x 7 grid is an extra case chosen here.
module clkgen_pkg_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import clkgen_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic expect_eq(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  function automatic bit on_ring(int r, int c, int rows, int cols);
    return r == 0 || c == 0 || r == rows - 1 || c == cols - 1;
  endfunction

  task automatic check_grid(int rows, int cols);
    int n_ref, n_ring_to_kernel, n_bad;
    n_ref = 0; n_ring_to_kernel = 0; n_bad = 0;
    for (int r = 0; r < rows; r++) begin
      for (int c = 0; c < cols; c++) begin
        bit ring, corner;
        int n, exp_n, n_nb;
        int seen [$];
        ring   = on_ring(r, c, rows, cols);
        corner = (r == 0 || r == rows - 1) && (c == 0 || c == cols - 1);
        exp_n  = corner ? 4 : (ring ? 2 : 4);
        n = node_n_in(r, c, rows, cols);
        expect_eq($sformatf("%0dx%0d n_in(%0d,%0d)", rows, cols, r, c), n, exp_n);
        n_nb = 0;
        for (int k = 0; k < n; k++) begin
          int s, sr, sc, mdist;
          s = node_src(r, c, k, rows, cols);
          if (s == rows * cols) begin
            n_ref++;
            if (!corner) n_bad++;
            continue;
          end
          sr = s / cols; sc = s % cols;
          mdist = ((sr > r) ? sr - r : r - sr) + ((sc > c) ? sc - c : c - sc);
          if (mdist != 1) n_bad++;
          if (ring && !on_ring(sr, sc, rows, cols)) n_bad++;   // ring hears kernel
          if (!ring && on_ring(sr, sc, rows, cols)) n_ring_to_kernel++;
          foreach (seen[i]) if (seen[i] == s) n_bad++;
          seen.push_back(s);
          n_nb++;
        end
        expect_eq($sformatf("%0dx%0d neighbours(%0d,%0d)", rows, cols, r, c), n_nb,
                  corner ? 2 : (ring ? 2 : 4));
      end
    end
    expect_eq($sformatf("%0dx%0d rule violations", rows, cols), n_bad, 0);
    expect_eq($sformatf("%0dx%0d reference inputs", rows, cols), n_ref, 8);
    expect_eq($sformatf("%0dx%0d ring-to-kernel links", rows, cols), n_ring_to_kernel,
              2 * (rows - 2) + 2 * (cols - 2));
  endtask

  initial begin
    check_grid(10, 10);
    check_grid(5, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
