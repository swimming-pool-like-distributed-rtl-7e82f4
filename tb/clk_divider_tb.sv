// clk_divider_tb: counts input clock edges between output edges. The output
// of the divide-by-4 counter must have a period of 4 input cycles and be high
// for 2 of them, starting after reset. A divide-by-6 instance is checked too.
//
// Divide-by-4 is the design's ratio; N=6 is an extra case chosen here to
// exercise the parameter.
module clk_divider_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic div4, div6;
  int   checks = 0;
  int   failures = 0;
  int   cnt = 0;
  int   hi4 = 0, lo4 = 0, hi6 = 0, lo6 = 0;

  clk_divider #(.N(4)) u4 (.clk_in(clk), .rst_n(rst_n), .clk_div(div4));
  clk_divider #(.N(6)) u6 (.clk_in(clk), .rst_n(rst_n), .clk_div(div6));

  initial forever #500 clk = ~clk;

  // sample both outputs just before each input rising edge
  initial begin
    int prev4, prev6, run4, run6;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    prev4 = -1; prev6 = -1; run4 = 0; run6 = 0;
    repeat (120) begin
      @(negedge clk);
      if (int'(div4) == prev4) run4++;
      else begin
        if (prev4 >= 0) begin
          checks++;
          if (run4 != 2) begin
            failures++;
            $display("FAIL div4 level %0d lasted %0d cycles", prev4, run4);
          end
          if (prev4 == 1) hi4++; else lo4++;
        end
        prev4 = int'(div4); run4 = 1;
      end
      if (int'(div6) == prev6) run6++;
      else begin
        if (prev6 >= 0) begin
          checks++;
          if (run6 != 3) begin
            failures++;
            $display("FAIL div6 level %0d lasted %0d cycles", prev6, run6);
          end
          if (prev6 == 1) hi6++; else lo6++;
        end
        prev6 = int'(div6); run6 = 1;
      end
    end
    checks++;
    if (hi4 < 20 || lo4 < 20 || hi6 < 15 || lo6 < 15) begin
      failures++;
      $display("FAIL too few transitions %0d %0d %0d %0d", hi4, lo4, hi6, lo6);
    end
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
