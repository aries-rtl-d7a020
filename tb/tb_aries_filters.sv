// tb_aries_filters: the filter arrays built from Aries blocks.
//  - 5x5 filter: 5 blocks, one per image row, tree of 2 + 3 operands.
//  - 9x9 filter: 18 blocks, two chained blocks per row (10 taps, 9 used),
//    tree of 18 operands (groups 2,2,2,3 per half, three adder levels).
//  - 17-operand adder tree: 17 single-row blocks (a 17x5 kernel), first
//    level 7 groups of two and one group of three.
// Both run at the same time from one clock and report their own checks; all
// four output-stage modes must appear in each tree.
module tb_aries_filters;
  logic clk = 0, rst_n = 0;
  int c5, f5, m5, c9, f9, m9, c17, f17, m17;
  logic d5, d9, d17;
  int checks, failures;

  aries_filter_check #(.ROWS(5), .BPR(1), .KTAPS(5), .CYCLES(600)) u_5x5 (
    .clk, .rst_n, .checks(c5), .failures(f5), .modes_used(m5), .done(d5));
  aries_filter_check #(.ROWS(9), .BPR(2), .KTAPS(9), .CYCLES(600)) u_9x9 (
    .clk, .rst_n, .checks(c9), .failures(f9), .modes_used(m9), .done(d9));
  aries_filter_check #(.ROWS(17), .BPR(1), .KTAPS(5), .CYCLES(600)) u_17 (
    .clk, .rst_n, .checks(c17), .failures(f17), .modes_used(m17), .done(d17));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c9 + c17, f5 + f9 + f17 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d5 && d9 && d17);
    checks = c5 + c9 + c17 + 3;
    failures = f5 + f9 + f17 + int'(m5 != 4) + int'(m9 != 4) + int'(m17 != 4);
    $display("5x5: checks=%0d failures=%0d modes=%0d out=block %0d latency=%0d", c5, f5, m5, u_5x5.out_blk, u_5x5.tree_lat);
    $display("9x9: checks=%0d failures=%0d modes=%0d out=block %0d latency=%0d", c9, f9, m9, u_9x9.out_blk, u_9x9.tree_lat);
    $display("17-operand tree: checks=%0d failures=%0d modes=%0d out=block %0d latency=%0d", c17, f17, m17, u_17.out_blk, u_17.tree_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
