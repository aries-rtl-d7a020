// tb_systolic_adder: checks sum = A + 2B + 4C + 8D (mod 2**13) one clock
// after the operands, in unsigned and two's complement mode, for the corner
// cases of the mode switch (negative operands, unsigned overflow) and random
// operands.
module tb_systolic_adder;
  logic clk = 0, rst_n = 0, tc = 0;
  logic [9:0] a = 0, b = 0, c = 0, d = 0;
  logic [12:0] sum_q;
  int checks = 0, failures = 0;

  systolic_adder dut (.clk, .rst_n, .tc, .a, .b, .c, .d, .sum_q);

  always #5 clk = ~clk;

  function automatic int val(input logic [9:0] x, input logic s);
    return s ? int'($signed(x)) : int'(x);
  endfunction

  task automatic apply(input logic [9:0] ia, ib, ic, id, input logic itc);
    logic [12:0] exp;
    a = ia; b = ib; c = ic; d = id; tc = itc;
    exp = 13'(val(ia, itc) + 2 * val(ib, itc) + 4 * val(ic, itc) + 8 * val(id, itc));
    @(negedge clk);
    checks++;
    if (sum_q !== exp) begin
      failures++;
      $display("FAIL tc=%0b %h %h %h %h -> %h exp %h", itc, ia, ib, ic, id, sum_q, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // -8 and -4*2 cancel +16 in two's complement; overflow in unsigned mode.
    apply(10'h3F8, 10'h3FC, 10'h004, 10'h000, 1);
    apply(10'h3F8, 10'h3FC, 10'h004, 10'h000, 0);
    apply(10'h3FF, 10'h3FF, 10'h3FF, 10'h3FF, 0);
    apply(10'h3FF, 10'h3FF, 10'h3FF, 10'h3FF, 1);
    apply(10'h200, 10'h200, 10'h200, 10'h200, 1);
    apply(10'h1FF, 10'h1FF, 10'h1FF, 10'h1FF, 1);
    for (int n = 0; n < 2000; n++)
      apply(10'($urandom), 10'($urandom), 10'($urandom), 10'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
