// tb_final_adder: random and carry-chain operands are registered at an
// enabled edge and their modulo 2**16 sum is checked after it; with en low
// the sum must not change.
module tb_final_adder;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] ext_a = 0, operand_b = 0, sum;
  int checks = 0, failures = 0;

  final_adder dut (.clk, .rst_n, .en, .ext_a, .operand_b, .sum);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] x, y, s_prev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      x = 16'($urandom); y = 16'($urandom);
      if (n == 0) begin x = 16'h0001; y = 16'hFFFF; end
      if (n == 1) begin x = 16'h00FF; y = 16'h0001; end
      if (n == 2) begin x = 16'h7FFF; y = 16'h7FFF; end
      ext_a = x; operand_b = y; en = 1;
      @(negedge clk);
      checks++;
      if (sum !== 16'(x + y)) begin failures++; $display("FAIL %h+%h -> %h", x, y, sum); end
      // Hold: new operands without en.
      s_prev = sum; en = 0; ext_a = ~x; operand_b = 16'($urandom);
      @(negedge clk);
      checks++;
      if (sum !== s_prev) begin failures++; $display("FAIL sum changed with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
