// tb_output_stage: runs a random result stream through all four modes and
// checks the block output (direct or one data cycle late) and the final
// adder operand (result or external bus).
module tb_output_stage;
  logic clk = 0, rst_n = 0, en = 0, delay_sel = 0, input_sel = 0;
  logic [15:0] acc_in = 0, ext_b = 0, result, operand_b, prev;
  int checks = 0, failures = 0;

  output_stage dut (.clk, .rst_n, .en, .delay_sel, .input_sel, .acc_in, .ext_b, .result, .operand_b);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev = 0;
    for (int n = 0; n < 400; n++) begin
      {delay_sel, input_sel} = 2'(n / 100);
      acc_in = 16'($urandom); ext_b = 16'($urandom);
      #1;
      exp_r = delay_sel ? prev : acc_in;
      checks += 2;
      if (result !== exp_r) begin failures++; $display("FAIL result mode=%0d", n / 100); end
      if (operand_b !== (input_sel ? ext_b : exp_r)) begin failures++; $display("FAIL operand mode=%0d", n / 100); end
      en = 1;
      @(negedge clk);
      prev = acc_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
