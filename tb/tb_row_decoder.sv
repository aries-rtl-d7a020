// tb_row_decoder: every address must raise exactly its own wordline.
module tb_row_decoder;
  logic [4:0]  addr;
  logic [31:0] wordline;
  int checks = 0, failures = 0;

  row_decoder dut (.addr, .wordline);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      addr = 5'(v);
      #1;
      checks++;
      if (wordline !== (32'd1 << v)) begin
        failures++;
        $display("FAIL addr=%0d wordline=%h", v, wordline);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
