// tb_accumulator: feeds low- and high-nibble results in alternating fast
// cycles with the block's enable pattern and checks the registered output
// ((lo + hi*16) mod 2**17) >> 1, lo sign-extended in two's complement mode.
module tb_accumulator;
  logic clk = 0, rst_n = 0, tc = 0, phase = 0;
  logic [12:0] sys_in = 0;
  logic [15:0] acc_q;
  int checks = 0, failures = 0;

  accumulator dut (.clk, .rst_n, .tc, .lo_en(~phase), .out_en(phase), .sys_in, .acc_q);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0] lo, hi;
    logic [16:0] full;
    int lov, hiv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      lo = 13'($urandom); hi = 13'($urandom);
      if (n < 4) begin lo = (n % 2) ? 13'h1FFF : 13'h1000; hi = 13'h1FFF; end
      tc = 1'($urandom);
      lov = tc ? int'($signed(lo)) : int'(lo);
      hiv = tc ? int'($signed(hi)) : int'(hi);
      full = 17'(lov + 16 * hiv);
      phase = 0; sys_in = lo;       // low result present: captured at this edge
      @(negedge clk);
      phase = 1; sys_in = hi;       // high result present: sum registered
      @(negedge clk);
      checks++;
      if (acc_q !== full[16:1]) begin
        failures++;
        $display("FAIL tc=%0b lo=%h hi=%h -> %h exp %h", tc, lo, hi, acc_q, full[16:1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
