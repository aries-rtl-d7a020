// tb_brent_kung_adder: checks the prefix adder at the two widths the block
// uses (10 and 13 bits) against the modulo sum of the operands, for corner
// vectors (full carry ripple) and random operands.
module tb_brent_kung_adder;
  logic [9:0]  a10, b10, s10;
  logic [12:0] a13, b13, s13;
  int checks = 0, failures = 0;

  brent_kung_adder #(.W(10)) dut10 (.a(a10), .b(b10), .sum(s10));
  brent_kung_adder #(.W(13)) dut13 (.a(a13), .b(b13), .sum(s13));

  task automatic check(input logic [9:0] x10, y10, input logic [12:0] x13, y13);
    a10 = x10; b10 = y10; a13 = x13; b13 = y13;
    #1;
    checks += 2;
    if (s10 !== 10'(x10 + y10)) begin
      failures++;
      $display("FAIL W10 %0d+%0d -> %0d", x10, y10, s10);
    end
    if (s13 !== 13'(x13 + y13)) begin
      failures++;
      $display("FAIL W13 %0d+%0d -> %0d", x13, y13, s13);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(10'h001, 10'h3FF, 13'h0001, 13'h1FFF);
    check(10'h3FF, 10'h3FF, 13'h1FFF, 13'h1FFF);
    check(10'h155, 10'h0AB, 13'h0AAA, 13'h0556);
    check(10'h000, 10'h000, 13'h0000, 13'h0000);
    for (int i = 0; i < 13; i++) check(10'(1 << (i % 10)), 10'h3FF, 13'(1 << i), 13'h1FFF);
    for (int n = 0; n < 2000; n++) check(10'($urandom), 10'($urandom), 13'($urandom), 13'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
