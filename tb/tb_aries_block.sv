// tb_aries_block: end-to-end test of one Aries block at its default sizes.
//
// 1. Loads a set of unsigned coefficients in initialization mode (the RAM
//    word for pattern w is the sum of c_i over the set bits i of w) and
//    streams random 8-bit samples, one per data cycle, through all four
//    output-stage modes, with random values on the chaining inputs.
// 2. Interrupts computation to reload signed coefficients, switches to two's
//    complement mode and streams again.
// Every data cycle the block output is compared with the convolution
//   y = sum_i c_i * x_(n-i), truncated to bits 16..1 of its 17-bit value,
// from a window two data cycles old (three with the delay selected); the
// final adder sum with ext_a + operand, one data cycle later; and the
// cascade output with the sample four data cycles old.  One result per data
// cycle (two fast clocks) is the block's rate.  Mechanisms exercised are
// counted and one that never happens counts as a failure.
module tb_aries_block;
  import aries_pkg::*;
  localparam int N = 4096;

  logic        clk = 0, rst_n = 0, mode = 0, tc = 0, delay_sel = 0, input_sel = 0;
  logic [7:0]  din = 0;
  logic [4:0]  ext_addr = 0;
  logic [9:0]  wr_data = 0;
  logic [15:0] ext_a = 0, ext_b = 0;
  logic        sample_en;
  logic [7:0]  cascade_out;
  logic [15:0] result, sum;

  aries_block dut (.clk, .rst_n, .mode, .tc, .delay_sel, .input_sel, .din, .ext_addr, .wr_data,
                   .ext_a, .ext_b, .sample_en, .cascade_out, .result, .sum);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int coef [5];
  int m = 0;                    // data-clock edges since the start of streaming
  int valid_from = 0;           // first edge whose window holds only known samples
  logic [7:0]  xs   [N];        // sample loaded at edge k
  logic [15:0] res_exp [N];     // expected result after edge k
  logic [15:0] xa   [N], xb [N];
  logic        dsel [N], isel [N];
  // Mechanism counters.
  int n_load = 0, n_reload = 0, n_unsigned = 0, n_signed_neg = 0, n_cascade = 0;
  int n_mode [4];

  always begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int window_sum(input int k);
    int s = 0;
    for (int i = 0; i < 5; i++) s += coef[i] * int'(xs[k-i]);
    return s;
  endfunction

  function automatic logic [15:0] trunc16(input int v);
    logic [16:0] f = 17'(v);
    return f[16:1];
  endfunction

  task automatic load_coefficients(input bit signed_c);
    logic [9:0] word;
    mode = 1;
    repeat (2) @(negedge clk);           // stop reads, idle cycle
    for (int w = 0; w < 32; w++) begin
      int s = 0;
      for (int i = 0; i < 5; i++) if (w[i]) s += coef[i];
      word = 10'(s);
      ext_addr = 5'(w); wr_data = word;
      repeat (2) @(negedge clk);          // one data cycle per word
    end
    mode = 0;
  endtask

  // One data cycle: drive inputs for edge m+1, take the edge, check.
  task automatic data_cycle();
    int k;
    logic [15:0] opb;
    while (!sample_en) @(negedge clk);
    k = m + 1;
    xs[k] = 8'($urandom);
    xa[k] = 16'($urandom); xb[k] = 16'($urandom);
    din = xs[k]; ext_a = xa[k]; ext_b = xb[k];
    dsel[k] = delay_sel; isel[k] = input_sel;
    @(posedge clk);
    m = k;
    #1;
    if (k >= valid_from + 3) begin
      int y = window_sum(k - (delay_sel ? 3 : 2));
      res_exp[k] = trunc16(y);
      checks++;
      if (result !== res_exp[k]) begin
        failures++;
        $display("FAIL result edge %0d mode %0d%0d: %h exp %h", k, delay_sel, input_sel, result, res_exp[k]);
      end
      n_mode[{delay_sel, input_sel}]++;
      if (tc) begin if (y < 0) n_signed_neg++; end
      else n_unsigned++;
    end
    // Final adder: operands captured at edge k were ext_a(k) and the
    // operand chosen during the cycle before edge k.
    if (k >= valid_from + 4) begin
      opb = isel[k] ? xb[k] : trunc16(window_sum(k - 1 - (dsel[k] ? 3 : 2)));
      checks++;
      if (sum !== 16'(xa[k] + opb)) begin
        failures++;
        $display("FAIL sum edge %0d: %h exp %h", k, sum, 16'(xa[k] + opb));
      end
    end
    if (k >= valid_from + 4) begin
      checks++;
      n_cascade++;
      if (cascade_out !== xs[k-4]) begin failures++; $display("FAIL cascade edge %0d", k); end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Unsigned coefficients, sum at most 510 so nothing overflows.
    for (int i = 0; i < 5; i++) coef[i] = 1 + int'($urandom % 102);
    tc = 0;
    load_coefficients(0);
    n_load++;
    repeat (4) @(negedge clk);
    valid_from = m + 5;
    for (int n = 0; n < 1200; n++) begin
      {delay_sel, input_sel} = 2'(n / 300);
      data_cycle();
    end
    // Reload with signed coefficients and switch to two's complement.
    for (int i = 0; i < 5; i++) coef[i] = int'($urandom % 101) - 50;
    coef[0] = -50;
    tc = 1;
    load_coefficients(1);
    n_reload++;
    repeat (4) @(negedge clk);
    valid_from = m + 5;
    for (int n = 0; n < 1200; n++) begin
      {delay_sel, input_sel} = 2'(3 - n / 300);
      data_cycle();
    end
    if (n_load == 0)      begin failures++; $display("never: coefficient load"); end
    if (n_reload == 0)    begin failures++; $display("never: coefficient update during operation"); end
    if (n_unsigned == 0)  begin failures++; $display("never: unsigned mode result"); end
    if (n_signed_neg == 0) begin failures++; $display("never: negative two's complement result"); end
    if (n_cascade == 0)   begin failures++; $display("never: cascade output"); end
    for (int i = 0; i < 4; i++) if (n_mode[i] == 0) begin failures++; $display("never: output mode %0d", i); end
    $display("mechanisms: load=%0d reload=%0d unsigned=%0d signed_negative=%0d cascade=%0d modes=%0d/%0d/%0d/%0d",
             n_load, n_reload, n_unsigned, n_signed_neg, n_cascade, n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
