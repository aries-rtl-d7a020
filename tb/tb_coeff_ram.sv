// tb_coeff_ram: loads all 32 words through the write port, waits the idle
// cycle, then reads random addresses on both ports and checks each port's
// data one clock after its address (registered read).  Also checks that the
// output registers hold while rd_en is low.
module tb_coeff_ram;
  logic       clk = 0, rst_n = 0, rd_en = 0, we = 0;
  logic [4:0] addr_a = 0, addr_b = 0;
  logic [9:0] wr_data = 0, q_a, q_b;
  logic [9:0] model [32];
  int checks = 0, failures = 0;

  coeff_ram dut (.clk, .rst_n, .rd_en, .we, .addr_a, .addr_b, .wr_data, .q_a, .q_b);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] pa, pb;
    logic [9:0] hold_a, hold_b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Load: every row gets a random word.
    for (int r = 0; r < 32; r++) begin
      model[r] = 10'($urandom);
      @(negedge clk);
      we = 1; addr_a = 5'(r); addr_b = 5'(31 - r); wr_data = model[r];
    end
    @(negedge clk) we = 0;
    @(negedge clk) rd_en = 1;
    // Random reads: compare one cycle later.
    for (int n = 0; n < 300; n++) begin
      pa = 5'($urandom); pb = 5'($urandom);
      addr_a = pa; addr_b = pb;
      @(negedge clk);
      checks += 2;
      if (q_a !== model[pa]) begin failures++; $display("FAIL A[%0d]=%h exp %h", pa, q_a, model[pa]); end
      if (q_b !== model[pb]) begin failures++; $display("FAIL B[%0d]=%h exp %h", pb, q_b, model[pb]); end
    end
    // Hold with rd_en low.
    hold_a = q_a; hold_b = q_b;
    rd_en = 0; addr_a = ~addr_a; addr_b = ~addr_b;
    repeat (3) @(negedge clk);
    checks++;
    if (q_a !== hold_a || q_b !== hold_b) begin failures++; $display("FAIL outputs changed with rd_en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
