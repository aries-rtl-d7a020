// tb_ram_control: drives the mode bit through initialization sequences and
// checks state, read, write and address-select outputs every cycle against
// the expected READ -> IDLE_W -> WRITE -> IDLE_R -> READ sequence.
module tb_ram_control;
  import aries_pkg::*;
  logic       clk = 0, rst_n = 0, mode = 0;
  logic       rd_en, we, ext_sel;
  ram_state_t state;
  int checks = 0, failures = 0;

  ram_control dut (.clk, .rst_n, .mode, .rd_en, .we, .ext_sel, .state);

  always #5 clk = ~clk;

  task automatic expect_out(input ram_state_t s, input logic r, w, e);
    checks++;
    if (state !== s || rd_en !== r || we !== w || ext_sel !== e) begin
      failures++;
      $display("FAIL t=%0t state=%0d rd=%0b we=%0b ext=%0b exp %0d %0b %0b %0b",
               $time, state, rd_en, we, ext_sel, s, r, w, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) expect_out(RC_READ, 1, 0, 0);
    // Long initialization: 5 write cycles.
    mode = 1;
    #1 expect_out(RC_READ, 0, 0, 0);        // reads stop at once
    @(negedge clk) expect_out(RC_IDLE_W, 0, 0, 1);
    for (int k = 0; k < 5; k++) @(negedge clk) expect_out(RC_WRITE, 0, 1, 1);
    mode = 0;
    #1 expect_out(RC_WRITE, 0, 1, 1);
    @(negedge clk) expect_out(RC_IDLE_R, 0, 0, 1);
    @(negedge clk) expect_out(RC_READ, 1, 0, 0);
    @(negedge clk) expect_out(RC_READ, 1, 0, 0);
    // One-cycle pulse of mode: no write happens.
    mode = 1;
    @(negedge clk) expect_out(RC_IDLE_W, 0, 0, 1);
    mode = 0;
    @(negedge clk) expect_out(RC_IDLE_R, 0, 0, 1);
    @(negedge clk) expect_out(RC_READ, 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
