// tb_input_registers: shifts random samples in (with shift_en gaps), keeps a
// model of the 5-sample window, and checks the taps, the cascade output and
// the four RAM addresses for low nibble, high nibble and external address.
module tb_input_registers;
  import aries_pkg::*;
  logic clk = 0, rst_n = 0, shift_en = 0, hi_nibble = 0, ext_sel = 0;
  logic [7:0] din = 0, cascade_out;
  logic [4:0] ext_addr = 0;
  logic [4:0][7:0] taps;
  logic [3:0][4:0] addr;
  logic [7:0] win [5];
  int checks = 0, failures = 0;

  input_registers dut (.clk, .rst_n, .shift_en, .din, .hi_nibble, .ext_sel, .ext_addr,
                       .taps, .cascade_out, .addr);

  always #5 clk = ~clk;

  function automatic logic [4:0] plane_addr(input int j, input logic hi);
    logic [4:0] r;
    for (int i = 0; i < 5; i++) r[i] = win[i][(hi ? 4 : 0) + j];
    return r;
  endfunction

  task automatic check_all();
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (taps[i] !== win[i]) begin failures++; $display("FAIL tap%0d=%h exp %h", i, taps[i], win[i]); end
    end
    checks++;
    if (cascade_out !== win[4]) begin failures++; $display("FAIL cascade"); end
    for (int h = 0; h < 2; h++) begin
      hi_nibble = h[0]; ext_sel = 0; #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (addr[j] !== plane_addr(j, h[0])) begin
          failures++; $display("FAIL addr[%0d] hi=%0d = %b exp %b", j, h, addr[j], plane_addr(j, h[0]));
        end
      end
    end
    ext_sel = 1; ext_addr = 5'($urandom); #1;
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (addr[j] !== ext_addr) begin failures++; $display("FAIL ext addr[%0d]", j); end
    end
    ext_sel = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) win[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) check_all();
    for (int n = 0; n < 100; n++) begin
      shift_en = ($urandom % 4) != 0;
      din = 8'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int i = 4; i > 0; i--) win[i] = win[i-1];
        win[0] = din;
      end
      @(negedge clk) check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
