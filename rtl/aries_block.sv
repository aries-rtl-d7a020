// aries_block: one Aries macro-block, a programmable 5x1 convolution of
// 8-bit unsigned samples,  y = sum_{i=0..4} c_(i+1) * x_i,  without
// multipliers.
//
// Method: the samples are split into bit planes.  For bit plane j the five
// bits b_(i,j) of the window form a 5-bit address, and a RAM word holds the
// pre-computed conditional sum of the coefficients whose bit is set, so
//   y = sum_j 2^j * RAM[b_(4,j) .. b_(0,j)].
// The samples are processed one nibble per fast clock cycle: the low nibble
// (bit planes 0..3) and then the high nibble (4..7) go through the same four
// RAM ports and the same systolic shift-adder, and the accumulator adds the
// high result shifted by 4 to the low one.
//
// Clocking: clk is the fast internal processing clock (2f).  The data clock
// f is represented by an internal phase bit: a new sample is taken from din
// at every second rising clk edge, the one where sample_en is high.  All
// data-rate registers (shift register, accumulator result, output stage,
// final adder operands) load at those edges; the RAM output and systolic
// adder registers load at every edge.  One sample per data cycle, i.e. one
// per two clk cycles.  The original chip has two clocks with the fast clock's
// level steering the nibble multiplexers; a single clock with an enable is
// this design's choice.
//
// Pipeline (data cycles counted from the sample_en edge that loads the
// newest sample x_0 of a window): result is valid after the 2nd following
// sample_en edge with delay_sel = 0 (3rd with delay_sel = 1); sum is valid
// one data cycle after result was presented to the final adder.
//
// Modes: mode = 1 is initialization.  The RAM control stops reads, waits an
// idle cycle, then writes wr_data into the row ext_addr of both dual-port
// RAMs at every clk edge; after mode returns to 0 an idle cycle precedes the
// first read.  tc = 1 treats the stored sums as two's complement (negative
// coefficients).  delay_sel and input_sel set the output stage (see
// output_stage).  ext_a and ext_b are the inputs used to chain blocks.
module aries_block
  import aries_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode,
  input  logic              tc,
  input  logic              delay_sel,
  input  logic              input_sel,
  input  logic [DATA_W-1:0] din,
  input  logic [ADDR_W-1:0] ext_addr,
  input  logic [COEF_W-1:0] wr_data,
  input  logic [OUT_W-1:0]  ext_a,
  input  logic [OUT_W-1:0]  ext_b,
  output logic              sample_en,
  output logic [DATA_W-1:0] cascade_out,
  output logic [OUT_W-1:0]  result,
  output logic [OUT_W-1:0]  sum
);
  logic                         hi_phase;
  logic                         rd_en, we, ext_sel;
  ram_state_t                   rc_state;
  logic [TAPS-1:0][DATA_W-1:0]  taps;
  logic [NIB_W-1:0][ADDR_W-1:0] addr;
  logic [NIB_W-1:0][COEF_W-1:0] plane_sum;
  logic [SYS_W-1:0]             sys_q;
  logic [OUT_W-1:0]             acc_q;
  logic [OUT_W-1:0]             operand_b;

  // Phase 0: low nibble on the RAM addresses; phase 1: high nibble, and the
  // clock edge that ends phase 1 is a data-clock edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hi_phase <= 1'b0;
    else        hi_phase <= ~hi_phase;
  end
  assign sample_en = hi_phase;

  ram_control u_ctrl (
    .clk, .rst_n, .mode, .rd_en, .we, .ext_sel, .state(rc_state)
  );

  input_registers u_in (
    .clk, .rst_n, .shift_en(hi_phase), .din, .hi_nibble(hi_phase),
    .ext_sel, .ext_addr, .taps, .cascade_out, .addr
  );

  // Two dual-port RAMs: bit planes 0/1 and 2/3 of the current nibble.
  coeff_ram u_ram0 (
    .clk, .rst_n, .rd_en, .we, .addr_a(addr[0]), .addr_b(addr[1]),
    .wr_data, .q_a(plane_sum[0]), .q_b(plane_sum[1])
  );
  coeff_ram u_ram1 (
    .clk, .rst_n, .rd_en, .we, .addr_a(addr[2]), .addr_b(addr[3]),
    .wr_data, .q_a(plane_sum[2]), .q_b(plane_sum[3])
  );

  systolic_adder u_sys (
    .clk, .rst_n, .tc, .a(plane_sum[0]), .b(plane_sum[1]),
    .c(plane_sum[2]), .d(plane_sum[3]), .sum_q(sys_q)
  );

  accumulator u_acc (
    .clk, .rst_n, .tc, .lo_en(~hi_phase), .out_en(hi_phase),
    .sys_in(sys_q), .acc_q
  );

  output_stage u_out (
    .clk, .rst_n, .en(hi_phase), .delay_sel, .input_sel,
    .acc_in(acc_q), .ext_b, .result, .operand_b
  );

  final_adder u_fin (
    .clk, .rst_n, .en(hi_phase), .ext_a, .operand_b, .sum
  );
endmodule
