// output_stage: chooses how the block result joins a cascaded adder tree.
//
// acc_in is the registered block result from the accumulator.  A delay
// register, loaded at every data-clock edge (en), holds it one more data
// cycle.  Multiplexer 1 (delay_sel) picks the direct or the delayed result;
// that choice is the block output `result`.  Multiplexer 2 (input_sel) picks
// either `result` or the external bus ext_b as the second operand of the
// final adder (operand_b, registered there).  Modes, as in the original mode
// table:  delay_sel/input_sel = 00 no delay, internal; 01 no delay, external;
// 10 one stage delay, internal; 11 one stage delay, external.
//
// The structure and the mode encoding follow the original output stage; the
// register behind multiplexer 2 is kept in final_adder.
module output_stage
  import aries_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             delay_sel,
  input  logic             input_sel,
  input  logic [OUT_W-1:0] acc_in,
  input  logic [OUT_W-1:0] ext_b,
  output logic [OUT_W-1:0] result,
  output logic [OUT_W-1:0] operand_b
);
  logic [OUT_W-1:0] delay_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  delay_q <= '0;
    else if (en) delay_q <= acc_in;
  end

  always_comb begin
    result    = delay_sel ? delay_q : acc_in;
    operand_b = input_sel ? ext_b : result;
  end
endmodule
