// final_adder: 16-bit adder used to chain the results of several blocks.
//
// Both operands are registered at the data-clock edge (en): ext_a, which
// always comes from outside the block, and operand_b from the output stage.
// The registered operands are added by a ripple-carry adder of full-adder
// cells built as two 8-bit halves, the carry out of the lower half feeding
// the upper half.  Carry in is 0 and the final carry is dropped, so the sum
// is modulo 2**16.  The sum is combinational from the operand registers; the
// next block in the tree registers it as its ext_a or ext_b, so each tree
// level costs one data cycle.
//
// The ripple-carry structure, the 8-bit halves and the zero carry in follow
// the original; keeping the sum unregistered follows its register count (two
// 16-bit operand registers), read as this design's interpretation.
module final_adder
  import aries_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [OUT_W-1:0] ext_a,
  input  logic [OUT_W-1:0] operand_b,
  output logic [OUT_W-1:0] sum
);
  localparam int unsigned HALF = OUT_W / 2;

  logic [OUT_W-1:0] a_q, b_q;
  logic [OUT_W:0]   carry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (en) begin
      a_q <= ext_a;
      b_q <= operand_b;
    end
  end

  assign carry[0] = 1'b0;

  // Lower half: bits 0..HALF-1.
  for (genvar i = 0; i < HALF; i++) begin : g_lo
    full_adder u_fa (.a(a_q[i]), .b(b_q[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1]));
  end

  // Upper half: continues from the lower half's carry out, carry[HALF].
  for (genvar i = HALF; i < OUT_W; i++) begin : g_hi
    full_adder u_fa (.a(a_q[i]), .b(b_q[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1]));
  end

  // carry[OUT_W], the overflow out of bit 15, is left unconnected.
endmodule
