// systolic_adder: shift-adds the four bit-plane sums of one nibble,
//   sum = A + 2*B + 4*C + 8*D,
// where A..D are the 10-bit conditional sums read for bit planes 0..3.
//
// The operands are first aligned to 13 bits.  In two's complement mode
// (tc = 1) the missing upper bits of A (3 bits), B (2) and C (1) are filled
// with the operand's top bit through one AND gate per operand; in unsigned
// mode they are 0.  Two carry-save rows of full adders reduce the four
// aligned operands to a sum and a carry vector, and a 13-bit Brent-Kung
// adder without carry out adds these two.  The result is modulo 2**13, so an
// unsigned sum above 8191 overflows, as in the original chip.  It is captured in the
// 13-bit output pipeline register at every rising clk edge (fast clock),
// giving one cycle of latency.
// The original adder uses a half-adder row followed by full-adder rows and
// a 10-bit carry-propagate section over the upper bits; this version reduces
// all 13 columns with two full-adder rows and a 13-bit prefix adder, which
// computes the same sum.
module systolic_adder
  import aries_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tc,     // 1 = operands are two's complement
  input  logic [COEF_W-1:0] a,      // bit plane 0
  input  logic [COEF_W-1:0] b,      // bit plane 1
  input  logic [COEF_W-1:0] c,      // bit plane 2
  input  logic [COEF_W-1:0] d,      // bit plane 3
  output logic [SYS_W-1:0]  sum_q
);
  logic              sa, sb, sc;    // sign fill bits (AND gates)
  logic [SYS_W-1:0]  ea, eb, ec, ed;
  logic [SYS_W-1:0]  s1, c1, s2, c2;
  logic [SYS_W-1:0]  c1_sh, c2_sh;
  logic [SYS_W-1:0]  sum;

  always_comb begin
    sa = tc & a[COEF_W-1];
    sb = tc & b[COEF_W-1];
    sc = tc & c[COEF_W-1];
    ea = {{3{sa}}, a};
    eb = {{2{sb}}, b, 1'b0};
    ec = {sc, c, 2'b0};
    ed = {d, 3'b0};
    c1_sh = {c1[SYS_W-2:0], 1'b0};
    c2_sh = {c2[SYS_W-2:0], 1'b0};
  end

  // First carry-save row: A + 2B + 4C.  Second row: adds 8D and the carries.
  for (genvar i = 0; i < SYS_W; i++) begin : g_csa
    full_adder u_row1 (.a(ea[i]), .b(eb[i]), .cin(ec[i]),    .sum(s1[i]), .cout(c1[i]));
    full_adder u_row2 (.a(s1[i]), .b(ed[i]), .cin(c1_sh[i]), .sum(s2[i]), .cout(c2[i]));
  end

  brent_kung_adder #(.W(SYS_W)) u_cpa (.a(s2), .b(c2_sh), .sum(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_q <= '0;
    else        sum_q <= sum;
  end
endmodule
