// brent_kung_adder: parallel-prefix adder with the Brent-Kung carry tree.
//
// Preprocessing forms generate g = a & b and propagate p = a ^ b per bit.
// The carry tree combines (G,P) pairs with the delta operator
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo
// first in an up-sweep over spans 1, 2, 4, ... and then in a down-sweep that
// fills the remaining positions, so bit i ends with the group generate of
// bits i..0.  Postprocessing is sum[i] = p[i] ^ G[i-1].  There is no carry in
// and, as in the original Aries adders, the final carry is not brought out: the sum
// is modulo 2**W.  Combinational.
module brent_kung_adder #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  logic [W-1:0] p0;
  logic [W-1:0] gg, pp;

  always_comb begin
    p0 = a ^ b;
    gg = a & b;
    pp = p0;
    // Up-sweep: position i = k*2l-1 absorbs the group ending at i-l.
    for (int l = 1; l < W; l = l * 2) begin
      for (int i = 2 * l - 1; i < W; i = i + 2 * l) begin
        gg[i] = gg[i] | (pp[i] & gg[i-l]);
        pp[i] = pp[i] & pp[i-l];
      end
    end
    // Down-sweep: positions 3l-1, 5l-1, ... take the prefix ending at i-l.
    for (int l = (1 << ($clog2(W) - 1)); l >= 1; l = l / 2) begin
      for (int i = 3 * l - 1; i < W; i = i + 2 * l) begin
        gg[i] = gg[i] | (pp[i] & gg[i-l]);
        pp[i] = pp[i] & pp[i-l];
      end
    end
    sum[0] = p0[0];
    for (int i = 1; i < W; i++) sum[i] = p0[i] ^ gg[i-1];
  end
endmodule
