// accumulator: joins the low-nibble and high-nibble results of one sample
// window into the 16-bit block result.
//
// The systolic adder's registered output (sys_in) carries the low-nibble
// result in one fast cycle and the high-nibble result in the next.  The
// internal register captures sys_in at a rising clk edge where lo_en is high
// (the low-nibble result is present).  In the following cycle the adder forms
//   sum17 = lo + (hi << 4)
// with lo sign-extended by 4 bits (one AND gate, tc = 1) or zero-extended:
// sum17[3:0] are lo[3:0] and sum17[16:4] come from a 13-bit Brent-Kung adder.
// At the next data-clock edge (out_en) the result register takes
// sum17[16:1]: the LSB is dropped to give a 16-bit output, which truncates
// (rounds positive values down and negative values up).  In the other cycle
// the adder sums a stale pair; that result is never sampled.
//
// The adder, the 4-bit sign fill and the LSB truncation follow the original
// accumulator; driving its two register clocks as enables of one clock is
// this design's choice.
module accumulator
  import aries_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tc,
  input  logic             lo_en,   // capture the low-nibble result
  input  logic             out_en,  // data-clock edge: register the sum
  input  logic [SYS_W-1:0] sys_in,
  output logic [OUT_W-1:0] acc_q
);
  logic [SYS_W-1:0] lo_q;
  logic             fill;
  logic [SYS_W-1:0] lo_upper;     // lo[16:4] after extension
  logic [SYS_W-1:0] upper_sum;
  logic [ACC_W-1:0] sum17;

  always_comb begin
    fill     = tc & lo_q[SYS_W-1];
    lo_upper = {{NIB_W{fill}}, lo_q[SYS_W-1:NIB_W]};
  end

  brent_kung_adder #(.W(SYS_W)) u_add (.a(sys_in), .b(lo_upper), .sum(upper_sum));

  assign sum17 = {upper_sum, lo_q[NIB_W-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_q  <= '0;
      acc_q <= '0;
    end else begin
      if (lo_en)  lo_q  <= sys_in;
      if (out_en) acc_q <= sum17[ACC_W-1:1];
    end
  end
endmodule
