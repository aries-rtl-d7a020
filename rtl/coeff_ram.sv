// coeff_ram: 32 x 10-bit dual-port RAM holding the conditional coefficient
// sums, with registered read outputs.
//
// Word w holds the sum of the coefficients c_i whose tap bit i is set in w
// (so word 0 holds 0 once loaded).  Each of the two read ports has its own
// row decoder and serves one bit plane; both ports read in every fast clock
// cycle when rd_en is high, and their 10-bit results are captured in the
// output pipeline registers at the next rising clock edge (one cycle read
// latency).  While rd_en is low the output registers hold.
// Writes use port A's address: in a cycle with we high, wr_data is stored in
// the row addressed by addr_a at the rising edge.  In the original chip the write is
// unclocked and lasts as long as the write signal; here it is a synchronous
// write, which is this design's choice.  The array is not reset; it must be
// loaded before use.
module coeff_ram
  import aries_pkg::*;
#(
  parameter int unsigned WORD_W = COEF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_en,
  input  logic              we,
  input  logic [4:0]        addr_a,
  input  logic [4:0]        addr_b,
  input  logic [WORD_W-1:0] wr_data,
  output logic [WORD_W-1:0] q_a,
  output logic [WORD_W-1:0] q_b
);
  logic [WORD_W-1:0] mem [RAM_DEPTH];
  logic [31:0]       wl_a, wl_b;
  logic [WORD_W-1:0] rd_a, rd_b;

  row_decoder u_dec_a (.addr(addr_a), .wordline(wl_a));
  row_decoder u_dec_b (.addr(addr_b), .wordline(wl_b));

  // Read: the selected row drives the shared bitlines of its port.
  always_comb begin
    rd_a = '0;
    rd_b = '0;
    for (int r = 0; r < RAM_DEPTH; r++) begin
      if (wl_a[r]) rd_a = rd_a | mem[r];
      if (wl_b[r]) rd_b = rd_b | mem[r];
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < RAM_DEPTH; r++) begin
      if (we && wl_a[r]) mem[r] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_a <= '0;
      q_b <= '0;
    end else if (rd_en) begin
      q_a <= rd_a;
      q_b <= rd_b;
    end
  end

  // A read may not follow a write directly: the bitlines need an idle cycle.
  assert property (@(posedge clk) disable iff (!rst_n) we |=> !rd_en)
    else $error("coeff_ram: read directly after write");
  assert property (@(posedge clk) disable iff (!rst_n) !(we && rd_en))
    else $error("coeff_ram: read and write in the same cycle");
endmodule
