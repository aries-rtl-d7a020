// row_decoder: 5-bit RAM address to 32 one-hot wordlines, decoded in two
// stages.
//
// Stage one predecodes the three upper address bits into 8 lines with
// 3-input NOR gates on true/complemented bits, and the two lower bits into 4
// lines.  Stage two ANDs one line of each group (2-input AND) to drive row
// r = 4*upper + lower.  The original decoder uses inverters, 3-input NORs and
// 2-input ANDs in two stages; the split of the address bits between the two
// predecoders is this design's choice.  Combinational.
module row_decoder (
  input  logic [4:0]  addr,
  output logic [31:0] wordline
);
  logic [7:0] pre_hi;   // one-hot of addr[4:2]
  logic [3:0] pre_lo;   // one-hot of addr[1:0]

  always_comb begin
    // A NOR of the literals that must be 0 for line k.
    for (int k = 0; k < 8; k++) begin
      pre_hi[k] = ~((addr[4] ^ k[2]) | (addr[3] ^ k[1]) | (addr[2] ^ k[0]));
    end
    for (int k = 0; k < 4; k++) begin
      pre_lo[k] = ~((addr[1] ^ k[1]) | (addr[0] ^ k[0]));
    end
    for (int r = 0; r < 32; r++) begin
      wordline[r] = pre_hi[r/4] & pre_lo[r%4];
    end
  end
endmodule
