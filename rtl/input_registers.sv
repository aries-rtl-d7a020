// input_registers: the 5 x 8-bit input shift register and the address
// multiplexers that turn its contents into four bit-plane RAM addresses.
//
// On every data-clock edge (shift_en high at a rising clk edge) a new sample
// enters tap 0 and the older samples move one tap deeper; the sample leaving
// tap 4 is brought out on cascade_out so a neighbouring block can continue
// the window along the X axis.  Behind each tap a 3:1 multiplexer selects the
// low nibble (hi_nibble = 0), the high nibble (hi_nibble = 1) or the external
// address bus (ext_sel = 1).  Address j (bit plane j of the selected nibble)
// collects bit j of the selected nibble of every tap, tap i giving address
// bit i.  With ext_sel high all four addresses equal ext_addr, so one
// external address reaches every RAM port for loading.
// The mapping of tap i to address bit i (and so to coefficient c_(i+1)) is
// this design's choice.  Taps reset to 0 (asynchronous, active low).
module input_registers
  import aries_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        shift_en,
  input  logic [DATA_W-1:0]           din,
  input  logic                        hi_nibble,
  input  logic                        ext_sel,
  input  logic [ADDR_W-1:0]           ext_addr,
  output logic [TAPS-1:0][DATA_W-1:0] taps,
  output logic [DATA_W-1:0]           cascade_out,
  output logic [NIB_W-1:0][ADDR_W-1:0] addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps <= '0;
    end else if (shift_en) begin
      taps <= {taps[TAPS-2:0], din};
    end
  end

  assign cascade_out = taps[TAPS-1];

  always_comb begin
    for (int j = 0; j < NIB_W; j++) begin
      for (int i = 0; i < TAPS; i++) begin
        if (ext_sel)        addr[j][i] = ext_addr[i];
        else if (hi_nibble) addr[j][i] = taps[i][NIB_W + j];
        else                addr[j][i] = taps[i][j];
      end
    end
  end
endmodule
