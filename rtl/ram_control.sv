// ram_control: turns the single mode bit into the RAM read and write signals.
//
// mode = 0 is computation mode (RAM read every fast cycle), mode = 1 is
// initialization mode (coefficient load).  Raising mode stops reads at once
// and passes through one idle cycle before write is asserted; from then on
// the input multiplexers select the external address bus (ext_sel) and every
// fast cycle writes the write bus into the addressed row.  Lowering mode ends
// the write and inserts one more idle cycle before reads resume, which the
// RAM needs to recover its bitlines after a write.
// States: READ -> IDLE_W -> WRITE -> IDLE_R -> READ.  The idle-cycle rule
// and the sequence follow the original design; the exact one-cycle idle
// lengths and the state encoding are this design's choice.  Registered
// outputs derive from the state register; asynchronous active-low reset to
// READ.
module ram_control
  import aries_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode,     // 1 = initialization mode
  output logic       rd_en,
  output logic       we,
  output logic       ext_sel,  // input muxes select the external address
  output ram_state_t state
);
  ram_state_t next;

  always_comb begin
    next = state;
    unique case (state)
      RC_READ:   if (mode) next = RC_IDLE_W;
      RC_IDLE_W: next = mode ? RC_WRITE : RC_IDLE_R;
      RC_WRITE:  if (!mode) next = RC_IDLE_R;
      RC_IDLE_R: next = RC_READ;
      default:   next = RC_READ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= RC_READ;
    else        state <= next;
  end

  always_comb begin
    // Reads stop in the same cycle mode rises.
    rd_en   = (state == RC_READ) && !mode;
    we      = (state == RC_WRITE);
    ext_sel = (state != RC_READ);
  end

  assert property (@(posedge clk) disable iff (!rst_n) we |=> !rd_en)
    else $error("ram_control: no idle cycle after write");
endmodule
