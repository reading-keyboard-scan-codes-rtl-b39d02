// scancode_shift_reg: serial-to-parallel conversion of PS/2 frames.
//
// On every sys_clk cycle in which shift_en is high (one cycle per falling edge
// of the keyboard clock) the current keyboard data bit enters the most
// significant end of a 10-bit register and everything else moves one place
// down. Bits arrive least significant first, so after the eleventh shift of a
// frame the start bit has passed through the whole register and been dropped,
// bits 7..0 hold the scan code, bit 8 the parity bit and bit 9 the stop bit.
// There is no bit counter and no parity check: the register always holds the
// last ten bits received, which lines up with a frame again as soon as one
// whole frame has been received, whatever came before.
//
// Interface: sys_clk; shift_en, the one-cycle falling-edge strobe; kb_data_s,
// the synchronised data line; sr, the register contents. sr changes one
// sys_clk edge after shift_en is seen high. The register powers up at 0.
module scancode_shift_reg
  import kbd_pkg::*;
(
  input  logic                sys_clk,
  input  logic                shift_en,
  input  logic                kb_data_s,
  output logic [SR_WIDTH-1:0] sr
);

  logic [SR_WIDTH-1:0] sr_q = '0;

  always_ff @(posedge sys_clk)
    if (shift_en)
      sr_q <= {kb_data_s, sr_q[SR_WIDTH-1:1]};

  assign sr = sr_q;

endmodule
