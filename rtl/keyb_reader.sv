// keyb_reader: PS/2 keyboard scan-code reader for the XS/XStend boards.
//
// A PC/AT keyboard sends each scan code as an 11-bit serial frame on its own
// clock (roughly 10-30 kHz), valid on the falling clock edge. This design
// samples both keyboard lines with the much faster board clock, turns each
// falling edge of the keyboard clock into a one-cycle enable, and shifts the
// data line into a 10-bit register on that enable. Everything runs on sys_clk.
//
//   kb_clk, kb_data -> kb_sync -> kb_clk_fall_detect -> scancode_shift_reg
//   shift register bits 7..0 -> inverted -> db (bargraph)
//   shift register bits 7..0 -> digit_seg_decoder -> rsb (right digit)
//
// The bargraph is active low, so inverting the register makes each 1 bit
// light its segment. The right digit shows 0-9 for the digit keys and E for
// any other code. Neither display is registered: they follow the register
// while a frame is shifting in and settle when the frame is complete. The
// four chip selects (fcs, rlcs, rrcs, sdcs) are held at 1 to keep the other
// devices on the board off the shared pins.
//
// Timing: a falling edge of kb_clk between two sys_clk rising edges is
// registered by the first of them and shifts the register at the second, so
// the displays show a complete scan code two sys_clk cycles after the frame's
// eleventh falling edge (one more per extra synchroniser stage).
// The synchroniser depth is this design's parameter; the reference uses one.
module keyb_reader
  import kbd_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 1
) (
  input  logic          sys_clk,
  input  logic          kb_clk,
  input  logic          kb_data,
  output logic [7:0]    db,
  output logic [6:0]    rsb,
  output logic          fcs,
  output logic          rlcs,
  output logic          rrcs,
  output logic          sdcs
);

  logic                kb_clk_s, kb_data_s;
  logic                edge_found;
  logic [SR_WIDTH-1:0] sr;

  kb_sync #(.STAGES(SYNC_STAGES)) u_sync (
    .sys_clk   (sys_clk),
    .kb_clk    (kb_clk),
    .kb_data   (kb_data),
    .kb_clk_s  (kb_clk_s),
    .kb_data_s (kb_data_s)
  );

  kb_clk_fall_detect u_fall (
    .sys_clk    (sys_clk),
    .kb_clk_s   (kb_clk_s),
    .edge_found (edge_found)
  );

  scancode_shift_reg u_sr (
    .sys_clk   (sys_clk),
    .shift_en  (edge_found),
    .kb_data_s (kb_data_s),
    .sr        (sr)
  );

  digit_seg_decoder u_dec (
    .code     (sr[CODE_BITS-1:0]),
    .seg      (rsb)
  );

  // Active-low bargraph: a lit segment for every 1 in the scan code. The
  // parity and stop bits (sr[9:8]) are kept in the register but not shown.
  assign db = ~sr[CODE_BITS-1:0];

  assign fcs  = 1'b1;
  assign rlcs = 1'b1;
  assign rrcs = 1'b1;
  assign sdcs = 1'b1;

endmodule
