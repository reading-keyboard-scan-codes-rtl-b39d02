// Shared constants for the PS/2 keyboard scan-code reader.
//
// A PS/2 keyboard frame is 11 bits: a start bit (0), eight data bits sent
// least significant bit first, an odd parity bit and a stop bit (1). The
// receiver keeps the last ten bits of the line in a shift register, so the
// start bit falls out of the register and, once a frame is complete, the low
// eight bits are the scan code. The scan codes of the digit keys are those of
// scan code set 2, the default set of AT keyboards.
//
// Seven-segment patterns are active low (0 lights a segment). The bit order of
// the 7-bit pattern follows the wiring of the right digit on the XStend board:
//   bit 6 = a (top),    bit 5 = f (top left),  bit 4 = b (top right),
//   bit 3 = g (middle), bit 2 = e (bottom left), bit 1 = c (bottom right),
//   bit 0 = d (bottom).
// That order is not stated as such; it is the one that makes every pattern of
// the digit table draw its digit.
package kbd_pkg;

  localparam int unsigned FRAME_BITS = 11;  // start + 8 data + parity + stop
  localparam int unsigned SR_WIDTH   = 10;  // shift register keeps the last 10 bits
  localparam int unsigned CODE_BITS  = 8;
  localparam int unsigned SEG_BITS   = 7;

  typedef logic [CODE_BITS-1:0] scancode_t;
  typedef logic [SEG_BITS-1:0]  seg_t;

  // Scan code set 2, make codes of the main-row digit keys.
  localparam scancode_t SC_0 = 8'h45;
  localparam scancode_t SC_1 = 8'h16;
  localparam scancode_t SC_2 = 8'h1E;
  localparam scancode_t SC_3 = 8'h26;
  localparam scancode_t SC_4 = 8'h25;
  localparam scancode_t SC_5 = 8'h2E;
  localparam scancode_t SC_6 = 8'h36;
  localparam scancode_t SC_7 = 8'h3D;
  localparam scancode_t SC_8 = 8'h3E;
  localparam scancode_t SC_9 = 8'h46;

  // Prefix bytes a keyboard sends ahead of a make code.
  localparam scancode_t SC_BREAK    = 8'hF0;  // key released
  localparam scancode_t SC_EXTENDED = 8'hE0;  // extended key

  // Active-low segment patterns (bit order above).
  localparam seg_t SEG_0 = 7'b0001000;
  localparam seg_t SEG_1 = 7'b1101101;
  localparam seg_t SEG_2 = 7'b0100010;
  localparam seg_t SEG_3 = 7'b0100100;
  localparam seg_t SEG_4 = 7'b1000101;
  localparam seg_t SEG_5 = 7'b0010100;
  localparam seg_t SEG_6 = 7'b0010000;
  localparam seg_t SEG_7 = 7'b0101101;
  localparam seg_t SEG_8 = 7'b0000000;
  localparam seg_t SEG_9 = 7'b0000100;
  localparam seg_t SEG_E = 7'b0010010;

endpackage
