// digit_seg_decoder: shows a received digit key on a seven-segment display.
//
// Purely combinational. If the scan code is the set-2 make code of one of the
// keys 0-9 on the main key row, seg is the active-low pattern of that digit;
// any other code (letters, prefixes such as F0, the numeric keypad) gives the
// pattern of the letter E. The patterns and the segment bit order are in
// kbd_pkg. The output is not registered, so it follows the shift register as
// bits pass through it.
module digit_seg_decoder
  import kbd_pkg::*;
(
  input  scancode_t code,
  output seg_t      seg
);

  always_comb begin
    unique case (code)
      SC_0:    seg = SEG_0;
      SC_1:    seg = SEG_1;
      SC_2:    seg = SEG_2;
      SC_3:    seg = SEG_3;
      SC_4:    seg = SEG_4;
      SC_5:    seg = SEG_5;
      SC_6:    seg = SEG_6;
      SC_7:    seg = SEG_7;
      SC_8:    seg = SEG_8;
      SC_9:    seg = SEG_9;
      default: seg = SEG_E;
    endcase
  end

endmodule
