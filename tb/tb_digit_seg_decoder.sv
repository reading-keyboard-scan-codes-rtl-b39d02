// Self-checking testbench for digit_seg_decoder. Tries all 256 codes. The
// expected patterns are built here from the list of segments each character
// lights (a-g) and the board's segment bit order, not from the decoder's
// table: a digit key's make code must draw its digit, everything else an E.
module tb_digit_seg_decoder;
  import kbd_pkg::*;
  scancode_t code;
  seg_t      seg;
  int        checks = 0, failures = 0, digits = 0;

  digit_seg_decoder dut (.code, .seg);

  // Active-low pattern from a string of lit segment letters.
  // Bit order on the board: a=6 f=5 b=4 g=3 e=2 c=1 d=0.
  function automatic seg_t draw(input string lit);
    seg_t p = '1;
    for (int i = 0; i < lit.len(); i++)
      case (lit[i])
        "a": p[6] = 1'b0;
        "f": p[5] = 1'b0;
        "b": p[4] = 1'b0;
        "g": p[3] = 1'b0;
        "e": p[2] = 1'b0;
        "c": p[1] = 1'b0;
        "d": p[0] = 1'b0;
        default: ;
      endcase
    return p;
  endfunction

  logic [7:0] key_code [10] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25,
                                8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46};
  string      key_segs [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                                "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  initial begin
    for (int c = 0; c < 256; c++) begin
      seg_t exp;
      exp = draw("adefg");  // E
      for (int k = 0; k < 10; k++)
        if (key_code[k] == 8'(c)) begin
          exp = draw(key_segs[k]);
          digits++;
        end
      code = 8'(c);
      #10;
      checks++;
      if (seg !== exp) begin
        failures++;
        $display("FAIL code %02h: got %b expected %b", c, seg, exp);
      end
    end
    checks++;
    if (digits != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
