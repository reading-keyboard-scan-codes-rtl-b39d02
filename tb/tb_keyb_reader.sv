// End-to-end testbench for keyb_reader at its default parameters.
//
// The board clock runs at 25 MHz. Keyboard stimulus comes from three sources,
// selected by a multiplexer in front of the reader:
//   1. a hand-timed frame for the '4' key (scan code 25h): 10 kHz keyboard
//      clock, data changing 25 us before each falling edge;
//   2. a keyboard model at 10 kHz typing every digit key (make code, then
//      the F0 break prefix and the code again), some letters, shift, an
//      extended key (E0 prefix) and a keypad digit;
//   3. a second model at about 30 kHz, the fast end of keyboard clock rates.
// After every frame the bargraph must show the inverted scan code and the
// digit display the digit or E; the expected segment patterns are built from
// the segment letters of each character. Every falling kb_clk edge must shift
// the data bit into the register exactly two sys_clk rising edges later, so a
// frame's code is complete two cycles after its last falling edge; this is
// checked against a reference register kept by the testbench. Counted
// mechanisms, each of which must occur: bits shifted on a falling edge
// (exactly 11 per frame), each digit 0-9 shown, E shown, break prefix shown,
// extended prefix shown, display changing while a frame shifts in, and
// frames at the fast clock rate. Chip selects must stay 1.
module tb_keyb_reader;
  logic       sys_clk = 1'b0;
  logic       kb_clk, kb_data;
  logic [7:0] db;
  logic [6:0] rsb;
  logic       fcs, rlcs, rrcs, sdcs;

  logic       m_clk, m_data, f_clk, f_data;   // the two keyboard models
  logic       h_clk = 1'b1, h_data = 1'b1;    // hand-timed stimulus
  logic [1:0] src = 2'd0;

  int checks = 0, failures = 0;
  int frames = 0, strobes = 0, falls = 0;
  int digit_seen [10];
  int e_seen = 0, break_seen = 0, ext_seen = 0, flicker = 0, fast_frames = 0;
  logic [7:0] exp_code;
  logic       monitoring = 1'b0;

  always #20 sys_clk = ~sys_clk;

  always_comb
    case (src)
      2'd0:    {kb_clk, kb_data} = {h_clk, h_data};
      2'd1:    {kb_clk, kb_data} = {m_clk, m_data};
      default: {kb_clk, kb_data} = {f_clk, f_data};
    endcase

  keyb_reader dut (.sys_clk, .kb_clk, .kb_data, .db, .rsb, .fcs, .rlcs, .rrcs, .sdcs);

  ps2_keyboard_model kbd_slow (.kb_clk(m_clk), .kb_data(m_data));
  ps2_keyboard_model #(.HALF_NS(16_720), .GAP_NS(100_000)) kbd_fast
    (.kb_clk(f_clk), .kb_data(f_data));

  // ---- reference for the displays -----------------------------------------
  // Segment bit order of the board's right digit: a=6 f=5 b=4 g=3 e=2 c=1 d=0.
  function automatic logic [6:0] draw(input string lit);
    logic [6:0] p = '1;
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

  function automatic int digit_of(input logic [7:0] code);
    for (int k = 0; k < 10; k++)
      if (key_code[k] == code) return k;
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Displays after a complete frame of code.
  task automatic check_displays(input logic [7:0] code);
    int d;
    d = digit_of(code);
    check(db == ~code, $sformatf("bargraph %b for code %02h", db, code));
    if (d >= 0) begin
      check(rsb == draw(key_segs[d]), $sformatf("digit %0d pattern %b", d, rsb));
      if (rsb == draw(key_segs[d])) digit_seen[d]++;
    end else begin
      check(rsb == draw("adefg"), $sformatf("E pattern %b for code %02h", rsb, code));
      if (rsb == draw("adefg")) e_seen++;
    end
    if (~db == kbd_pkg::SC_BREAK) break_seen++;
    if (~db == kbd_pkg::SC_EXTENDED) ext_seen++;
    check({fcs, rlcs, rrcs, sdcs} == 4'b1111, "chip selects high");
  endtask

  // ---- monitors ------------------------------------------------------------
  // Every falling kb_clk edge must move the line's bit into the register, seen
  // on db two sys_clk edges later and not earlier. ref_sr is the reference
  // register, fed from the tb's own view of the line.
  logic [9:0] ref_sr = '0;
  always @(negedge kb_clk) begin
    logic [7:0] db_before;
    falls++;
    ref_sr = {kb_data, ref_sr[9:1]};
    db_before = db;
    @(posedge sys_clk);
    #1;
    check(db == db_before, "register unchanged one cycle after the edge");
    @(posedge sys_clk);
    #1;
    check(db == ~ref_sr[7:0], $sformatf("bit %0d shifted in two cycles after the edge", falls));
    if (db == ~ref_sr[7:0]) strobes++;
    if (monitoring && falls % 11 == 0)
      check(db == ~exp_code, $sformatf("code %02h complete two cycles after the last edge", exp_code));
  end

  // The unregistered displays move while a frame shifts in.
  logic [7:0] db_prev;
  always @(posedge sys_clk) begin
    if (monitoring && kb_clk == 1'b0 && db != db_prev) flicker++;
    db_prev <= db;
  end

  task automatic send(input logic [7:0] code, input bit fast);
    exp_code = code;
    if (fast) begin
      kbd_fast.send_byte(code);
      fast_frames++;
    end else begin
      kbd_slow.send_byte(code);
    end
    frames++;
    check_displays(code);
  endtask

  // ---- stimulus ------------------------------------------------------------
  initial begin
    foreach (digit_seen[k]) digit_seen[k] = 0;
    db_prev = '1;
    #1;
    // Power-up: empty register, all bargraph segments off, E on the digit.
    check(db == 8'hFF, "power-up bargraph off");
    check(rsb == draw("adefg"), "power-up E");

    // 1. Hand-timed '4' frame. Times are relative to a start 13 ns after a
    //    board clock edge so that no keyboard edge meets a sys_clk edge.
    @(posedge sys_clk);
    #13;
    exp_code   = 8'h25;
    monitoring = 1'b1;
    // Clock: 1 at 25 us, then 0 at 100, 1 at 150, 0 at 200 ... 0 at 1100, 1 at 1150.
    // Data:  1 at 25, 0 at 75, 1 at 175, 0 at 275, 1 at 375, 0 at 475, 0 at 575,
    //        1 at 675, 0 at 775, 0 at 875, 0 at 975, 1 at 1075 (microseconds).
    fork
      begin
        #25us h_clk = 1'b1;
        #75us h_clk = 1'b0;
        for (int i = 0; i < 10; i++) begin
          #50us h_clk = 1'b1;
          #50us h_clk = 1'b0;
        end
        #50us h_clk = 1'b1;
      end
      begin
        logic [11:0] dv;
        int          dt [12];
        dv = 12'b1_0_0_0_1_0_0_1_0_1_0_1;  // dv[0] is the value at 25 us
        dt = '{25, 75, 175, 275, 375, 475, 575, 675, 775, 875, 975, 1075};
        for (int i = 0; i < 12; i++) begin
          #((i == 0 ? dt[0] : dt[i] - dt[i-1]) * 1us);
          h_data = dv[i];
        end
      end
    join
    #50us;
    frames++;
    check_displays(8'h25);

    // 2. Keyboard model at 10 kHz.
    src = 2'd1;
    for (int k = 0; k < 10; k++) begin
      send(key_code[k], 1'b0);     // make
      send(8'hF0, 1'b0);           // break prefix
      send(key_code[k], 1'b0);     // break
    end
    // Shift-A, 'A' make and break, shift break; extended up-arrow; keypad 4.
    send(8'h12, 1'b0);
    send(8'h1C, 1'b0);
    send(8'hF0, 1'b0);
    send(8'h1C, 1'b0);
    send(8'hF0, 1'b0);
    send(8'h12, 1'b0);
    send(8'hE0, 1'b0);
    send(8'h75, 1'b0);
    send(8'h6B, 1'b0);

    // 3. Fast keyboard, about 30 kHz.
    src = 2'd2;
    send(8'h3E, 1'b1);
    send(8'h1B, 1'b1);
    send(8'h46, 1'b1);
    send(8'hF0, 1'b1);
    send(8'h46, 1'b1);

    // ---- coverage of the mechanisms ----------------------------------------
    check(strobes == 11 * frames,
          $sformatf("bits shifted in %0d for %0d frames", strobes, frames));
    foreach (digit_seen[k]) check(digit_seen[k] > 0, $sformatf("digit %0d shown", k));
    check(e_seen > 0, "E shown");
    check(break_seen > 0, "break prefix shown");
    check(ext_seen > 0, "extended prefix shown");
    check(flicker > 0, "display follows the shift register mid-frame");
    check(fast_frames > 0, "frames at the fast keyboard clock");
    $display("frames=%0d strobes=%0d e_seen=%0d break_seen=%0d ext_seen=%0d flicker=%0d fast=%0d",
             frames, strobes, e_seen, break_seen, ext_seen, flicker, fast_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
