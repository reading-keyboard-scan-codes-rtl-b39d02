// Replays the reference '4' key stimulus on keyb_reader at default parameters.
//
// Board clock: period 83 ns, low at 0 and high at 42 ns (about 12 MHz).
// Keyboard clock: 1 at 25 us, then falling every 100 us from 100 us to
// 1100 us and rising 50 us after each fall. Keyboard data, set between the
// edges: 1 at 25 us, then 0,1,0,1,0,0,1,0,0,0,1 at 75, 175, ..., 1075 us,
// which is start 0, scan code 25h LSB first, odd parity 0 and stop 1.
// After each falling edge the bargraph must show the inverted low 8 bits of
// a reference shift register within two board clock cycles; at 1200 us it
// must show 25h and the digit display a 4 (segments b, c, f, g lit).
module tb_keyb_reader_key4;
  logic       sys_clk = 1'b0;
  logic       kb_clk = 1'b1, kb_data = 1'b1;
  logic [7:0] db;
  logic [6:0] rsb;
  logic       fcs, rlcs, rrcs, sdcs;
  logic [9:0] ref_sr = '0;
  int         checks = 0, failures = 0, falls = 0;

  initial begin
    #42;
    forever begin
      sys_clk = 1'b1;
      #41;
      sys_clk = 1'b0;
      #42;
    end
  end

  keyb_reader dut (.sys_clk, .kb_clk, .kb_data, .db, .rsb, .fcs, .rlcs, .rrcs, .sdcs);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge kb_clk) begin
    falls++;
    ref_sr = {kb_data, ref_sr[9:1]};
    repeat (2) @(posedge sys_clk);
    #1;
    check(db == ~ref_sr[7:0], $sformatf("bit %0d in the register", falls));
  end

  initial begin
    fork
      begin
        #25us  kb_clk = 1'b1;
        #75us  kb_clk = 1'b0;
        repeat (10) begin
          #50us kb_clk = 1'b1;
          #50us kb_clk = 1'b0;
        end
        #50us kb_clk = 1'b1;
      end
      begin
        logic [10:0] bits;
        bits = 11'b1_0_0_0_1_0_0_1_0_1_0;  // bits[0] is the value at 75 us
        #25us kb_data = 1'b1;
        #50us kb_data = bits[0];
        for (int i = 1; i < 11; i++) begin
          #100us kb_data = bits[i];
        end
      end
    join
    wait ($time >= 64'd1_200_000);
    check(falls == 11, $sformatf("%0d falling edges", falls));
    check(db == ~8'h25, $sformatf("bargraph %b", db));
    check(rsb == 7'b1000101, $sformatf("digit pattern %b", rsb));
    check({fcs, rlcs, rrcs, sdcs} == 4'b1111, "chip selects high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
