// Self-checking testbench for scancode_shift_reg. Part 1 shifts random bits
// with a random enable and compares the register with a reference model
// after every clock edge (power-up value 0, no change without the enable).
// Part 2 feeds whole 11-bit frames (start, 8 data bits LSB first, odd
// parity, stop) and checks that the register then holds
// {stop, parity, code}, whatever it held before.
module tb_scancode_shift_reg;
  import kbd_pkg::*;
  logic sys_clk = 1'b0;
  logic shift_en = 1'b0, kb_data_s = 1'b1;
  logic [SR_WIDTH-1:0] sr, ref_sr;
  int   checks = 0, failures = 0;

  always #20 sys_clk = ~sys_clk;

  scancode_shift_reg dut (.sys_clk, .shift_en, .kb_data_s, .sr);

  task automatic check(input logic [SR_WIDTH-1:0] got, input logic [SR_WIDTH-1:0] exp,
                       input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    ref_sr = '0;
    #1;
    check(sr, ref_sr, "power-up");
    for (int n = 0; n < 2000; n++) begin
      @(negedge sys_clk);
      shift_en  = 1'($urandom);
      kb_data_s = 1'($urandom);
      @(posedge sys_clk);
      if (shift_en) ref_sr = {kb_data_s, ref_sr[SR_WIDTH-1:1]};
      #1;
      check(sr, ref_sr, "random shift");
    end
    for (int f = 0; f < 64; f++) begin
      logic [7:0]  code;
      logic [10:0] frame;
      code  = 8'($urandom);
      frame = {1'b1, ~^code, code, 1'b0};
      for (int i = 0; i < FRAME_BITS; i++) begin
        @(negedge sys_clk);
        shift_en  = 1'b1;
        kb_data_s = frame[i];
        @(negedge sys_clk);
        shift_en  = 1'b0;
        repeat (int'($urandom_range(3))) @(negedge sys_clk);
      end
      check(sr, {1'b1, ~^code, code}, "frame");
    end
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
