// Self-checking testbench for kb_clk_fall_detect. Drives a random synchronised
// keyboard clock (held for 1-4 cycles per level) and checks edge_found against
// a reference that remembers the previous cycle's value: high exactly in the
// first cycle after a 1 -> 0 change, for one cycle only. Also checks that
// no edge is reported at power-up with the line low, if the line was never high.
module tb_kb_clk_fall_detect;
  logic sys_clk = 1'b0;
  logic kb_clk_s = 1'b1;
  logic edge_found;
  logic prev = 1'b1;
  int   checks = 0, failures = 0, edges = 0;

  always #20 sys_clk = ~sys_clk;

  kb_clk_fall_detect dut (.sys_clk, .kb_clk_s, .edge_found);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1;
    check(edge_found, 1'b0, "no edge at power-up");
    for (int n = 0; n < 1000; n++) begin
      logic lvl;
      int   hold;
      lvl  = 1'($urandom);
      hold = 1 + int'($urandom_range(3));
      repeat (hold) begin
        @(negedge sys_clk);
        kb_clk_s = lvl;
        #1;
        check(edge_found, prev & ~kb_clk_s, "edge_found");
        if (edge_found) edges++;
        @(posedge sys_clk);
        prev = kb_clk_s;
      end
    end
    checks++;
    if (edges < 100) begin
      failures++;
      $display("FAIL too few edges exercised: %0d", edges);
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
