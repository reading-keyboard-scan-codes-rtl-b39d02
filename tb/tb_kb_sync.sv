// Self-checking testbench for kb_sync. Drives random values on both keyboard
// lines between clock edges and checks that each synchronised output equals
// the input as it was STAGES rising edges earlier, for the default single
// stage and for a three-stage chain. Also checks the power-up value (idle 1).
module tb_kb_sync;
  logic sys_clk = 1'b0;
  logic kb_clk = 1'b1, kb_data = 1'b1;
  logic c1, d1, c3, d3;
  int   checks = 0, failures = 0;
  logic [2:0] hist_c = '1, hist_d = '1;  // hist[0] = value sampled at the last edge

  always #20 sys_clk = ~sys_clk;

  kb_sync dut1 (.sys_clk, .kb_clk, .kb_data, .kb_clk_s(c1), .kb_data_s(d1));
  kb_sync #(.STAGES(3)) dut3 (.sys_clk, .kb_clk, .kb_data, .kb_clk_s(c3), .kb_data_s(d3));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1;
    check(c1, 1'b1, "power-up clk, 1 stage");
    check(d3, 1'b1, "power-up data, 3 stages");
    for (int n = 0; n < 2000; n++) begin
      @(negedge sys_clk);
      kb_clk  = 1'($urandom);
      kb_data = 1'($urandom);
      @(posedge sys_clk);
      hist_c = {hist_c[1:0], kb_clk};
      hist_d = {hist_d[1:0], kb_data};
      #1;
      check(c1, hist_c[0], "clk, 1 stage");
      check(d1, hist_d[0], "data, 1 stage");
      check(c3, hist_c[2], "clk, 3 stages");
      check(d3, hist_d[2], "data, 3 stages");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
