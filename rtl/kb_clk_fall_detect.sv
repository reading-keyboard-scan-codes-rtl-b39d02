// kb_clk_fall_detect: one-cycle strobe on each falling edge of the
// synchronised keyboard clock.
//
// The detector keeps the value the synchronised kb_clk had one sys_clk cycle
// earlier and raises edge_found while that old value is 1 and the current one
// is 0. The strobe is an enable for logic in the sys_clk domain, never a clock,
// so the whole design stays in one clock domain.
//
// Interface: sys_clk; kb_clk_s, already synchronised to sys_clk; edge_found,
// combinational from kb_clk_s and one register, high for exactly one cycle
// per falling edge (in the cycle in which kb_clk_s first reads 0).
// The old-value register powers up at 1, the idle level of the line, so no
// edge is reported at power-up.
module kb_clk_fall_detect (
  input  logic sys_clk,
  input  logic kb_clk_s,
  output logic edge_found
);

  logic kb_clk_old = 1'b1;

  always_ff @(posedge sys_clk)
    kb_clk_old <= kb_clk_s;

  assign edge_found = kb_clk_old & ~kb_clk_s;

  // A falling edge needs the line to have been high in between.
  a_single_cycle: assert property (@(posedge sys_clk) edge_found |=> !edge_found);

endmodule
