// kb_sync: brings the keyboard's clock and data lines into the sys_clk domain.
//
// Each line passes through STAGES flip-flops clocked on the rising edge of
// sys_clk, so the copies seen by the rest of the design change only on that
// edge. The reference design uses one register per line (STAGES = 1); more
// stages lower the chance of a metastable value reaching the edge detector at
// the cost of one sys_clk cycle of latency each.
//
// Interface: sys_clk; kb_clk/kb_data straight from the connector;
// kb_clk_s/kb_data_s, the synchronised copies, STAGES cycles late.
// The registers power up at 1, the idle level of both PS/2 lines; there is no
// reset input, as on the original board design (FPGA configuration sets the
// initial values).
module kb_sync #(
  parameter int unsigned STAGES = 1
) (
  input  logic sys_clk,
  input  logic kb_clk,
  input  logic kb_data,
  output logic kb_clk_s,
  output logic kb_data_s
);

  logic [STAGES-1:0] clk_q  = '1;
  logic [STAGES-1:0] data_q = '1;

  if (STAGES == 1) begin : g_one
    always_ff @(posedge sys_clk) begin
      clk_q  <= kb_clk;
      data_q <= kb_data;
    end
  end else begin : g_chain
    always_ff @(posedge sys_clk) begin
      clk_q  <= {clk_q[STAGES-2:0], kb_clk};
      data_q <= {data_q[STAGES-2:0], kb_data};
    end
  end

  assign kb_clk_s  = clk_q[STAGES-1];
  assign kb_data_s = data_q[STAGES-1];

endmodule
