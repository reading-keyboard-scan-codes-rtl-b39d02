// ps2_keyboard_model: behavioural model of a PC/AT keyboard's transmit side.
// Not synthesizable; used only by the testbenches.
//
// send_byte(code) sends one 11-bit frame: start bit 0, the eight code bits
// least significant first, an odd parity bit and a stop bit 1. The keyboard
// drives the clock only while it sends. Each bit period is 2*HALF_NS: the data
// line changes in the middle of the clock-high phase, half a phase before the
// falling edge on which the host reads it, and the clock returns high after
// HALF_NS. The default 50 us half period gives a 10 kHz keyboard clock.
// After the stop bit the model holds both lines high for GAP_NS.
// frames_sent counts frames; last_fall_time is the time of the most recent
// falling clock edge.
module ps2_keyboard_model #(
  parameter int unsigned HALF_NS = 50_000,
  parameter int unsigned GAP_NS  = 200_000
) (
  output logic kb_clk,
  output logic kb_data
);

  int unsigned frames_sent = 0;
  time         last_fall_time = 0;

  initial begin
    kb_clk  = 1'b1;
    kb_data = 1'b1;
  end

  task automatic send_byte(input logic [7:0] code);
    logic [10:0] frame;
    frame = {1'b1, ~^code, code, 1'b0};  // stop, odd parity, data, start
    for (int i = 0; i < 11; i++) begin
      #(HALF_NS / 2);
      kb_data = frame[i];
      #(HALF_NS / 2);
      kb_clk = 1'b0;
      last_fall_time = $time;
      #(HALF_NS);
      kb_clk = 1'b1;
    end
    frames_sent++;
    #(GAP_NS);
  endtask

endmodule
