// tick_gen: divides the 20 MHz board clock down to the 400 kHz timing step.
//
// A counter runs from 0 to DIV-1 and `tick` is high for the one clock in
// which it holds DIV-1, so `tick` is a one-clock enable every DIV clocks
// (every 2.5 us at the default DIV = 50). The division ratio is the one the
// specification gives; the synchronous `clr` input is a choice of this design:
// the timing sequencer pulses it when it accepts a trigger, so that the first
// step ends exactly DIV clocks after the trigger instead of at an arbitrary
// phase of a free-running divider.
//
// Timing: after `clr` is sampled high at a clock edge, `tick` is next high in
// the cycle that ends DIV edges later.
module tick_gen #(
  parameter int unsigned DIV = happex_pkg::TICK_DIV
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt;

  assign tick = (cnt == W'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cnt <= '0;
    else if (clr || tick)    cnt <= '0;
    else                     cnt <= cnt + 1'b1;
  end
endmodule
