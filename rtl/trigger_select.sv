// trigger_select: Master Trigger synchroniser and edge selection.
//
// The asynchronous Master Trigger level is passed through a two-flop
// synchroniser and compared with its previous value. Two jumpers choose the
// active edge, as the specification describes: with `jp_rise` set a rising
// edge triggers, with `jp_fall` set a falling edge triggers, with both set
// either edge triggers. The result is a one-clock pulse `trig`.
// Whether a trigger is acted on (it is ignored while a cycle is running) is
// decided by the timing sequencer, not here.
//
// After reset no edge is reported until the synchroniser and the edge
// register hold the input level (3 clocks), so an input that idles high does
// not fire a trigger when reset is released.
//
// Timing: `trig` is high in the third clock after the input edge is first
// sampled (two synchroniser flops plus the edge register), 100-150 ns at
// 20 MHz. The synchroniser depth is this design's choice.
module trigger_select (
  input  logic clk,
  input  logic rst_n,
  input  logic trig_in,   // Master Trigger, asynchronous
  input  logic jp_rise,   // jumper 1: trigger on rising edge
  input  logic jp_fall,   // jumper 2: trigger on falling edge
  output logic trig
);
  logic [1:0] sync;
  logic       prev;
  logic [2:0] fill;   // edges are looked for only once the flops hold the input

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
      prev <= 1'b0;
      fill <= '0;
      trig <= 1'b0;
    end else begin
      sync <= {sync[0], trig_in};
      prev <= sync[1];
      fill <= {fill[1:0], 1'b1};
      trig <= fill[2] && ((jp_rise && sync[1] && !prev) || (jp_fall && !sync[1] && prev));
    end
  end
endmodule
