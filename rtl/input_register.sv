// input_register: the board's two-channel input register (Data0, Data1).
//
// Each asynchronous input level is synchronised to the board clock with two
// flip-flops and held in the register that the VME interface reads at offset
// $0 (bit 0 = Data0, bit 1 = Data1). The register follows the input level; it
// does not latch edges, since the specification says only that each channel
// "sets a bit" in the register. The ECL copy of each input for the ribbon
// cable is a level translation outside this logic.
//
// Timing: a change of an input appears in `data` two clocks after it is
// first sampled.
module input_register (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] data_in,   // {Data1, Data0}, asynchronous
  output logic [1:0] data       // synchronised {Data1, Data0}
);
  logic [1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      data <= '0;
    end else begin
      meta <= data_in;
      data <= meta;
    end
  end
endmodule
