// vf_converter_model: behavioural model of a voltage-to-frequency converter,
// 0-10 V in, 0-100 kHz out (the board has one behind each 12-bit DAC, each
// driving an optical output).
//
// This is a behavioural model of an analog part, not logic for the board's
// FPGA. The ranges are the specification's; the linear transfer
// f = 10 kHz/V * V and the square-wave output are this model's choices.
// The model measures time with a reference clock `ref_clk` of CLK_HZ:
// every clock it adds the input voltage (in microvolts) to a phase
// accumulator and toggles `fout` each time the accumulator passes
// HALF_PERIOD_UV_CLK = CLK_HZ * 1e6 uV / (2 * 10 kHz/V), so that the output
// frequency is vin_uv / 100 Hz with an edge jitter of one reference clock.
// Negative inputs give no output.
module vf_converter_model #(
  parameter int unsigned CLK_HZ        = 20_000_000,
  parameter int unsigned HZ_PER_VOLT   = 10_000          // 100 kHz at 10 V
) (
  input  logic               ref_clk,
  input  logic               rst_n,
  input  logic signed [31:0] vin_uv,
  output logic               fout
);
  localparam longint unsigned HALF_PERIOD_UV_CLK =
    (longint'(CLK_HZ) * 64'd1_000_000) / (2 * longint'(HZ_PER_VOLT));

  logic [63:0] acc, acc_sum;

  always_comb acc_sum = acc + ((vin_uv > 0) ? 64'(vin_uv) : 64'd0);

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      fout <= 1'b0;
    end else if (acc_sum >= HALF_PERIOD_UV_CLK) begin
      acc  <= acc_sum - HALF_PERIOD_UV_CLK;
      fout <= ~fout;
    end else begin
      acc  <= acc_sum;
    end
  end
endmodule
