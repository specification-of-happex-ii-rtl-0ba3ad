// dac12_model: behavioural model of a 12-bit, 0-10 V digital-to-analog
// converter (the board has two, at VME offsets $4 and $6).
//
// This is a behavioural model of an analog part, not logic for the board's
// FPGA. The output voltage is given as a signed integer in microvolts so that
// it can be passed to other models and checked in simulation. The 0-10 V range
// is the specification's; the straight-binary transfer function
// V = 10 V * code / 4096 (so full scale 4095 gives 9.99756 V) and the absence
// of settling time are this model's choices, as the converter part is not
// named. The output follows the code combinationally.
module dac12_model #(
  parameter int unsigned FULL_SCALE_UV = 10_000_000   // 10 V span, in uV
) (
  input  logic [11:0]        code,
  output logic signed [31:0] vout_uv
);
  always_comb vout_uv = 32'(($unsigned(64'(code)) * 64'(FULL_SCALE_UV)) >> 12);
endmodule
