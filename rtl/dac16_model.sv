// dac16_model: behavioural model of the board's high-precision 16-bit
// digital-to-analog converter with a -5 V to +5 V output (VME offset $8).
//
// This is a behavioural model of an analog part, not logic for the board's
// FPGA. The output voltage is a signed integer in microvolts. The +/-5 V
// range is the specification's; the offset-binary coding
// V = -5 V + 10 V * code / 65536 (code 0 gives -5 V, 8000h gives 0 V,
// FFFFh gives +4.99985 V, values truncated towards minus infinity to whole
// microvolts) is this model's choice, as the converter part is not named.
// The output follows the code combinationally.
module dac16_model #(
  parameter int unsigned SPAN_UV = 10_000_000   // 10 V span, in uV
) (
  input  logic [15:0]        code,
  output logic signed [31:0] vout_uv
);
  always_comb vout_uv = 32'((longint'(code) * longint'(SPAN_UV)) >>> 16) - 32'(SPAN_UV / 2);
endmodule
