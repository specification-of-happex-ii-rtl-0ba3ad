// happex_adc_timing_board: the HAPPEX ADC timing board, a VME module that
// times the integration cycle of the HAPPEX ADCs and provides feedback and
// calibration voltages.
//
// The board holds the digital logic (timing_fpga) and the analog parts that
// the logic sets: two 12-bit 0-10 V DACs, each followed by a 0-100 kHz
// voltage-to-frequency converter, and one 16-bit -5..+5 V DAC. The analog
// parts are behavioural models (dac12_model, vf_converter_model, dac16_model)
// whose voltages are signed integers in microvolts; the V/F models use the
// board clock as their time base. Line receivers, PECL/ECL drivers, optical
// transceivers and connectors are outside: their logic levels are the ports
// here. The Data0/Data1 inputs are also copied to the VME-trigger ribbon
// cable (`data_ecl`), which on the board is only a level translation.
//
// Interface and timing: see timing_fpga. `clk` is the 20 MHz crystal.
module happex_adc_timing_board (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               master_trigger,
  input  logic               jp_rise,
  input  logic               jp_fall,
  input  logic [1:0]         data_in,
  input  logic [11:0]        base_sw,
  input  logic [15:1]        vme_a,
  input  logic [5:0]         vme_am,
  input  logic               vme_as_n,
  input  logic [1:0]         vme_ds_n,
  input  logic               vme_write_n,
  input  logic               vme_iack_n,
  input  logic [15:0]        vme_d_in,
  output logic [15:0]        vme_d_out,
  output logic               vme_d_oe,
  output logic               vme_dtack,
  // ADC ribbon cable
  output logic               adc_reset,
  output logic               adc_baseline,
  output logic               adc_peak,
  output logic               adc_convst,
  // VME-trigger ribbon cable
  output logic               vme_trig,
  output logic [1:0]         data_ecl,
  // Lemo and optical outputs
  output logic               integrate_gate,
  output logic signed [31:0] dac12_1_uv,
  output logic signed [31:0] dac12_2_uv,
  output logic signed [31:0] dac16_uv,
  output logic               vf1_out,
  output logic               vf2_out
);
  logic [11:0] dac12_1_code, dac12_2_code;
  logic [15:0] dac16_code;

  timing_fpga u_fpga (
    .clk, .rst_n, .master_trigger, .jp_rise, .jp_fall, .data_in,
    .base_sw, .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n,
    .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack,
    .adc_reset, .adc_baseline, .adc_peak, .adc_convst, .vme_trig, .integrate_gate,
    .busy(), .dac12_1_code, .dac12_2_code, .dac16_code
  );

  dac12_model u_dac1 (.code(dac12_1_code), .vout_uv(dac12_1_uv));
  dac12_model u_dac2 (.code(dac12_2_code), .vout_uv(dac12_2_uv));
  dac16_model u_dac16 (.code(dac16_code), .vout_uv(dac16_uv));

  vf_converter_model u_vf1 (.ref_clk(clk), .rst_n, .vin_uv(dac12_1_uv), .fout(vf1_out));
  vf_converter_model u_vf2 (.ref_clk(clk), .rst_n, .vin_uv(dac12_2_uv), .fout(vf2_out));

  assign data_ecl = data_in;
endmodule
