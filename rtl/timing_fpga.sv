// timing_fpga: all digital logic of the HAPPEX ADC timing board.
//
// It joins the 2.5 us step divider (tick_gen), the Master Trigger edge
// selection (trigger_select), the integration-cycle state machine
// (timing_sequencer), the two-channel input register (input_register) and
// the VME register file (vme_slave). The sequencer reads Ramp Delay,
// Integration Time and Oversample from the register file and reports the
// current oversample back to it; the register file also holds the three DAC
// set values, which leave this module as parallel codes.
//
// Interface: one 20 MHz clock and an active-low asynchronous reset (the
// power-on reset is not described for the board and is this design's
// addition). The ADC ribbon-cable outputs are line levels: `adc_reset` and
// `adc_convst` idle high, `adc_baseline`, `adc_peak`, `vme_trig` and
// `integrate_gate` idle low. Timing is set by the sequencer: see
// timing_sequencer for the intervals.
module timing_fpga
  import happex_pkg::*;
#(
  parameter int unsigned DIV = TICK_DIV
) (
  input  logic        clk,
  input  logic        rst_n,
  // Master Trigger and its edge-select jumpers
  input  logic        master_trigger,
  input  logic        jp_rise,
  input  logic        jp_fall,
  // Input register channels {Data1, Data0}
  input  logic [1:0]  data_in,
  // VMEbus
  input  logic [11:0] base_sw,
  input  logic [15:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_iack_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack,
  // Timing outputs
  output logic        adc_reset,
  output logic        adc_baseline,
  output logic        adc_peak,
  output logic        adc_convst,
  output logic        vme_trig,
  output logic        integrate_gate,
  output logic        busy,
  // DAC set values
  output logic [11:0] dac12_1_code,
  output logic [11:0] dac12_2_code,
  output logic [15:0] dac16_code
);
  logic        tick, tick_clr, trig;
  logic [1:0]  data_sync;
  logic [7:0]  cur_os;
  board_regs_t regs;

  tick_gen #(.DIV(DIV)) u_tick (
    .clk, .rst_n, .clr(tick_clr), .tick
  );

  trigger_select u_trig (
    .clk, .rst_n, .trig_in(master_trigger), .jp_rise, .jp_fall, .trig
  );

  timing_sequencer #(.DIV(DIV)) u_seq (
    .clk, .rst_n, .tick, .trig,
    .ramp_delay(regs.ramp_delay), .int_time(regs.int_time), .oversample(regs.oversample),
    .tick_clr,
    .reset_o(adc_reset), .baseline_o(adc_baseline), .peak_o(adc_peak),
    .convst_o(adc_convst), .vme_trig_o(vme_trig), .integrate_gate_o(integrate_gate),
    .busy, .cur_os
  );

  input_register u_inreg (
    .clk, .rst_n, .data_in, .data(data_sync)
  );

  vme_slave u_vme (
    .clk, .rst_n,
    .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n,
    .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack,
    .base_sw, .input_data(data_sync), .cur_os, .regs
  );

  assign dac12_1_code = regs.dac12_1;
  assign dac12_2_code = regs.dac12_2;
  assign dac16_code   = regs.dac16;
endmodule
