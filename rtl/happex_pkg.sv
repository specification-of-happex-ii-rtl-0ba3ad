// happex_pkg: constants and types shared by the ADC timing board logic.
//
// All sequence timing is expressed in 2.5 us timing steps ("ticks"), the
// 400 kHz unit obtained by dividing the 20 MHz board clock by 50. The fixed
// intervals of the ADC integration cycle (15 us Reset-to-Baseline, 2.5 us
// pulse widths, 22.5 us Peak-to-Convst, 7.5 us Convst-to-VME-Trig) are given
// by the specification; they are stored here as tick counts. The register
// offsets are those of the board's 16-byte VME address map.
package happex_pkg;

  // Clock and timing step
  localparam int unsigned CLK_HZ   = 20_000_000;   // board crystal
  localparam int unsigned STEP_HZ  = 400_000;      // 2.5 us timing step
  localparam int unsigned TICK_DIV = CLK_HZ / STEP_HZ;  // 50

  // Fixed intervals of the integration cycle, in 2.5 us steps
  localparam int unsigned T_RESET_TO_BASELINE = 6;  // 15 us, Reset fall -> Baseline rise
  localparam int unsigned T_PULSE             = 1;  // 2.5 us width of Baseline/Peak/Convst/VME Trig
  localparam int unsigned T_PEAK_TO_RESET     = 1;  // 2.5 us, Peak fall -> Reset rise
  localparam int unsigned T_PEAK_TO_CONVST    = 9;  // 22.5 us, Peak fall -> Convst leading edge
  localparam int unsigned T_CONVST_TO_VMETRIG = 3;  // 7.5 us, Convst trailing edge -> VME Trig

  // Oversampling range
  localparam int unsigned MIN_OVERSAMPLE = 1;
  localparam int unsigned MAX_OVERSAMPLE = 20;

  // VME A16 address modifiers accepted (short non-privileged, short supervisory)
  localparam logic [5:0] AM_A16_USER = 6'h29;
  localparam logic [5:0] AM_A16_SUPV = 6'h2D;

  // Register offsets (byte address within the 16-byte window)
  typedef enum logic [3:0] {
    REG_INPUT_DATA = 4'h0,
    REG_UNUSED     = 4'h2,
    REG_DAC12_1    = 4'h4,
    REG_DAC12_2    = 4'h6,
    REG_DAC16      = 4'h8,
    REG_RAMP_DELAY = 4'hA,
    REG_INT_TIME   = 4'hC,
    REG_OVERSAMPLE = 4'hE
  } reg_addr_e;

  // Settings register file contents, as seen by the rest of the board
  typedef struct packed {
    logic [11:0] dac12_1;
    logic [11:0] dac12_2;
    logic [15:0] dac16;
    logic [15:0] ramp_delay;   // in 2.5 us steps
    logic [15:0] int_time;     // in 2.5 us steps
    logic [7:0]  oversample;   // requested number of oversamples, 1..20
  } board_regs_t;

  // Timing sequencer states
  typedef enum logic [3:0] {
    S_IDLE,        // Reset and Convst high, waiting for a trigger
    S_RAMP,        // Ramp Delay
    S_PRE_BASE,    // Reset low, 15 us before Baseline
    S_BASELINE,    // Baseline pulse
    S_INTEGRATE,   // Integration Time, Integrate Gate high
    S_PEAK,        // Peak pulse
    S_RESET_HOLD,  // Reset still low for 2.5 us after Peak
    S_PRE_CONVST,  // Reset high, rest of the 22.5 us before Convst
    S_CONVST,      // Convst pulse (line low)
    S_PRE_VMETRIG, // 7.5 us before VME Trig
    S_VMETRIG      // VME Trig pulse of a period that is followed by another
  } seq_state_e;

endpackage
