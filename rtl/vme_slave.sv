// vme_slave: A16/D16 VMEbus slave holding the board's settings registers.
//
// The board occupies 16 bytes of short (A16) address space: address lines
// A15..A4 must equal the 12-bit base-address switch and A3..A1 select one of
// eight 16-bit registers (the register map below is the specification's):
//   $0  R    Input Data: bit 0 = Data0, bit 1 = Data1
//   $2  -    unused
//   $4  W    12-bit DAC #1 set value (bits 11..0)
//   $6  W    12-bit DAC #2 set value (bits 11..0)
//   $8  W    16-bit DAC set value
//   $A  R/W  Ramp Delay, in 2.5 us steps
//   $C  R/W  Integration Time, in 2.5 us steps
//   $E  R/W  bits 7..0 Oversample setting; R bits 15..8 current oversample
// The bus cycle itself is not specified for the board; this design uses the
// usual VME slave handshake. AS*, DS0* and DS1* are synchronised with two
// flip-flops; once AS* and a data strobe are seen low, address modifier
// $29 or $2D and IACK* high, and the address matches, the access is done in
// one clock and DTACK* is asserted (`dtack` high here; the open-collector
// driver is outside). DTACK*, and for a read the data drivers, are released
// after both data strobes go high. DS1* enables the even byte D15..D8 and DS0*
// the odd byte D7..D0, so byte and word writes both work. Reads of the
// write-only DAC registers and of $2 return 0. Register reset values (all 0,
// Oversample 1) are this design's choice.
//
// Timing: DTACK* is asserted 3 clocks (150 ns at 20 MHz) after the later of
// AS* and DS* falls and released 3 clocks after the strobes rise.
module vme_slave
  import happex_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // VMEbus (active-low strobes as on the backplane)
  input  logic [15:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,     // {DS1*, DS0*}
  input  logic        vme_write_n,
  input  logic        vme_iack_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,     // drive D15..D0 (read cycle)
  output logic        vme_dtack,    // pull DTACK* low
  // Board side
  input  logic [11:0] base_sw,      // base-address switch
  input  logic [1:0]  input_data,   // {Data1, Data0}
  input  logic [7:0]  cur_os,       // current oversample from the sequencer
  output board_regs_t regs
);
  typedef enum logic {B_IDLE, B_ACK} bus_state_e;

  bus_state_e state;
  logic [1:0] as_sync;
  logic [1:0] ds0_sync, ds1_sync;
  logic       as_act, ds_any, ds_none, sel;
  logic [1:0] lane;                 // {even byte D15..8, odd byte D7..0}
  logic [15:0] rdata;
  reg_addr_e  radr;

  assign as_act  = !as_sync[1];
  assign lane    = {!ds1_sync[1], !ds0_sync[1]};
  assign ds_any  = |lane;
  assign ds_none = !ds_any;
  assign sel     = (vme_a[15:4] == base_sw) && vme_iack_n &&
                   ((vme_am == AM_A16_USER) || (vme_am == AM_A16_SUPV));
  assign radr    = reg_addr_e'({vme_a[3:1], 1'b0});

  // Read multiplexer
  always_comb begin
    unique case (radr)
      REG_INPUT_DATA: rdata = {14'd0, input_data};
      REG_RAMP_DELAY: rdata = regs.ramp_delay;
      REG_INT_TIME:   rdata = regs.int_time;
      REG_OVERSAMPLE: rdata = {cur_os, regs.oversample};
      default:        rdata = 16'd0;   // $2 unused, DAC registers write-only
    endcase
  end

  // Byte-lane merge of a write into a 16-bit register
  function automatic logic [15:0] merge(logic [15:0] old, logic [15:0] d, logic [1:0] ln);
    return {ln[1] ? d[15:8] : old[15:8], ln[0] ? d[7:0] : old[7:0]};
  endfunction

  function automatic logic [11:0] merge12(logic [11:0] old, logic [11:0] d, logic [1:0] ln);
    return {ln[1] ? d[11:8] : old[11:8], ln[0] ? d[7:0] : old[7:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync   <= 2'b11;
      ds0_sync  <= 2'b11;
      ds1_sync  <= 2'b11;
      state     <= B_IDLE;
      vme_dtack <= 1'b0;
      vme_d_oe  <= 1'b0;
      vme_d_out <= '0;
      regs      <= '{dac12_1: '0, dac12_2: '0, dac16: '0, ramp_delay: '0,
                     int_time: '0, oversample: 8'd1};
    end else begin
      as_sync  <= {as_sync[0], vme_as_n};
      ds0_sync <= {ds0_sync[0], vme_ds_n[0]};
      ds1_sync <= {ds1_sync[0], vme_ds_n[1]};
      unique case (state)
        B_IDLE: if (as_act && ds_any && sel) begin
          state     <= B_ACK;
          vme_dtack <= 1'b1;
          if (!vme_write_n) begin
            unique case (radr)
              REG_DAC12_1:    regs.dac12_1    <= merge12(regs.dac12_1, vme_d_in[11:0], lane);
              REG_DAC12_2:    regs.dac12_2    <= merge12(regs.dac12_2, vme_d_in[11:0], lane);
              REG_DAC16:      regs.dac16      <= merge(regs.dac16, vme_d_in, lane);
              REG_RAMP_DELAY: regs.ramp_delay <= merge(regs.ramp_delay, vme_d_in, lane);
              REG_INT_TIME:   regs.int_time   <= merge(regs.int_time, vme_d_in, lane);
              REG_OVERSAMPLE: if (lane[0]) regs.oversample <= vme_d_in[7:0];
              default: ;      // read-only or unused
            endcase
          end else begin
            vme_d_oe  <= 1'b1;
            vme_d_out <= rdata;
          end
        end
        B_ACK: if (ds_none) begin
          state     <= B_IDLE;
          vme_dtack <= 1'b0;
          vme_d_oe  <= 1'b0;
        end
        default: state <= B_IDLE;
      endcase
      // Bus rules: DTACK* is asserted exactly while a cycle of this slave is
      // being acknowledged, and the data drivers are on only with DTACK*.
      a_dtack_in_ack:  assert (vme_dtack == (state == B_ACK));
      a_oe_with_dtack: assert (!vme_d_oe || vme_dtack);
    end
  end

endmodule
