// timing_sequencer: generates the ADC integration-cycle signals.
//
// After an accepted trigger the sequencer waits Ramp Delay steps, drops
// Reset, issues Baseline 15 us later, holds Integrate Gate for Integration
// Time steps, issues Peak, raises Reset 2.5 us after Peak, pulses Convst
// (active low on the line) 22.5 us after Peak and VME Trig 7.5 us after
// Convst. Baseline, Peak, Convst and VME Trig are 2.5 us wide. With N > 1
// oversamples the Ramp Delay is used once; each later period starts by
// dropping Reset at the trailing edge of the previous VME Trig, so that
// 52.5 us separate a Peak leading edge from the next Baseline leading edge.
// All of this is the specification's timing.
//
// Implementation: a state machine with one state per interval and a 16-bit
// count of the 2.5 us steps left in the state, decremented on `tick`. The
// two intervals that can be set to 0 steps, Ramp Delay and Integration Time,
// are then skipped: Reset drops in the clock that accepts the trigger, or
// Peak follows Baseline directly with no Integrate Gate. When a trigger is accepted the sequencer pulses
// `tick_clr` so the step divider restarts in phase with the trigger; Ramp
// Delay, Integration Time and Oversample are copied at that moment and a
// VME write during the cycle affects only the next one (both are choices of
// this design). The number of oversamples is limited to 1..20: a setting of
// 0 runs one period, a setting above 20 runs twenty.
//
// A trigger is accepted only in the idle state. The sequencer returns to idle
// at the leading edge of the last VME Trig, so the next trigger may arrive
// while that pulse is still high; the pulse is therefore timed by its own
// counter of DIV clocks rather than by the step divider.
//
// Interface: `tick` is the 2.5 us step enable, `trig` a one-clock trigger
// pulse. `tick_clr` is high in the clock the trigger is accepted; all other
// outputs are registered. `reset_o` and `convst_o` are line
// levels that idle high; `cur_os` is the number (1..N) of the period in
// progress and 0 when idle.
module timing_sequencer
  import happex_pkg::*;
#(
  parameter int unsigned DIV = TICK_DIV   // clocks per 2.5 us step (VME Trig width)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        trig,
  input  logic [15:0] ramp_delay,
  input  logic [15:0] int_time,
  input  logic [7:0]  oversample,
  output logic        tick_clr,
  output logic        reset_o,
  output logic        baseline_o,
  output logic        peak_o,
  output logic        convst_o,
  output logic        vme_trig_o,
  output logic        integrate_gate_o,
  output logic        busy,
  output logic [7:0]  cur_os
);
  localparam int unsigned VTW = $clog2(DIV + 1);

  seq_state_e  state, state_n;
  logic [15:0] remain, remain_n;
  logic [15:0] ramp_l, int_l;
  logic [7:0]  os_total, os_total_n;
  logic [7:0]  cur_os_n;
  logic [VTW-1:0] vt_cnt, vt_cnt_n;
  logic        accept;

  // Length in steps of each state, from the copied settings
  function automatic logic [15:0] state_len(seq_state_e s, logic [15:0] ramp, logic [15:0] integ);
    unique case (s)
      S_RAMP:        return ramp;
      S_PRE_BASE:    return 16'(T_RESET_TO_BASELINE);
      S_BASELINE:    return 16'(T_PULSE);
      S_INTEGRATE:   return integ;
      S_PEAK:        return 16'(T_PULSE);
      S_RESET_HOLD:  return 16'(T_PEAK_TO_RESET);
      S_PRE_CONVST:  return 16'(T_PEAK_TO_CONVST - T_PEAK_TO_RESET);
      S_CONVST:      return 16'(T_PULSE);
      S_PRE_VMETRIG: return 16'(T_CONVST_TO_VMETRIG);
      S_VMETRIG:     return 16'(T_PULSE);
      default:       return 16'd0;
    endcase
  endfunction

  function automatic logic [7:0] clamp_os(logic [7:0] v);
    if (v < 8'(MIN_OVERSAMPLE)) return 8'(MIN_OVERSAMPLE);
    if (v > 8'(MAX_OVERSAMPLE)) return 8'(MAX_OVERSAMPLE);
    return v;
  endfunction

  assign accept = (state == S_IDLE) && trig;

  always_comb begin
    state_n    = state;
    remain_n   = remain;
    os_total_n = os_total;
    cur_os_n   = cur_os;
    vt_cnt_n   = (vt_cnt != '0) ? vt_cnt - 1'b1 : vt_cnt;

    if (accept) begin
      // a Ramp Delay of 0 drops Reset in the accepting clock
      state_n    = (ramp_delay == '0) ? S_PRE_BASE : S_RAMP;
      remain_n   = (ramp_delay == '0) ? 16'(T_RESET_TO_BASELINE) : ramp_delay;
      os_total_n = clamp_os(oversample);
      cur_os_n   = 8'd1;
    end else if (state != S_IDLE && tick && remain == 16'd1) begin
      // current interval is over: move to the next one
      unique case (state)
        S_RAMP:        state_n = S_PRE_BASE;
        S_PRE_BASE:    state_n = S_BASELINE;
        S_BASELINE:    state_n = (int_l == '0) ? S_PEAK : S_INTEGRATE;
        S_INTEGRATE:   state_n = S_PEAK;
        S_PEAK:        state_n = S_RESET_HOLD;
        S_RESET_HOLD:  state_n = S_PRE_CONVST;
        S_PRE_CONVST:  state_n = S_CONVST;
        S_CONVST:      state_n = S_PRE_VMETRIG;
        S_PRE_VMETRIG: begin
          vt_cnt_n = VTW'(DIV);
          if (cur_os >= os_total) begin
            state_n  = S_IDLE;
            cur_os_n = 8'd0;
          end else begin
            state_n  = S_VMETRIG;
          end
        end
        S_VMETRIG: begin
          state_n  = S_PRE_BASE;
          cur_os_n = cur_os + 8'd1;
        end
        default:       state_n = S_IDLE;
      endcase
      remain_n = state_len(state_n, ramp_l, int_l);
    end else if (state != S_IDLE && tick) begin
      remain_n = remain - 16'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      remain           <= '0;
      ramp_l           <= '0;
      int_l            <= '0;
      os_total         <= 8'd1;
      cur_os           <= '0;
      vt_cnt           <= '0;
      reset_o          <= 1'b1;
      baseline_o       <= 1'b0;
      peak_o           <= 1'b0;
      convst_o         <= 1'b1;
      vme_trig_o       <= 1'b0;
      integrate_gate_o <= 1'b0;
    end else begin
      state    <= state_n;
      remain   <= remain_n;
      os_total <= os_total_n;
      cur_os   <= cur_os_n;
      vt_cnt   <= vt_cnt_n;
      if (accept) begin
        ramp_l   <= ramp_delay;
        int_l    <= int_time;
      end
      // Registered line levels, decoded from the next state
      reset_o          <= !(state_n inside {S_PRE_BASE, S_BASELINE, S_INTEGRATE, S_PEAK, S_RESET_HOLD});
      baseline_o       <= (state_n == S_BASELINE);
      peak_o           <= (state_n == S_PEAK);
      convst_o         <= (state_n != S_CONVST);
      vme_trig_o       <= (vt_cnt_n != '0);
      integrate_gate_o <= (state_n == S_INTEGRATE);
    end
  end

  // The step divider restarts in the same clock as the trigger is accepted
  assign tick_clr = accept;
  assign busy     = (state != S_IDLE);

endmodule
