// tb_happex_adc_timing_board: end-to-end test of the whole board at its
// default parameters (20 MHz clock, 2.5 us timing step).
//
// The board is programmed over VME, then triggered through the Master
// Trigger input. Every edge of Reset, Baseline, Peak, Convst, VME Trig and
// Integrate Gate is time-stamped, and the intervals are compared in
// nanoseconds with the specified timing: Ramp Delay and Integration Time in
// 2.5 us steps, 15 us Reset-to-Baseline, 2.5 us pulses, Reset high 2.5 us
// after Peak, Convst 22.5 us after Peak, VME Trig 7.5 us after Convst, and
// 52.5 us between a Peak and the next period's Baseline when oversampling.
// The Current Oversample field is read over VME during a cycle.
// It also exercises: triggering on the rising, the falling and both edges,
// a trigger ignored during a cycle, oversample settings 0 and 25 (run 1 and
// 20 periods), byte writes, a cycle for another base address, the input
// register and its ECL copies, the three DAC voltages and the two V/F
// frequencies. Each of these mechanisms is counted and must happen.
module tb_happex_adc_timing_board;
  localparam int    TCLK = 50;          // ns, 20 MHz
  localparam int    STEP = 2500;        // ns, timing step
  localparam logic [11:0] BASE = 12'h3C1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic master_trigger = 1'b1, jp_rise = 1'b1, jp_fall = 1'b0;
  logic [1:0]  data_in = 2'b00;
  logic [11:0] base_sw = BASE;
  logic [15:1] vme_a;
  logic [5:0]  vme_am;
  logic        vme_as_n, vme_write_n, vme_iack_n;
  logic [1:0]  vme_ds_n;
  logic [15:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack;
  logic adc_reset, adc_baseline, adc_peak, adc_convst, vme_trig, integrate_gate;
  logic [1:0] data_ecl;
  logic signed [31:0] dac12_1_uv, dac12_2_uv, dac16_uv;
  logic vf1_out, vf2_out;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_oversample = 0, n_ignored = 0, n_rise = 0, n_fall = 0, n_both = 0,
      n_clamp_lo = 0, n_clamp_hi = 0, n_bytewr = 0, n_nobase = 0, n_inreg = 0,
      n_dac = 0, n_vf = 0, n_curos = 0;

  happex_adc_timing_board dut (.*);
  vme_master_bfm bfm (.clk, .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n,
                      .vme_iack_n, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack);

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Edge recorder, times in ns
  longint q [6][$];
  logic [5:0] prev;
  wire  [5:0] now = {integrate_gate, vme_trig, adc_convst, adc_peak, adc_baseline, adc_reset};
  always @(negedge clk) begin
    for (int s = 0; s < 6; s++) if (now[s] != prev[s]) q[s].push_back(cyc * TCLK);
    prev = now;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] A(input logic [3:0] off);
    return {BASE, off};
  endfunction

  task automatic wr(input logic [3:0] off, input logic [15:0] d);
    bit ack;
    bfm.write16(A(off), d, 2'b11, ack);
    check(ack, $sformatf("write $%h acknowledged", off));
  endtask

  // Clear the edge record
  task automatic clear_edges();
    for (int s = 0; s < 6; s++) q[s].delete();
  endtask

  // Move Master Trigger to level v; returns the time (ns) of the change
  task automatic trig_to(input logic v, output longint t);
    @(negedge clk);
    master_trigger = v;
    t = cyc * TCLK;
  endtask

  // Check one whole cycle that started with the trigger change at tt
  task automatic check_cycle(input longint tt, input int r, input int i, input int n, input string tag);
    longint bl_r, bl_f, pk_r, pk_f, cv_f, cv_r, vt_r, vt_f, rs_f, rs_r, g_r, g_f;
    // Reset: falls after Ramp Delay, then per period rises after Peak and
    // (except after the last) falls again at the VME Trig trailing edge
    check(q[0].size() == 2 * n && q[1].size() == 2 * n && q[2].size() == 2 * n &&
          q[3].size() == 2 * n && q[4].size() == 2 * n && q[5].size() == ((i > 0) ? 2 * n : 0),
          $sformatf("%s: edge counts %0d %0d %0d %0d %0d %0d for %0d periods", tag,
                    q[0].size(), q[1].size(), q[2].size(), q[3].size(), q[4].size(), q[5].size(), n));
    if (q[0].size() != 2 * n || q[1].size() != 2 * n || q[2].size() != 2 * n ||
        q[3].size() != 2 * n || q[4].size() != 2 * n) return;
    // trigger to Reset fall: Ramp Delay plus 4 clocks of synchroniser and decision
    check(q[0][0] - tt == longint'(r) * STEP + 4 * TCLK,
          $sformatf("%s: Reset falls %0d ns after trigger", tag, q[0][0] - tt));
    for (int k = 0; k < n; k++) begin
      rs_f = q[0][2 * k];  rs_r = q[0][2 * k + 1];
      bl_r = q[1][2 * k];  bl_f = q[1][2 * k + 1];
      pk_r = q[2][2 * k];  pk_f = q[2][2 * k + 1];
      cv_f = q[3][2 * k];  cv_r = q[3][2 * k + 1];
      vt_r = q[4][2 * k];  vt_f = q[4][2 * k + 1];
      check(bl_r - rs_f == 15000, $sformatf("%s p%0d: Reset fall to Baseline %0d ns", tag, k, bl_r - rs_f));
      check(bl_f - bl_r == 2500,  $sformatf("%s p%0d: Baseline width %0d ns", tag, k, bl_f - bl_r));
      check(pk_r - bl_f == longint'(i) * STEP, $sformatf("%s p%0d: Baseline to Peak %0d ns", tag, k, pk_r - bl_f));
      check(pk_f - pk_r == 2500,  $sformatf("%s p%0d: Peak width %0d ns", tag, k, pk_f - pk_r));
      check(rs_r - pk_f == 2500,  $sformatf("%s p%0d: Peak to Reset rise %0d ns", tag, k, rs_r - pk_f));
      check(cv_f - pk_f == 22500, $sformatf("%s p%0d: Peak to Convst %0d ns", tag, k, cv_f - pk_f));
      check(cv_r - cv_f == 2500,  $sformatf("%s p%0d: Convst width %0d ns", tag, k, cv_r - cv_f));
      check(vt_r - cv_r == 7500,  $sformatf("%s p%0d: Convst to VME Trig %0d ns", tag, k, vt_r - cv_r));
      check(vt_f - vt_r == 2500,  $sformatf("%s p%0d: VME Trig width %0d ns", tag, k, vt_f - vt_r));
      if (i > 0) begin
        g_r = q[5][2 * k]; g_f = q[5][2 * k + 1];
        check(g_r == bl_f && g_f == pk_r, $sformatf("%s p%0d: Integrate Gate from Baseline end to Peak", tag, k));
      end
      if (k > 0) begin
        check(rs_f == q[4][2 * k - 1], $sformatf("%s p%0d: Reset falls with VME Trig trailing edge", tag, k));
        check(bl_r - q[2][2 * k - 2] == 52500,
              $sformatf("%s p%0d: Peak to next Baseline %0d ns", tag, k, bl_r - q[2][2 * k - 2]));
      end
    end
    if (n > 1) n_oversample++;
  endtask

  task automatic wait_idle();
    // idle: Reset high and no VME Trig for longer than any interval
    int quiet = 0;
    while (quiet < 100 * 50) begin
      @(negedge clk);
      quiet = (adc_reset && adc_convst && !vme_trig) ? quiet + 1 : 0;
    end
  endtask

  initial begin
    longint tt, t2;
    logic [15:0] r;
    bit ack;
    prev = 6'b001001;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check(adc_reset && adc_convst && !adc_baseline && !adc_peak && !vme_trig && !integrate_gate,
          "initial state: Reset and Convst high, the rest low");

    // --- settings over VME ---
    wr(4'hA, 16'd4);          // Ramp Delay 10 us
    wr(4'hC, 16'd12);         // Integration Time 30 us
    wr(4'hE, 16'd3);          // 3 oversamples
    wr(4'h4, 16'h0800);       // DAC #1 -> 5 V
    wr(4'h6, 16'h0FFF);       // DAC #2 -> 9.9976 V
    wr(4'h8, 16'hC000);       // 16-bit DAC -> +2.5 V
    bfm.read16(A(4'hA), r, ack); check(ack && r == 16'd4, "read back Ramp Delay");
    bfm.read16(A(4'hC), r, ack); check(ack && r == 16'd12, "read back Integration Time");
    bfm.read16(A(4'hE), r, ack); check(ack && r == 16'h0003, $sformatf("read Oversample idle %h", r));

    // --- analog outputs ---
    check(dac12_1_uv == 5_000_000, $sformatf("DAC #1 %0d uV", dac12_1_uv));
    check(dac12_2_uv == 9_997_558, $sformatf("DAC #2 %0d uV", dac12_2_uv));
    check(dac16_uv == 2_500_000, $sformatf("16-bit DAC %0d uV", dac16_uv));
    n_dac += 3;
    begin
      int r1 = 0, r2 = 0; logic p1 = vf1_out, p2 = vf2_out;
      repeat (20_000) begin          // 1 ms
        @(posedge clk);
        if (vf1_out && !p1) r1++;
        if (vf2_out && !p2) r2++;
        p1 = vf1_out; p2 = vf2_out;
      end
      check(r1 >= 49 && r1 <= 51, $sformatf("V/F #1: %0d periods in 1 ms (50 kHz)", r1));
      check(r2 >= 99 && r2 <= 101, $sformatf("V/F #2: %0d periods in 1 ms (~100 kHz)", r2));
      n_vf += 2;
    end

    // --- input register and its ECL copy ---
    for (int d = 0; d < 4; d++) begin
      data_in = 2'(d);
      repeat (3) @(negedge clk);
      bfm.read16(A(4'h0), r, ack);
      check(ack && r == 16'(d), $sformatf("Input Data reads %h", r));
      check(data_ecl == 2'(d), "Data copied to the VME-trigger cable");
      n_inreg++;
    end

    // --- byte write and foreign base address ---
    bfm.write16(A(4'hC), 16'h0700, 2'b10, ack);   // upper byte only
    bfm.read16(A(4'hC), r, ack); check(r == 16'h070C, $sformatf("byte write gives %h", r));
    bfm.write16(A(4'hC), 16'h000C, 2'b10, ack);   // restore upper byte to 0
    bfm.read16(A(4'hC), r, ack); check(r == 16'd12, "byte write restore");
    n_bytewr++;
    bfm.write16({BASE + 12'd1, 4'hC}, 16'd99, 2'b11, ack);
    check(!ack, "other base address not answered");
    bfm.read16(A(4'hC), r, ack); check(r == 16'd12, "other base address left registers alone");
    n_nobase++;

    // --- cycle 1: rising edge (jumper 1), 3 oversamples, extra trigger ignored ---
    clear_edges();
    trig_to(1'b0, tt);                         // falling edge: jumper 2 off, ignored
    repeat (200) @(negedge clk);
    check(q[0].size() == 0, "falling edge ignored with only jumper 1");
    trig_to(1'b1, tt);
    repeat (4 * 50 + 20 * 50) @(negedge clk);  // inside period 1
    bfm.read16(A(4'hE), r, ack);
    check(r[15:8] == 8'd1, $sformatf("Current Oversample %0d in period 1", r[15:8]));
    n_curos++;
    trig_to(1'b0, t2); trig_to(1'b1, t2);       // a new rising edge during the cycle
    n_ignored++;
    repeat ((4 + 6 + 34) * 50) @(negedge clk);  // inside period 2
    bfm.read16(A(4'hE), r, ack);
    check(r[15:8] == 8'd2, $sformatf("Current Oversample %0d in period 2", r[15:8]));
    wait_idle();
    bfm.read16(A(4'hE), r, ack);
    check(r[15:8] == 8'd0, "Current Oversample 0 when idle");
    check_cycle(tt, 4, 12, 3, "rise");
    n_rise++;

    // --- cycle 2: falling edge (jumper 2 only), 1 oversample ---
    jp_rise = 1'b0; jp_fall = 1'b1;
    wr(4'hE, 16'd1);
    wr(4'hA, 16'd0);
    wr(4'hC, 16'd40);
    clear_edges();
    trig_to(1'b0, tt);
    wait_idle();
    check_cycle(tt, 0, 40, 1, "fall");
    n_fall++;
    clear_edges();
    trig_to(1'b1, tt);                         // rising edge now ignored
    repeat (200) @(negedge clk);
    check(q[0].size() == 0, "rising edge ignored with only jumper 2");

    // --- cycles 3 and 4: both jumpers, either edge triggers ---
    jp_rise = 1'b1; jp_fall = 1'b1;
    wr(4'hA, 16'd2);
    wr(4'hC, 16'd5);
    wr(4'hE, 16'd2);
    clear_edges();
    trig_to(1'b0, tt);
    wait_idle();
    check_cycle(tt, 2, 5, 2, "both/fall");
    clear_edges();
    trig_to(1'b1, tt);
    wait_idle();
    check_cycle(tt, 2, 5, 2, "both/rise");
    n_both++;

    // --- oversample settings outside 1..20 ---
    wr(4'hE, 16'd0);
    clear_edges();
    trig_to(1'b0, tt);
    wait_idle();
    check_cycle(tt, 2, 5, 1, "os=0");
    n_clamp_lo++;
    wr(4'hE, 16'd25);
    wr(4'hC, 16'd1);
    clear_edges();
    trig_to(1'b1, tt);
    wait_idle();
    check_cycle(tt, 2, 1, 20, "os=25");
    n_clamp_hi++;

    // every mechanism must have happened
    check(n_oversample > 0, "oversampling exercised");
    check(n_ignored > 0, "ignored trigger exercised");
    check(n_rise > 0 && n_fall > 0 && n_both > 0, "all jumper settings exercised");
    check(n_clamp_lo > 0 && n_clamp_hi > 0, "oversample limits exercised");
    check(n_bytewr > 0 && n_nobase > 0 && n_curos > 0, "VME features exercised");
    check(n_inreg > 0 && n_dac > 0 && n_vf > 0, "input register, DACs and V/F exercised");
    $display("mechanisms: oversample=%0d ignored=%0d rise=%0d fall=%0d both=%0d clamp0=%0d clamp25=%0d byte=%0d foreign=%0d curos=%0d inreg=%0d dac=%0d vf=%0d",
             n_oversample, n_ignored, n_rise, n_fall, n_both, n_clamp_lo, n_clamp_hi,
             n_bytewr, n_nobase, n_curos, n_inreg, n_dac, n_vf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
