// tb_timing_sequencer: self-checking test of the integration-cycle sequencer.
//
// The testbench makes its own step enable (one clock in D) and records the
// clock count of every edge of every output. The expected edges are computed
// from the specified intervals, all in steps of D clocks after the accepting
// clock t0: Reset falls after the Ramp Delay R, Baseline rises 6 steps after
// that (15 us), the Peak leading edge is I steps (Integration Time) after the
// Baseline trailing edge, Reset rises 1 step after Peak, Convst falls 9
// steps after Peak and VME Trig rises 3 steps after Convst; with N
// oversamples every period after the first starts at the VME Trig trailing
// edge, so a period lasts 22 + I steps (52.5 us from Peak to Baseline).
// Cases cover several R, I and N, oversample settings 0 and 25 (limited to 1
// and 20), a trigger during a cycle (ignored) and a trigger during the last
// VME Trig pulse (accepted).
module tb_timing_sequencer;
  localparam int D = 5;   // clocks per step, shortened for simulation

  logic clk = 1'b0, rst_n = 1'b0, tick, trig = 1'b0;
  logic [15:0] ramp_delay = '0, int_time = '0;
  logic [7:0]  oversample = 8'd1;
  logic tick_clr, reset_o, baseline_o, peak_o, convst_o, vme_trig_o, integrate_gate_o, busy;
  logic [7:0] cur_os;

  int checks = 0, failures = 0;
  int cyc = 0, tcnt = 0;

  timing_sequencer #(.DIV(D)) dut (.*);

  always #5 clk = ~clk;

  // Reference step divider, restarted by tick_clr
  assign tick = (tcnt == D - 1);
  always_ff @(posedge clk) begin
    cyc  <= cyc + 1;
    tcnt <= (tick_clr || tick) ? 0 : tcnt + 1;
  end

  // Edge recorder: q[s] holds the cycle numbers of edges of signal s
  int q [6][$];
  logic [5:0] prev;
  wire  [5:0] now = {integrate_gate_o, vme_trig_o, convst_o, peak_o, baseline_o, reset_o};
  string names [6] = '{"reset", "baseline", "peak", "convst", "vme_trig", "integrate_gate"};
  always @(negedge clk) begin
    for (int s = 0; s < 6; s++) if (now[s] != prev[s]) q[s].push_back(cyc);
    prev = now;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pulse trig for one clock; return the cycle count just after the clock
  // edge that samples it (edges are recorded with the same convention)
  task automatic fire(output int t0);
    @(negedge clk); trig = 1'b1;
    @(negedge clk); trig = 1'b0; t0 = cyc;
  endtask

  task automatic expect_edges(input int t0, input int r, input int i, input int n);
    int e [6][$];
    int b, rf, pk;
    rf = t0 + r * D;
    e[0].push_back(rf);
    for (int k = 0; k < n; k++) begin
      b  = t0 + (r + 6) * D + k * (22 + i) * D;
      pk = b + D + i * D;
      e[1].push_back(b);            e[1].push_back(b + D);
      if (i > 0) begin e[5].push_back(b + D); e[5].push_back(b + (1 + i) * D); end
      e[2].push_back(pk);           e[2].push_back(b + (2 + i) * D);
      e[0].push_back(b + (3 + i) * D);
      e[3].push_back(b + (11 + i) * D); e[3].push_back(b + (12 + i) * D);
      e[4].push_back(b + (15 + i) * D); e[4].push_back(b + (16 + i) * D);
      if (k < n - 1) e[0].push_back(b + (16 + i) * D);
    end
    for (int s = 0; s < 6; s++) begin
      check(q[s].size() == e[s].size(),
            $sformatf("R=%0d I=%0d N=%0d %s: %0d edges, expected %0d", r, i, n, names[s], q[s].size(), e[s].size()));
      for (int j = 0; j < e[s].size() && j < q[s].size(); j++)
        check(q[s][j] == e[s][j],
              $sformatf("R=%0d I=%0d N=%0d %s edge %0d at %0d, expected %0d (t0=%0d)",
                        r, i, n, names[s], j, q[s][j] - t0, e[s][j] - t0, t0));
      q[s].delete();
    end
  endtask

  // One cycle with settings r, i, os; expects n periods
  task automatic run_case(input int r, input int i, input int os, input int n);
    int t0, total;
    ramp_delay = 16'(r); int_time = 16'(i); oversample = 8'(os);
    fire(t0);
    @(posedge clk);
    check(busy, "busy after trigger");
    total = (r + 6) * D + n * (22 + i) * D;
    // cur_os must count 1..n, sampled in the middle of each period
    for (int k = 0; k < n; k++) begin
      while (cyc < t0 + (r + 6) * D + k * (22 + i) * D + D / 2) @(posedge clk);
      @(negedge clk);
      check(cur_os == 8'(k + 1), $sformatf("cur_os %0d, expected %0d", cur_os, k + 1));
    end
    while (cyc < t0 + total + 2 * D) @(posedge clk);
    @(negedge clk);
    check(!busy && cur_os == 0, "idle after the cycle");
    expect_edges(t0, r, i, n);
  endtask

  initial begin
    int t0, t1;
    prev = 6'b001001;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(reset_o && convst_o && !baseline_o && !peak_o && !vme_trig_o && !integrate_gate_o,
          "initial levels: Reset and Convst high, others low");

    run_case(3, 4, 1, 1);
    run_case(0, 7, 1, 1);
    run_case(5, 0, 1, 1);
    run_case(0, 0, 2, 2);
    run_case(2, 3, 3, 3);
    run_case(1, 2, 0, 1);     // setting 0 runs one period
    run_case(1, 1, 25, 20);   // setting above 20 runs twenty

    // A trigger during a cycle is ignored
    ramp_delay = 16'd2; int_time = 16'd3; oversample = 8'd2;
    fire(t0);
    repeat (20 * D) @(posedge clk);
    fire(t1);
    while (cyc < t0 + (2 + 6) * D + 2 * 25 * D + 2 * D) @(posedge clk);
    @(negedge clk);
    check(!busy, "second trigger during the cycle was ignored");
    expect_edges(t0, 2, 3, 2);

    // A trigger during the last VME Trig pulse starts a new cycle
    ramp_delay = 16'd1; int_time = 16'd2; oversample = 8'd1;
    fire(t0);
    while (!vme_trig_o) @(negedge clk);
    fire(t1);
    check(t1 == t0 + (1 + 6 + 15 + 2) * D + 2, "re-trigger sampled during VME Trig");
    @(posedge clk);
    check(busy, "trigger during last VME Trig accepted");
    while (busy) @(posedge clk);
    repeat (2 * D) @(posedge clk);
    @(negedge clk);
    // edges of both cycles, the second relative to t1
    begin
      int qs [6][$];
      for (int s = 0; s < 6; s++) qs[s] = q[s];
      // first cycle: drop its edges (all before t1 except VME Trig fall)
      for (int s = 0; s < 6; s++) begin
        q[s].delete();
        foreach (qs[s][j]) if (qs[s][j] > t1 && !(s == 4 && qs[s][j] == t0 + (1 + 6 + 16 + 2) * D)) q[s].push_back(qs[s][j]);
      end
      check(qs[4].size() == 4 && qs[4][1] == t0 + (1 + 6 + 16 + 2) * D, "first VME Trig kept its full width");
      expect_edges(t1, 1, 2, 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
