// tb_tick_gen: checks the 2.5 us step divider at its default ratio of 50.
// It counts the clocks between ticks (must be 50 every time), and checks
// that a clear restarts the count so that the next tick comes 50 clocks
// after the clock that sampled the clear.
module tb_tick_gen;
  localparam int D = 50;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, tick;
  int checks = 0, failures = 0;

  tick_gen dut (.*);
  always #25 clk = ~clk;   // 20 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int last, n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // first tick D clocks after reset release, then every D clocks
    n = 0; last = 0;
    for (int c = 1; c <= 20 * D; c++) begin
      @(negedge clk);
      if (tick) begin
        // the counter starts at 0 when reset is released, so the first
        // tick comes D-1 clocks later and the rest every D clocks
        check(c - last == ((n == 0) ? D - 1 : D), $sformatf("tick spacing %0d", c - last));
        last = c; n++;
      end
    end
    check(n == 20, $sformatf("%0d ticks in %0d clocks", n, 20 * D));
    // clear at several phases
    for (int ph = 3; ph < D; ph += 11) begin
      repeat (ph) @(negedge clk);
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      check(!tick, "no tick right after clear");
      for (int c = 1; c <= D; c++) begin
        if (c < D) check(!tick, $sformatf("early tick %0d clocks after clear", c));
        else       check(tick,  "tick D clocks after clear");
        if (c < D) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
