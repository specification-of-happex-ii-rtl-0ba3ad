// tb_trigger_select: checks Master Trigger edge selection for all four
// jumper settings. For each setting the trigger input makes rising and
// falling edges; the testbench counts the one-clock `trig` pulses, checks
// they come only for the selected edges and exactly 3 clocks after the
// input changes (input change is made just after a clock edge). It also
// checks that an input already high at reset release fires nothing.
module tb_trigger_select;
  logic clk = 1'b0, rst_n = 1'b0, trig_in = 1'b0, jp_rise = 1'b0, jp_fall = 1'b0, trig;
  int checks = 0, failures = 0;

  trigger_select dut (.*);
  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Change the input to v and watch trig for 8 clocks
  task automatic edge_to(input logic v, input bit expect_pulse);
    int seen, at;
    @(negedge clk);
    trig_in = v;
    seen = 0; at = -1;
    for (int c = 1; c <= 8; c++) begin
      @(negedge clk);
      if (trig) begin seen++; at = c; end
    end
    check(seen == (expect_pulse ? 1 : 0),
          $sformatf("jp=%b%b edge to %b: %0d pulses", jp_fall, jp_rise, v, seen));
    if (expect_pulse) check(at == 3, $sformatf("pulse %0d clocks after the edge", at));
  endtask

  initial begin
    int seen;
    // an input that is high when reset is released is not an edge
    trig_in = 1'b1; jp_rise = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    seen = 0;
    repeat (8) begin @(negedge clk); if (trig) seen++; end
    check(seen == 0, "no trigger from the input level at reset release");
    trig_in = 1'b0;
    repeat (8) @(negedge clk);
    for (int j = 0; j < 4; j++) begin
      {jp_fall, jp_rise} = 2'(j);
      repeat (3) begin
        edge_to(1'b1, jp_rise);
        edge_to(1'b0, jp_fall);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
