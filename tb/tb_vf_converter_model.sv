// tb_vf_converter_model: checks the V/F converter model's 10 kHz/V transfer
// function. For several input voltages it counts output periods over a 2 ms
// window of the 20 MHz reference clock; the count must be f * 2 ms within one
// period (0 V gives no output, 10 V gives 100 kHz = 200 periods).
module tb_vf_converter_model;
  logic ref_clk = 1'b0, rst_n = 1'b0, fout;
  logic signed [31:0] vin_uv = 0;
  int checks = 0, failures = 0;

  vf_converter_model dut (.*);
  always #25 ref_clk = ~ref_clk;   // 20 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int uv);
    int rises, expected;
    logic p;
    vin_uv = uv;
    repeat (2000) @(posedge ref_clk);       // settle
    rises = 0; p = fout;
    repeat (40_000) begin                   // 2 ms
      @(posedge ref_clk);
      if (fout && !p) rises++;
      p = fout;
    end
    expected = int'(longint'(uv > 0 ? uv : 0) * 2 / 100_000);  // f = uV/100 Hz, times 2 ms
    check(rises >= expected - 1 && rises <= expected + 1,
          $sformatf("%0d uV: %0d periods in 2 ms, expected %0d", uv, rises, expected));
  endtask

  initial begin
    repeat (2) @(negedge ref_clk);
    rst_n = 1'b1;
    measure(0);
    measure(10_000_000);
    measure(5_000_000);
    measure(1_234_567);
    measure(9_997_558);
    measure(-1_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge ref_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
