// tb_dac12_model: checks the 12-bit DAC model's 0-10 V transfer function
// V = 10 V * code / 4096 (in whole microvolts, rounded down) at the end
// points and for random codes, and that it is monotonic over all codes.
module tb_dac12_model;
  logic [11:0] code;
  logic signed [31:0] vout_uv;
  int checks = 0, failures = 0;

  dac12_model dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int prev;
    code = 12'd0;    #1 check(vout_uv == 0, "code 0 gives 0 V");
    code = 12'd2048; #1 check(vout_uv == 5_000_000, "mid code gives 5 V");
    code = 12'd4095; #1 check(vout_uv == 9_997_558, $sformatf("full scale %0d uV", vout_uv));
    repeat (200) begin
      code = 12'($urandom);
      #1 check(vout_uv == int'((longint'(code) * 10_000_000) / 4096),
               $sformatf("code %0d gives %0d uV", code, vout_uv));
    end
    prev = -1;
    for (int c = 0; c < 4096; c++) begin
      code = 12'(c);
      #1 check(vout_uv > prev, "monotonic");
      prev = vout_uv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
