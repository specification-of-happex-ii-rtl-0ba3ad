// tb_dac16_model: checks the 16-bit DAC model's -5..+5 V offset-binary
// transfer function V = -5 V + 10 V * code / 65536 (whole microvolts,
// rounded down) at the end points, at mid scale and for random codes.
module tb_dac16_model;
  logic [15:0] code;
  logic signed [31:0] vout_uv;
  int checks = 0, failures = 0;

  dac16_model dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    code = 16'h0000; #1 check(vout_uv == -5_000_000, $sformatf("code 0: %0d uV", vout_uv));
    code = 16'h8000; #1 check(vout_uv == 0, $sformatf("code 8000h: %0d uV", vout_uv));
    code = 16'hFFFF; #1 check(vout_uv == 4_999_847, $sformatf("code FFFFh: %0d uV", vout_uv));
    code = 16'h4000; #1 check(vout_uv == -2_500_000, $sformatf("code 4000h: %0d uV", vout_uv));
    repeat (500) begin
      code = 16'($urandom);
      #1 check(vout_uv == int'((longint'(code) * 10_000_000) / 65536) - 5_000_000,
               $sformatf("code %h gives %0d uV", code, vout_uv));
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
