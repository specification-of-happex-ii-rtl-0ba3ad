// tb_input_register: drives random levels on Data0/Data1 and checks that the
// register shows each input value two clocks later.
module tb_input_register;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] data_in = '0, data;
  logic [1:0] hist [3];
  int checks = 0, failures = 0;

  input_register dut (.*);
  always #25 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hist = '{default: 2'b00};
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      // data now reflects the input set two clocks earlier
      if (c >= 3) begin
        checks++;
        if (data !== hist[1]) begin
          failures++;
          $display("FAIL: clock %0d data %b expected %b", c, data, hist[1]);
        end
      end
      hist[1] = hist[0];
      data_in = (c % 7 < 3) ? 2'($urandom) : data_in;
      hist[0] = data_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
