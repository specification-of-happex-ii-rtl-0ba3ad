// tb_vme_slave: checks the VME register file through real bus cycles.
//
// It writes and reads back Ramp Delay, Integration Time and Oversample,
// checks that the DAC set values reach the register outputs (and read as 0),
// that byte writes with one data strobe change only their byte, that the
// Input Data and Current Oversample fields read the board-side inputs, that
// the board does not answer another base address, a non-A16 address
// modifier or an interrupt-acknowledge cycle, and that DTACK* comes 3 clocks
// after the data strobes.
module tb_vme_slave;
  import happex_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:1] vme_a;
  logic [5:0]  vme_am;
  logic        vme_as_n, vme_write_n, vme_iack_n;
  logic [1:0]  vme_ds_n;
  logic [15:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack;
  logic [11:0] base_sw = 12'hA5C;
  logic [1:0]  input_data = 2'b00;
  logic [7:0]  cur_os = 8'd0;
  board_regs_t regs;
  int checks = 0, failures = 0;

  vme_slave dut (.*);
  vme_master_bfm bfm (.*);
  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] A(input logic [3:0] off);
    return {base_sw, off};
  endfunction

  initial begin
    logic [15:0] r; bit ack; int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(regs.oversample == 8'd1 && regs.ramp_delay == 0 && regs.dac16 == 0, "reset values");

    // word writes and read-back
    bfm.write16(A(4'hA), 16'h1234, 2'b11, ack); check(ack, "ack ramp write");
    bfm.write16(A(4'hC), 16'hBEEF, 2'b11, ack); check(ack, "ack int write");
    bfm.write16(A(4'hE), 16'hFF07, 2'b11, ack); check(ack, "ack oversample write");
    bfm.write16(A(4'h4), 16'hF321, 2'b11, ack);
    bfm.write16(A(4'h6), 16'h0ABC, 2'b11, ack);
    bfm.write16(A(4'h8), 16'h8001, 2'b11, ack);
    check(regs.ramp_delay == 16'h1234, "ramp_delay register");
    check(regs.int_time == 16'hBEEF, "int_time register");
    check(regs.oversample == 8'h07, "oversample register takes bits 7..0");
    check(regs.dac12_1 == 12'h321, "dac12_1 takes bits 11..0");
    check(regs.dac12_2 == 12'hABC, "dac12_2");
    check(regs.dac16 == 16'h8001, "dac16");
    bfm.read16(A(4'hA), r, ack); check(ack && r == 16'h1234, $sformatf("read ramp %h", r));
    bfm.read16(A(4'hC), r, ack); check(ack && r == 16'hBEEF, $sformatf("read int %h", r));
    cur_os = 8'd13;
    bfm.read16(A(4'hE), r, ack); check(ack && r == 16'h0D07, $sformatf("read oversample %h", r));
    bfm.read16(A(4'h4), r, ack); check(ack && r == 16'h0, "DAC registers read 0");
    bfm.read16(A(4'h2), r, ack); check(ack && r == 16'h0, "unused reads 0");
    for (int d = 0; d < 4; d++) begin
      input_data = 2'(d);
      bfm.read16(A(4'h0), r, ack); check(ack && r == 16'(d), $sformatf("input data %h", r));
    end

    // byte writes: DS1* = D15..D8, DS0* = D7..D0
    bfm.write16(A(4'hA), 16'hAA55, 2'b10, ack);
    check(regs.ramp_delay == 16'hAA34, $sformatf("upper byte write %h", regs.ramp_delay));
    bfm.write16(A(4'hA), 16'h66CC, 2'b01, ack);
    check(regs.ramp_delay == 16'hAACC, $sformatf("lower byte write %h", regs.ramp_delay));
    bfm.write16(A(4'hE), 16'h0009, 2'b10, ack);
    check(regs.oversample == 8'h07, "oversample ignores upper byte");

    // not addressed: other base, wrong AM, IACK cycle
    bfm.write16({12'hA5D, 4'hA}, 16'h0001, 2'b11, ack);
    check(!ack && regs.ramp_delay == 16'hAACC, "other base address ignored");
    bfm.cycle(A(4'hA), 1'b1, 16'h0002, 2'b11, 6'h39, 1'b1, r, ack, n);
    check(!ack && regs.ramp_delay == 16'hAACC, "A24 address modifier ignored");
    bfm.cycle(A(4'hA), 1'b1, 16'h0003, 2'b11, 6'h29, 1'b0, r, ack, n);
    check(!ack && regs.ramp_delay == 16'hAACC, "IACK cycle ignored");

    // DTACK* latency
    bfm.cycle(A(4'hC), 1'b0, 16'h0, 2'b11, 6'h29, 1'b1, r, ack, n);
    check(ack && n == 3, $sformatf("DTACK after %0d clocks", n));
    check(!vme_dtack && !vme_d_oe, "DTACK and data released after the cycle");

    // random register traffic against a reference copy
    begin
      logic [15:0] ref_ramp, ref_int, w;
      ref_ramp = regs.ramp_delay;
      ref_int  = regs.int_time;
      for (int k = 0; k < 40; k++) begin
        w = 16'($urandom);
        if (k % 2) begin bfm.write16(A(4'hA), w, 2'b11, ack); ref_ramp = w; end
        else       begin bfm.write16(A(4'hC), w, 2'b11, ack); ref_int = w; end
        bfm.read16(A(4'hA), r, ack); check(r == ref_ramp, "random ramp");
        bfm.read16(A(4'hC), r, ack); check(r == ref_int, "random int");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
