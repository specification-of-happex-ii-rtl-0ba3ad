// vme_master_bfm: simple VMEbus A16/D16 master used by the testbenches.
//
// write16/read16 run one bus cycle: address, address modifier and WRITE*
// are set up, AS* falls one clock later, then DS1*/DS0* (chosen by `ds`,
// {DS1, DS0} active high) with the write data. The master waits up to
// `TIMEOUT` clocks for DTACK*, takes the read data, releases the strobes and
// waits for DTACK* to be released. `ack` tells whether the slave answered;
// `cycles` is the number of clocks from the data strobes to DTACK*.
module vme_master_bfm #(
  parameter int TIMEOUT = 20
) (
  input  logic        clk,
  output logic [15:1] vme_a,
  output logic [5:0]  vme_am,
  output logic        vme_as_n,
  output logic [1:0]  vme_ds_n,
  output logic        vme_write_n,
  output logic        vme_iack_n,
  output logic [15:0] vme_d_in,
  input  logic [15:0] vme_d_out,
  input  logic        vme_d_oe,
  input  logic        vme_dtack
);
  initial begin
    vme_a = '0; vme_am = 6'h29; vme_as_n = 1'b1; vme_ds_n = 2'b11;
    vme_write_n = 1'b1; vme_iack_n = 1'b1; vme_d_in = '0;
  end

  task automatic cycle(input logic [15:0] addr, input logic write, input logic [15:0] wdata,
                       input logic [1:0] ds, input logic [5:0] am, input logic iack_n,
                       output logic [15:0] rdata, output bit ack, output int cycles);
    @(negedge clk);
    vme_a = addr[15:1]; vme_am = am; vme_write_n = !write; vme_iack_n = iack_n;
    vme_d_in = write ? wdata : 16'h0;
    @(negedge clk);
    vme_as_n = 1'b0;
    @(negedge clk);
    vme_ds_n = ~ds;
    ack = 1'b0; cycles = 0; rdata = '0;
    for (int c = 1; c <= TIMEOUT; c++) begin
      @(negedge clk);
      if (vme_dtack) begin ack = 1'b1; cycles = c; break; end
    end
    if (ack && !write) rdata = vme_d_oe ? vme_d_out : 16'hDEAD;
    vme_ds_n = 2'b11;
    vme_as_n = 1'b1;
    for (int c = 1; c <= TIMEOUT && vme_dtack; c++) @(negedge clk);
    vme_iack_n = 1'b1;
  endtask

  task automatic write16(input logic [15:0] addr, input logic [15:0] data,
                         input logic [1:0] ds = 2'b11, output bit ack);
    logic [15:0] r; int n;
    cycle(addr, 1'b1, data, ds, 6'h29, 1'b1, r, ack, n);
  endtask

  task automatic read16(input logic [15:0] addr, output logic [15:0] data, output bit ack);
    int n;
    cycle(addr, 1'b0, 16'h0, 2'b11, 6'h2D, 1'b1, data, ack, n);
  endtask
endmodule
