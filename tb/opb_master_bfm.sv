// opb_master_bfm: testbench bus-functional model of a single OPB master.
// write()/read() drive one transfer: address, RNW, data and select are set
// after a rising edge and held until the slave's Sl_xferAck, then released.
// A transfer not acknowledged within 16 cycles is reported through
// timeouts. Not synthesizable.
`timescale 1ns/1ps
module opb_master_bfm (
  input  logic        clk,
  output logic [31:0] abus,
  output logic [3:0]  be,
  output logic [31:0] dbus,
  output logic        rnw,
  output logic        select,
  output logic        seqaddr,
  input  logic [31:0] sl_dbus,
  input  logic        sl_xferack
);
  int timeouts = 0;
  int transfers = 0;

  initial begin
    abus = '0; be = '0; dbus = '0; rnw = 1'b0; select = 1'b0; seqaddr = 1'b0;
  end

  task automatic xfer(input logic [31:0] a, input logic r, input logic [31:0] wd,
                      output logic [31:0] rd);
    int n = 0;
    @(posedge clk);
    #1;
    abus = a; rnw = r; dbus = r ? '0 : wd; be = 4'hF; select = 1'b1;
    @(posedge clk);
    while (!sl_xferack && n < 16) begin
      @(posedge clk);
      n++;
    end
    if (!sl_xferack) timeouts++;
    rd = sl_dbus;
    transfers++;
    #1;
    select = 1'b0; abus = '0; dbus = '0; rnw = 1'b0; be = '0;
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] wd);
    logic [31:0] unused;
    xfer(a, 1'b0, wd, unused);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] rd);
    xfer(a, 1'b1, '0, rd);
  endtask
endmodule
