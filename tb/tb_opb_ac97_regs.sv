// tb_opb_ac97_regs: drives the register block through the OPB master model
// and checks the register map: status bit positions for every source,
// record data reads popping one sample each, the record FIFO clear bit, the
// codec address register starting a command and clearing "register access
// finished", the response setting it again and latching read data, the
// one-cycle acknowledge, zero data bus outside acknowledges and no response
// outside the address window.
`timescale 1ns/1ps
module tb_opb_ac97_regs;
  import guitar_fx_pkg::*;
  localparam logic [31:0] BASE = 32'h7D00_0000;

  logic clk = 0, rst = 1;
  logic [31:0] abus, dbus, sl_dbus;
  logic [3:0] be;
  logic rnw, select, seqaddr, sl_xferack, sl_errack, sl_retry, sl_toutsup;
  sample_t rec_data;
  logic rec_overrun = 0, rec_rd_en, rec_clr;
  logic codec_ready = 0, out_exists = 0, play_full = 0, switch1 = 0, switch2 = 0;
  logic cmd_valid, cmd_busy = 0, rsp_valid = 0;
  codec_cmd_t cmd;
  codec_rsp_t rsp = '0;
  int checks = 0, failures = 0;
  int pops = 0, clrs = 0;
  int ack_len = 0, bad_bus = 0;

  opb_ac97_regs #(.C_BASEADDR(BASE), .C_HIGHADDR(BASE + 32'hFF)) dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_RNW(rnw), .OPB_select(select), .OPB_seqAddr(seqaddr),
    .Sl_DBus(sl_dbus), .Sl_xferAck(sl_xferack), .Sl_errAck(sl_errack),
    .Sl_retry(sl_retry), .Sl_toutSup(sl_toutsup), .*);

  opb_master_bfm bus (.clk(clk), .abus(abus), .be(be), .dbus(dbus), .rnw(rnw),
    .select(select), .seqaddr(seqaddr), .sl_dbus(sl_dbus), .sl_xferack(sl_xferack));

  always #18.5 clk = ~clk;

  // record FIFO stand-in: a counter that advances on each pop
  assign rec_data = 16'(16'h4000 + pops);
  always @(posedge clk) begin
    if (rec_rd_en) pops <= pops + 1;
    if (rec_clr) clrs <= clrs + 1;
    if (!rst && !sl_xferack && sl_dbus != 0) bad_bus++;
    ack_len = sl_xferack ? ack_len + 1 : 0;
    if (ack_len > 1) bad_bus++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst = 0;
    bus.read(BASE + 8, v);
    check(v == 32'h10, $sformatf("status after reset %h (register access finished)", v));
    // each status source in its own bit
    rec_overrun = 1; bus.read(BASE + 8, v); check(v[7] && v[7:0] == 8'h90, "overrun bit 7 (bus bit 24)"); rec_overrun = 0;
    codec_ready = 1; bus.read(BASE + 8, v); check(v[7:0] == 8'h30, "codec ready bit 5 (bus bit 26)"); codec_ready = 0;
    out_exists = 1;  bus.read(BASE + 8, v); check(v[7:0] == 8'h18, "out data exists bit 3 (bus bit 28)"); out_exists = 0;
    switch1 = 1;     bus.read(BASE + 8, v); check(v[7:0] == 8'h14, "switch 1 bit 2 (bus bit 29)"); switch1 = 0;
    switch2 = 1;     bus.read(BASE + 8, v); check(v[7:0] == 8'h12, "switch 2 bit 1 (bus bit 30)"); switch2 = 0;
    play_full = 1;   bus.read(BASE + 8, v); check(v[7:0] == 8'h11, "playback full bit 0 (bus bit 31)"); play_full = 0;
    switch1 = 1; switch2 = 1; bus.read(BASE + 8, v);
    check(((v & 32'h6) >> 1) == 3, "switch field read as software does");
    // record data pops
    for (int i = 0; i < 6; i++) begin
      bus.read(BASE + 4, v);
      check(v == 32'(16'h4000 + i), $sformatf("record read %0d = %h", i, v));
    end
    check(pops == 6, "one pop per read");
    bus.read(BASE + 8, v);
    check(pops == 6, "status read does not pop");
    // record clear
    bus.write(BASE + 12, 32'h0);
    check(clrs == 0, "control write without bit 1 does not clear");
    bus.write(BASE + 12, 32'h2);
    check(clrs == 1, "control bit 1 (bus bit 30) clears the record FIFO");
    // codec write command
    bus.write(BASE + 20, 32'hABCD);
    cmd_busy = 1;
    bus.write(BASE + 16, 32'h18);
    bus.read(BASE + 8, v);
    check(!v[4], "register access finished cleared by address write");
    check(cmd_valid && cmd.addr == 7'h18 && !cmd.rd && cmd.data == 16'hABCD, "command presented");
    cmd_busy = 0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(!cmd_valid, "command handed over once");
    @(negedge clk) rsp_valid = 1; rsp = '{addr: 7'h18, data: 16'h0};
    @(negedge clk) rsp_valid = 0;
    bus.read(BASE + 8, v);
    check(v[4], "register access finished after response");
    // codec read command
    bus.write(BASE + 16, 32'h80 | 32'h7C);
    check(cmd.rd && cmd.addr == 7'h7C, "read command presented");
    @(negedge clk) rsp_valid = 1; rsp = '{addr: 7'h7C, data: 16'h4E53};
    @(negedge clk) rsp_valid = 0;
    bus.read(BASE + 20, v);
    check(v == 32'h4E53, $sformatf("codec read data %h", v));
    bus.read(BASE + 16, v);
    check(v == 32'hFC, "address register reads back");
    // outside the window: no acknowledge
    begin
      int to;
      to = bus.timeouts;
      bus.read(BASE + 32'h100, v);
      check(bus.timeouts == to + 1, "no acknowledge outside the address window");
    end
    check(bad_bus == 0, "data bus zero outside acknowledge, one-cycle acknowledge");
    check(bus.timeouts == 1, "all in-window transfers acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
