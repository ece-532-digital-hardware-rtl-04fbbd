// tb_opb_ac97_controller: the AC97 controller between an OPB master model,
// a first-word-fall-through FSL source and the codec model, on unrelated
// clocks (27 MHz system clock, about 12.2 MHz BIT_CLK).
// Checks: codec reset release, codec-ready status, register write and read
// through the address/data registers with "register access finished"
// polling, record samples read over OPB in the model's order (left, right),
// record FIFO overrun when software stops reading and its clear, playback
// pairs taken from an FSL FIFO appearing at the codec in order, "out data exists",
// and switches reaching the LEDs and status bits 2 and 1.
`timescale 1ns/1ps
module tb_opb_ac97_controller;
  import guitar_fx_pkg::*;
  localparam logic [31:0] BASE = 32'h7D00_0000;

  logic clk = 0, rst = 1;
  logic [31:0] abus, dbus, sl_dbus;
  logic [3:0] be;
  logic rnw, select, seqaddr, sl_xferack, sl_errack, sl_retry, sl_toutsup;
  sample_t fsl_data;
  logic fsl_exists, fsl_read;
  logic bit_clk, sdata_in, sdata_out, sync, reset_n;
  logic sw1 = 0, sw2 = 0, led1, led2;
  logic dac_valid;
  logic [15:0] dac_left, dac_right;
  int adc_pairs, frames, reg_writes, reg_reads;
  int checks = 0, failures = 0;

  opb_ac97_controller #(.C_BASEADDR(BASE), .C_HIGHADDR(BASE + 32'hFF)) dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_RNW(rnw), .OPB_select(select), .OPB_seqAddr(seqaddr),
    .Sl_DBus(sl_dbus), .Sl_xferAck(sl_xferack), .Sl_errAck(sl_errack),
    .Sl_retry(sl_retry), .Sl_toutSup(sl_toutsup),
    .FSL_S_Data(fsl_data), .FSL_S_Control(1'b0), .FSL_S_Exists(fsl_exists),
    .FSL_S_Read(fsl_read),
    .Bit_Clk(bit_clk), .SData_In(sdata_in), .SData_Out(sdata_out), .Sync(sync),
    .AC97Reset_n(reset_n), .Switch1(sw1), .Switch2(sw2), .LED1(led1), .LED2(led2));

  opb_master_bfm bus (.clk(clk), .abus(abus), .be(be), .dbus(dbus), .rnw(rnw),
    .select(select), .seqaddr(seqaddr), .sl_dbus(sl_dbus), .sl_xferack(sl_xferack));

  lm4549_model #(.HALF_NS(41)) codec (
    .RESET_n(reset_n), .BIT_CLK(bit_clk), .SYNC(sync), .SDATA_OUT(sdata_out),
    .SDATA_IN(sdata_in), .dac_valid(dac_valid), .dac_left(dac_left),
    .dac_right(dac_right), .adc_pairs(adc_pairs), .frames(frames),
    .reg_writes(reg_writes), .reg_reads(reg_reads));

  always #18.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FSL source: the FSL FIFO, written by the testbench at falling edges
  logic fsl_m_write = 0, fsl_m_full, fsl_ctrl, fsl_has;
  sample_t fsl_m_data = '0;
  fsl_fifo #(.DWIDTH(16), .DEPTH(64)) u_fsl (
    .FSL_Clk(clk), .SYS_Rst(rst), .FSL_Rst(1'b0),
    .FSL_M_Data(fsl_m_data), .FSL_M_Control(1'b0), .FSL_M_Write(fsl_m_write),
    .FSL_M_Full(fsl_m_full), .FSL_S_Data(fsl_data), .FSL_S_Control(fsl_ctrl),
    .FSL_S_Read(fsl_read), .FSL_S_Exists(fsl_exists), .FSL_Has_Data(fsl_has));

  task automatic fsl_put(input sample_t d);
    @(negedge clk);
    fsl_m_write = 1; fsl_m_data = d;
    @(negedge clk);
    fsl_m_write = 0;
  endtask

  // DAC checker
  sample_t exp_q[$];
  int dac_seen = 0;
  always @(posedge dac_valid) begin
    sample_t l, r;
    if (exp_q.size() < 2) check(0, "unexpected DAC pair");
    else begin
      l = exp_q.pop_front(); r = exp_q.pop_front();
      check(dac_left == l && dac_right == r,
            $sformatf("DAC %0d got %h %h exp %h %h", dac_seen, dac_left, dac_right, l, r));
    end
    dac_seen++;
  end

  task automatic status(output logic [31:0] v);
    bus.read(BASE + 8, v);
  endtask

  task automatic codec_access(input logic rd, input logic [6:0] a, input logic [15:0] d,
                              output logic [15:0] rdata);
    logic [31:0] v;
    int n = 0;
    if (!rd) bus.write(BASE + 20, 32'(d));
    bus.write(BASE + 16, {24'h0, rd, a});
    status(v);
    check(!v[ST_REG_DONE], "access pending after address write");
    do begin status(v); n++; end while (!v[ST_REG_DONE] && n < 2000);
    check(v[ST_REG_DONE], "register access finished");
    bus.read(BASE + 20, v);
    rdata = v[15:0];
  endtask

  int rec_k = 0;
  task automatic read_pair(output logic [15:0] l, output logic [15:0] r);
    logic [31:0] v;
    int n = 0;
    do begin bus.read(BASE + 4, v); n++; end while (v == 0 && n < 5000);
    l = v[15:0];
    bus.read(BASE + 4, v);
    r = v[15:0];
  endtask

  initial begin
    logic [31:0] v;
    logic [15:0] d, l, r;
    repeat (4) @(posedge clk);
    rst = 0;
    check(!reset_n, "codec held in reset");
    wait (reset_n);
    do status(v); while (!v[ST_CODEC_READY]);
    check(frames > 2, $sformatf("codec ready seen after the codec's ready frames (%0d, t=%0t)", frames, $time));
    // register write and read back
    codec_access(1'b0, 7'h02, 16'h0000, d);
    codec_access(1'b0, 7'h18, 16'h0808, d);
    check(codec.regs[8'h18 >> 1] == 16'h0808, "codec register 18h written");
    codec_access(1'b1, 7'h7C, 16'h0, d);
    check(d == 16'h4E53, $sformatf("vendor ID1 %h", d));
    codec_access(1'b1, 7'h02, 16'h0, d);
    check(d == 16'h0000, "master volume read back");
    // record: clear, then follow the sequence
    $display("[%0t] record", $time);
    bus.write(BASE + 12, 32'h2);
    read_pair(l, r);
    rec_k = 0;
    while (16'(1 + rec_k * 16'h26AE) != l && rec_k < 100000) rec_k++;
    check(r == (l ^ 16'hA5A4), "first pair matches");
    for (int i = 0; i < 40; i++) begin
      read_pair(l, r);
      rec_k++;
      check(l == 16'(1 + rec_k * 16'h26AE) && r == (l ^ 16'hA5A4),
            $sformatf("record pair %0d: %h %h", rec_k, l, r));
    end
    status(v);
    check(!v[ST_REC_OVERRUN], "no overrun while reading");
    $display("[%0t] overrun", $time);
    // stop reading: overrun after REC_DEPTH/2 frames
    #(41ns * 2 * 256 * 20);
    status(v);
    check(v[ST_REC_OVERRUN], "overrun when software stops reading");
    bus.write(BASE + 12, 32'h2);
    status(v);
    check(!v[ST_REC_OVERRUN], "clear resets overrun");
    $display("[%0t] playback", $time);
    // playback
    status(v);
    check(!v[ST_OUT_EXISTS], "no out data");
    for (int i = 0; i < 30; i++) begin
      sample_t a, b;
      a = 16'($urandom); b = 16'($urandom);
      exp_q.push_back(a); exp_q.push_back(b);
      fsl_put(a); fsl_put(b);
    end
    status(v);
    check(v[ST_OUT_EXISTS], "out data exists with FSL data");
    wait (dac_seen == 30);
    check(exp_q.size() == 0, "all playback pairs played");
    // switches and LEDs
    sw1 = 1; sw2 = 0; #1;
    check(led1 && !led2, "LED follows switch 1");
    repeat (4) @(posedge clk);
    status(v);
    check(((v & 32'h6) >> 1) == 2, "switch 1 in status bit 2");
    sw1 = 0; sw2 = 1; #1;
    check(!led1 && led2, "LED follows switch 2");
    repeat (4) @(posedge clk);
    status(v);
    check(((v & 32'h6) >> 1) == 1, "switch 2 in status bit 1");
    check(bus.timeouts == 0, "every OPB transfer acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired dac_seen=%0d exp=%0d pf=%0d full=%0d busy=%0d", dac_seen, exp_q.size(), dut.pf_state, dut.u_link.play_full, dut.play_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
