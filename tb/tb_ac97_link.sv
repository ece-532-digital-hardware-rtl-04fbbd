// tb_ac97_link: self-checking test of the AC-link master against the codec
// model. Checks SYNC width (16 bits) and period (256 bits), codec ready,
// a register write and a register read carried through slots 1 and 2, the
// record pairs from slots 3/4 (sequence known from the model's formula,
// frames without valid slots skipped), and playback pairs sent in slots 3/4
// in the order offered, one pair per frame.
`timescale 1ns/1ps
module tb_ac97_link;
  import guitar_fx_pkg::*;

  logic bit_clk, rst, sdata_in, sdata_out, sync, codec_ready, frame_start;
  logic cmd_valid, cmd_ready, rsp_valid, play_valid, play_ready, rec_valid;
  codec_cmd_t cmd;
  codec_rsp_t rsp;
  stereo_t play_data, rec_data;
  logic reset_n;
  logic dac_valid;
  logic [15:0] dac_left, dac_right;
  int adc_pairs, frames, reg_writes, reg_reads;

  int checks = 0, failures = 0;

  ac97_link dut (.*);

  lm4549_model #(.INVALID_EVERY(4)) codec (
    .RESET_n(reset_n), .BIT_CLK(bit_clk), .SYNC(sync), .SDATA_OUT(sdata_out),
    .SDATA_IN(sdata_in), .dac_valid(dac_valid), .dac_left(dac_left),
    .dac_right(dac_right), .adc_pairs(adc_pairs), .frames(frames),
    .reg_writes(reg_writes), .reg_reads(reg_reads));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- SYNC timing
  int sync_hi = 0, bits_since_rise = 0, sync_rises = 0;
  logic sync_d = 0;
  always @(posedge bit_clk) begin
    if (!rst) begin
      bits_since_rise++;
      if (sync && !sync_d) begin
        if (sync_rises > 0) check(bits_since_rise == 256, $sformatf("frame period %0d", bits_since_rise));
        bits_since_rise = 0;
        sync_rises++;
      end
      if (!sync && sync_d) check(sync_hi == 16, $sformatf("sync width %0d", sync_hi));
      sync_hi = sync ? sync_hi + 1 : 0;
      sync_d = sync;
    end
  end

  // ---- record checker
  int rec_seen = 0;
  always @(posedge bit_clk) begin
    if (!rst && rec_valid) begin
      logic [15:0] l;
      l = 16'(1 + rec_seen * 16'h26AE);
      check(rec_data.left == l && rec_data.right == (l ^ 16'hA5A4),
            $sformatf("record pair %0d: %h %h", rec_seen, rec_data.left, rec_data.right));
      rec_seen++;
    end
  end

  // ---- playback checker
  stereo_t play_q[$];
  int dac_seen = 0, dac_frames[$];
  always @(posedge dac_valid) begin
    stereo_t e;
    if (play_q.size() == 0) check(0, "unexpected DAC pair");
    else begin
      e = play_q.pop_front();
      check(dac_left == e.left && dac_right == e.right,
            $sformatf("DAC pair %0d: got %h %h exp %h %h", dac_seen, dac_left, dac_right, e.left, e.right));
    end
    dac_frames.push_back(frames);
    dac_seen++;
  end

  // playback feeder: always offers the next pair
  int play_sent = 0;
  always @(posedge bit_clk) begin
    if (!rst && play_valid && play_ready) begin
      play_q.push_back(play_data);
      play_sent++;
    end
  end
  always_ff @(posedge bit_clk) begin
    if (rst) begin
      play_valid <= 1'b0;
      play_data  <= '0;
    end else if (!play_valid || play_ready) begin
      play_valid <= (play_sent < 20);
      play_data  <= '{left: 16'(16'h1000 + play_sent * 3), right: 16'(16'h8000 - play_sent * 5)};
    end
  end

  initial begin
    int t;
    cmd_valid = 0;
    cmd = '0;
    reset_n = 0;
    rst = 1;
    #500 reset_n = 1;
    repeat (4) @(posedge bit_clk);
    rst = 0;
    wait (codec_ready);
    check(frames >= 2, "codec ready only after the model's ready frames");
    // register write 02h <= 1234
    @(posedge bit_clk);
    cmd = '{rd: 1'b0, addr: 7'h02, data: 16'h1234};
    cmd_valid = 1;
    @(posedge bit_clk);
    while (!cmd_ready) @(posedge bit_clk);
    cmd_valid = 0;
    t = 0;
    while (!rsp_valid && t < 2000) begin @(posedge bit_clk); t++; end
    check(rsp_valid, "write completes");
    check(t < 600, "write completes within two frames");
    $display("write done");
    repeat (256) @(posedge bit_clk);  // the model applies a write at frame end
    check(codec.regs[1] == 16'h1234, "codec register 02h written");
    check(reg_writes == 1, $sformatf("exactly one register write (%0d, reg %h)", reg_writes, codec.regs[1]));
    // register read 7Ch
    @(posedge bit_clk);
    cmd = '{rd: 1'b1, addr: 7'h7C, data: 16'h0};
    cmd_valid = 1;
    @(posedge bit_clk);
    cmd_valid = 0;
    t = 0;
    while (!rsp_valid && t < 2000) begin @(posedge bit_clk); t++; end
    check(rsp_valid && rsp.data == 16'h4E53 && rsp.addr == 7'h7C, $sformatf("read 7Ch = %h", rsp.data));
    check(t < 800, "read completes within three frames");
    // read back 02h
    @(posedge bit_clk);
    cmd = '{rd: 1'b1, addr: 7'h02, data: 16'h0};
    cmd_valid = 1;
    @(posedge bit_clk);
    cmd_valid = 0;
    while (!rsp_valid) @(posedge bit_clk);
    check(rsp.data == 16'h1234, "read back 02h");
    wait (dac_seen == 20);
    repeat (8000) @(posedge bit_clk);
    repeat (600) @(posedge bit_clk);
    check(rec_seen > 20 && rec_seen == adc_pairs, $sformatf("record pairs %0d of %0d", rec_seen, adc_pairs));
    check(frames - rec_seen > 5, "frames without samples were skipped");
    for (int i = 1; i < dac_frames.size(); i++)
      check(dac_frames[i] == dac_frames[i-1] + 1, "one playback pair per frame");
    check(play_q.size() == 0, "all playback pairs sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
