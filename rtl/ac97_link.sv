// ac97_link: AC-link master, the "AC97 interface logic" of the controller.
// Runs on the codec's BIT_CLK.
//
// A free-running 8-bit counter numbers the 256 bits of a frame. SYNC is
// driven high from bit 255 of one frame through bit 14 of the next, so the
// codec sees it one bit before the tag and for 16 bit times. Outgoing slots
// come from four parallel-to-serial registers: the tag, slot 1 (codec
// register address, bit 19 = read), slot 2 (register write data) and one
// register shared by slots 3 and 4 (playback left, then right). A multiplexer
// chooses among them by the bit counter. Output bits change after the rising
// edge of BIT_CLK; SDATA_IN is sampled on the falling edge. The reset is
// asynchronous: the codec does not run BIT_CLK while it is held in reset.
// The outputs read by the other clock domain (codec_ready, rsp_valid,
// rec_valid) also have power-up values of 0 for the time before BIT_CLK
// first runs.
// Incoming slots are gathered by three serial-to-parallel registers: the tag
// (codec ready and slot-valid bits), slots 1 and 2 (register status address
// and data) and slots 3 and 4 (record left and right).
//
// Interface (all in the BIT_CLK domain):
//  * cmd_valid/cmd_ready/cmd: one codec register access. It goes out in the
//    first frame that starts after it is accepted while the codec reports
//    ready. A write finishes when the frame that carried it has been sent; a read
//    finishes when a later frame returns a status address equal to the one
//    requested. Either way rsp_valid pulses once with the register index and,
//    for a read, the data.
//  * play_valid/play_ready/play_data: a one-entry buffer for a stereo
//    playback sample. A buffered sample is sent in slots 3 and 4 of the next
//    frame with its tag bits set; with none buffered those slots are marked
//    invalid and sent as zeros.
//  * rec_valid/rec_data: pulses once per frame in which the codec marks
//    both slot 3 and slot 4 valid, with the 16-bit samples from bits 19:4.
//
// The slot numbers (3 left, 4 right) follow the corrected controller. Taking
// a record sample only from frames whose slot-valid bits are set, the tag
// layout, SYNC timing and frame-valid bit are the AC'97 link conventions
// chosen here.
module ac97_link
  import guitar_fx_pkg::*;
(
  input  logic       bit_clk,
  input  logic       rst,

  // AC-link pins
  input  logic       sdata_in,
  output logic       sdata_out,
  output logic       sync,

  output logic       codec_ready = 1'b0,
  output logic       frame_start,

  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  codec_cmd_t cmd,
  output logic       rsp_valid = 1'b0,
  output codec_rsp_t rsp,

  input  logic       play_valid,
  output logic       play_ready,
  input  stereo_t    play_data,

  output logic       rec_valid = 1'b0,
  output stereo_t    rec_data
);
  localparam int unsigned S1 = slot_start(1);               // 16
  localparam int unsigned S2 = slot_start(2);               // 36
  localparam int unsigned S3 = slot_start(REC_SLOT_LEFT);   // 56
  localparam int unsigned S4 = slot_start(REC_SLOT_RIGHT);  // 76
  localparam int unsigned S5 = slot_start(5);               // 96

  logic [7:0] bit_cnt, nxt;
  assign nxt = bit_cnt + 8'd1;

  // ---------------------------------------------------------------- state
  codec_cmd_t cmd_q;
  logic       cmd_busy, cmd_sent;
  logic       fr_cmd, fr_wr, fr_play;
  stereo_t    play_buf;
  logic       play_full;

  assign cmd_ready  = !cmd_busy;
  assign play_ready = !play_full;
  assign frame_start = (bit_cnt == 8'd0);

  // ------------------------------------------------- outgoing serializers
  logic tag_load, s1_load, s2_load, pl_load;
  logic tag_shift, s1_shift, s2_shift, pl_shift;
  logic tag_out, s1_out, s2_out, pl_out;
  logic send_cmd, send_play;
  logic [15:0] tag_word;
  logic [19:0] pl_word;

  assign send_cmd  = cmd_busy && !cmd_sent && codec_ready;
  assign send_play = play_full;

  always_comb begin
    tag_word = '0;
    tag_word[TAG_VALID] = 1'b1;
    tag_word[TAG_SLOT1] = send_cmd;
    tag_word[TAG_SLOT2] = send_cmd && !cmd_q.rd;
    tag_word[TAG_SLOT3] = send_play;
    tag_word[TAG_SLOT4] = send_play;
  end

  assign tag_load  = (nxt == 8'd0);
  assign tag_shift = (nxt > 8'd0)  && (nxt < 8'(S1));
  assign s1_load   = (nxt == 8'(S1));
  assign s1_shift  = (nxt > 8'(S1)) && (nxt < 8'(S2));
  assign s2_load   = (nxt == 8'(S2));
  assign s2_shift  = (nxt > 8'(S2)) && (nxt < 8'(S3));
  assign pl_load   = (nxt == 8'(S3)) || (nxt == 8'(S4));
  assign pl_shift  = (nxt > 8'(S3)) && (nxt < 8'(S5)) && !pl_load;
  assign pl_word   = !fr_play ? '0 :
                     (nxt == 8'(S3)) ? {play_buf.left, 4'h0} : {play_buf.right, 4'h0};

  ac97_p2s #(.WIDTH(TAG_BITS)) u_tag_p2s (
    .clk(bit_clk), .rst(rst), .load(tag_load), .din(tag_word),
    .shift(tag_shift), .sout(tag_out));
  ac97_p2s #(.WIDTH(SLOT_BITS)) u_addr_p2s (
    .clk(bit_clk), .rst(rst), .load(s1_load),
    .din(fr_cmd ? {cmd_q.rd, cmd_q.addr, 12'h000} : 20'h0),
    .shift(s1_shift), .sout(s1_out));
  ac97_p2s #(.WIDTH(SLOT_BITS)) u_wdata_p2s (
    .clk(bit_clk), .rst(rst), .load(s2_load),
    .din(fr_wr ? {cmd_q.data, 4'h0} : 20'h0),
    .shift(s2_shift), .sout(s2_out));
  ac97_p2s #(.WIDTH(SLOT_BITS)) u_play_p2s (
    .clk(bit_clk), .rst(rst), .load(pl_load), .din(pl_word),
    .shift(pl_shift), .sout(pl_out));

  // Output multiplexer, selected by the bit now on the wire.
  always_comb begin
    if (bit_cnt < 8'(S1))      sdata_out = tag_out;
    else if (bit_cnt < 8'(S2)) sdata_out = s1_out;
    else if (bit_cnt < 8'(S3)) sdata_out = s2_out;
    else if (bit_cnt < 8'(S5)) sdata_out = pl_out;
    else                       sdata_out = 1'b0;
  end

  // -------------------------------------------------- incoming collectors
  logic sdi_q;
  always_ff @(negedge bit_clk or posedge rst) begin
    if (rst) sdi_q <= 1'b0;
    else     sdi_q <= sdata_in;
  end

  logic [15:0] tag_in;
  logic [19:0] st_in, rec_in;
  ac97_s2p #(.WIDTH(TAG_BITS)) u_tag_s2p (
    .clk(bit_clk), .rst(rst), .shift(bit_cnt < 8'(S1)), .sin(sdi_q), .dout(tag_in));
  ac97_s2p #(.WIDTH(SLOT_BITS)) u_status_s2p (
    .clk(bit_clk), .rst(rst), .shift(bit_cnt >= 8'(S1) && bit_cnt < 8'(S3)),
    .sin(sdi_q), .dout(st_in));
  ac97_s2p #(.WIDTH(SLOT_BITS)) u_rec_s2p (
    .clk(bit_clk), .rst(rst), .shift(bit_cnt >= 8'(S3) && bit_cnt < 8'(S5)),
    .sin(sdi_q), .dout(rec_in));

  logic       in_v1, in_v3, in_v4;
  logic [6:0] st_addr;
  sample_t    rec_left;

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge bit_clk or posedge rst) begin
    if (rst) begin
      bit_cnt     <= 8'd254;
      sync        <= 1'b0;
      codec_ready <= 1'b0;
      cmd_q       <= '0;
      cmd_busy    <= 1'b0;
      cmd_sent    <= 1'b0;
      fr_cmd      <= 1'b0;
      fr_wr       <= 1'b0;
      fr_play     <= 1'b0;
      play_buf    <= '0;
      play_full   <= 1'b0;
      in_v1       <= 1'b0;
      in_v3       <= 1'b0;
      in_v4       <= 1'b0;
      st_addr     <= '0;
      rec_left    <= '0;
      rsp_valid   <= 1'b0;
      rsp         <= '0;
      rec_valid   <= 1'b0;
      rec_data    <= '0;
    end else begin
      bit_cnt   <= nxt;
      sync      <= (nxt == 8'd255) || (nxt < 8'd15);
      rsp_valid <= 1'b0;
      rec_valid <= 1'b0;

      if (cmd_valid && cmd_ready) begin
        cmd_q    <= cmd;
        cmd_busy <= 1'b1;
        cmd_sent <= 1'b0;
      end

      if (play_valid && play_ready) begin
        play_buf  <= play_data;
        play_full <= 1'b1;
      end

      // Frame start: decide what this frame carries.
      if (nxt == 8'd0) begin
        fr_cmd  <= send_cmd;
        fr_wr   <= send_cmd && !cmd_q.rd;
        fr_play <= send_play;
        if (send_cmd) cmd_sent <= 1'b1;
      end

      // The right sample is loaded at the start of slot 4: buffer is free.
      if (nxt == 8'(S4) && fr_play) play_full <= 1'b0;

      // Incoming slot words, taken one bit after each slot ends.
      case (bit_cnt)
        8'(S1): begin
          codec_ready <= tag_in[TAG_VALID];
          in_v1       <= tag_in[TAG_SLOT1];
          in_v3       <= tag_in[TAG_SLOT3];
          in_v4       <= tag_in[TAG_SLOT4];
        end
        8'(S2): st_addr <= st_in[18:12];
        8'(S3): begin
          if (cmd_busy && cmd_sent && !fr_cmd && cmd_q.rd &&
                       in_v1 && st_addr == cmd_q.addr) begin
            rsp_valid <= 1'b1;
            rsp       <= '{addr: st_addr, data: st_in[19:4]};
            cmd_busy  <= 1'b0;
          end
        end
        8'(S4): rec_left <= rec_in[19:4];
        8'(S5): begin
          if (in_v3 && in_v4) begin
            rec_valid <= 1'b1;
            rec_data  <= '{left: rec_left, right: rec_in[19:4]};
          end
        end
        8'd255: begin
          if (fr_wr) begin
            // the frame that carried the write is complete
            rsp_valid <= 1'b1;
            rsp       <= '{addr: cmd_q.addr, data: 16'h0000};
            cmd_busy  <= 1'b0;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
