// opb_ac97_controller: OPB AC97 sound controller with FSL playback input and
// user switches.
//
// The controller connects the processor to an AC'97 codec (LM4549A). It has
// two clock domains: the OPB/system clock (27 MHz in the reference system),
// which also clocks the FSL FIFO, and the codec's BIT_CLK (nominally
// 12.288 MHz), on which the AC-link runs (ac97_link). Traffic between them:
//   * record: each stereo pair the codec sends crosses to the OPB domain by a
//     handshake and is written into the record FIFO (record_fifo), which the
//     processor reads over OPB, left then right;
//   * playback: a small fetcher on the system clock pops two words, left then
//     right, from the FSL FIFO's slave side, holds the pair ("playback
//     buffer", status bit 0 while it waits) and hands it across to the link,
//     which sends it in slots 3 and 4 of the next frame;
//   * codec register access: the address/data registers written over OPB
//     cross to the link as one command; the completion and read data cross
//     back and set "register access finished".
// Every crossing uses cdc_handshake (toggle request/acknowledge); level
// status (codec ready, switches) uses two-flop synchronizers.
// The two switches drive the two LEDs directly and appear in status bits 2
// (switch 1) and 1 (switch 2), which is why software shifts the masked status
// right by one to get the effect number.
// AC97Reset_n holds the codec in reset for RESET_CYCLES system clocks after
// OPB_Rst; the link's own reset follows it, so the link starts cleanly when
// the codec starts BIT_CLK.
// Switch/LED wiring, the status bits and the record slots 3 and 4 follow the
// documented controller; the crossing scheme, the playback fetcher and the
// codec reset length are this design's choices.
module opb_ac97_controller
  import guitar_fx_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR   = 32'h7D00_0000,
  parameter logic [31:0] C_HIGHADDR   = 32'h7D00_00FF,
  parameter int unsigned REC_DEPTH    = 32,
  parameter int unsigned RESET_CYCLES = 32
) (
  // OPB slave
  input  logic        OPB_Clk,
  input  logic        OPB_Rst,
  input  logic [31:0] OPB_ABus,
  input  logic [3:0]  OPB_BE,
  input  logic [31:0] OPB_DBus,
  input  logic        OPB_RNW,
  input  logic        OPB_select,
  input  logic        OPB_seqAddr,
  output logic [31:0] Sl_DBus,
  output logic        Sl_xferAck,
  output logic        Sl_errAck,
  output logic        Sl_retry,
  output logic        Sl_toutSup,

  // FSL slave side (playback samples), clocked by OPB_Clk
  input  sample_t     FSL_S_Data,
  input  logic        FSL_S_Control,
  input  logic        FSL_S_Exists,
  output logic        FSL_S_Read,

  // AC-link
  input  logic        Bit_Clk,
  input  logic        SData_In,
  output logic        SData_Out,
  output logic        Sync,
  output logic        AC97Reset_n,

  // user switches and LEDs
  input  logic        Switch1,
  input  logic        Switch2,
  output logic        LED1,
  output logic        LED2
);
  // ------------------------------------------------------------ resets
  localparam int unsigned RCW = $clog2(RESET_CYCLES + 1);
  logic [RCW-1:0] rst_cnt;
  logic           rst_bit;

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      rst_cnt     <= '0;
      AC97Reset_n <= 1'b0;
    end else if (rst_cnt != RCW'(RESET_CYCLES)) begin
      rst_cnt <= rst_cnt + 1'b1;
    end else begin
      AC97Reset_n <= 1'b1;
    end
  end

  reset_sync u_rst_bit (.clk(Bit_Clk), .rst_in(OPB_Rst || !AC97Reset_n), .rst_out(rst_bit));

  // ------------------------------------------------------ switches, LEDs
  logic [1:0] sw_s;
  bit_sync #(.WIDTH(2)) u_sw_sync (.clk(OPB_Clk), .rst(OPB_Rst),
    .d({Switch1, Switch2}), .q(sw_s));
  assign LED1 = Switch1;
  assign LED2 = Switch2;

  // ------------------------------------------------------------- link
  logic       link_ready, link_ready_s;
  logic       l_cmd_valid, l_cmd_ready, l_rsp_valid, l_play_valid, l_play_ready;
  logic       l_rec_valid, l_frame_start;
  codec_cmd_t l_cmd;
  codec_rsp_t l_rsp;
  stereo_t    l_play, l_rec;

  ac97_link u_link (
    .bit_clk(Bit_Clk), .rst(rst_bit),
    .sdata_in(SData_In), .sdata_out(SData_Out), .sync(Sync),
    .codec_ready(link_ready), .frame_start(l_frame_start),
    .cmd_valid(l_cmd_valid), .cmd_ready(l_cmd_ready), .cmd(l_cmd),
    .rsp_valid(l_rsp_valid), .rsp(l_rsp),
    .play_valid(l_play_valid), .play_ready(l_play_ready), .play_data(l_play),
    .rec_valid(l_rec_valid), .rec_data(l_rec));

  bit_sync #(.WIDTH(1)) u_rdy_sync (.clk(OPB_Clk), .rst(OPB_Rst),
    .d(link_ready), .q(link_ready_s));

  // -------------------------------------------------- register access
  logic       o_cmd_valid, o_cmd_busy, o_rsp_valid;
  codec_cmd_t o_cmd;
  codec_rsp_t o_rsp;

  cdc_handshake #(.WIDTH($bits(codec_cmd_t))) u_cmd_cdc (
    .src_clk(OPB_Clk), .src_rst(OPB_Rst), .src_valid(o_cmd_valid),
    .src_data(o_cmd), .src_busy(o_cmd_busy),
    .dst_clk(Bit_Clk), .dst_rst(rst_bit), .dst_ready(l_cmd_ready),
    .dst_valid(l_cmd_valid), .dst_data(l_cmd));

  logic rsp_busy;
  cdc_handshake #(.WIDTH($bits(codec_rsp_t))) u_rsp_cdc (
    .src_clk(Bit_Clk), .src_rst(rst_bit), .src_valid(l_rsp_valid),
    .src_data(l_rsp), .src_busy(rsp_busy),
    .dst_clk(OPB_Clk), .dst_rst(OPB_Rst), .dst_ready(1'b1),
    .dst_valid(o_rsp_valid), .dst_data(o_rsp));

  // ------------------------------------------------------------ record
  logic    rec_busy, o_rec_valid;
  stereo_t o_rec;
  sample_t rec_rdata;
  logic    rec_rd_en, rec_clr, rec_empty, rec_overrun;
  logic [$clog2(REC_DEPTH+1)-1:0] rec_count;

  cdc_handshake #(.WIDTH($bits(stereo_t))) u_rec_cdc (
    .src_clk(Bit_Clk), .src_rst(rst_bit), .src_valid(l_rec_valid),
    .src_data(l_rec), .src_busy(rec_busy),
    .dst_clk(OPB_Clk), .dst_rst(OPB_Rst), .dst_ready(1'b1),
    .dst_valid(o_rec_valid), .dst_data(o_rec));

  record_fifo #(.DEPTH(REC_DEPTH)) u_rec_fifo (
    .clk(OPB_Clk), .rst(OPB_Rst), .clr(rec_clr),
    .wr_en(o_rec_valid), .wr_data(o_rec),
    .rd_en(rec_rd_en), .rd_data(rec_rdata),
    .empty(rec_empty), .overrun(rec_overrun), .count(rec_count));

  // ---------------------------------------------------------- playback
  typedef enum logic [1:0] {PF_LEFT, PF_RIGHT, PF_HOLD} pf_state_t;
  pf_state_t pf_state;
  stereo_t   pf_pair;
  logic      play_busy, pf_send;

  assign FSL_S_Read = FSL_S_Exists && (pf_state != PF_HOLD);
  assign pf_send    = (pf_state == PF_HOLD);

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      pf_state <= PF_LEFT;
      pf_pair  <= '0;
    end else begin
      unique case (pf_state)
        PF_LEFT:  if (FSL_S_Exists) begin
                    pf_pair.left <= FSL_S_Data;
                    pf_state     <= PF_RIGHT;
                  end
        PF_RIGHT: if (FSL_S_Exists) begin
                    pf_pair.right <= FSL_S_Data;
                    pf_state      <= PF_HOLD;
                  end
        PF_HOLD:  if (!play_busy) pf_state <= PF_LEFT;
        default:  pf_state <= PF_LEFT;
      endcase
    end
  end

  cdc_handshake #(.WIDTH($bits(stereo_t))) u_play_cdc (
    .src_clk(OPB_Clk), .src_rst(OPB_Rst), .src_valid(pf_send),
    .src_data(pf_pair), .src_busy(play_busy),
    .dst_clk(Bit_Clk), .dst_rst(rst_bit), .dst_ready(l_play_ready),
    .dst_valid(l_play_valid), .dst_data(l_play));

  // ------------------------------------------------------- OPB registers
  opb_ac97_regs #(.C_BASEADDR(C_BASEADDR), .C_HIGHADDR(C_HIGHADDR)) u_regs (
    .OPB_Clk(OPB_Clk), .OPB_Rst(OPB_Rst), .OPB_ABus(OPB_ABus), .OPB_BE(OPB_BE),
    .OPB_DBus(OPB_DBus), .OPB_RNW(OPB_RNW), .OPB_select(OPB_select),
    .OPB_seqAddr(OPB_seqAddr), .Sl_DBus(Sl_DBus), .Sl_xferAck(Sl_xferAck),
    .Sl_errAck(Sl_errAck), .Sl_retry(Sl_retry), .Sl_toutSup(Sl_toutSup),
    .rec_data(rec_rdata), .rec_overrun(rec_overrun),
    .rec_rd_en(rec_rd_en), .rec_clr(rec_clr),
    .codec_ready(link_ready_s), .out_exists(FSL_S_Exists), .play_full(pf_send),
    .switch1(sw_s[1]), .switch2(sw_s[0]),
    .cmd_valid(o_cmd_valid), .cmd(o_cmd), .cmd_busy(o_cmd_busy),
    .rsp_valid(o_rsp_valid), .rsp(o_rsp));
endmodule
