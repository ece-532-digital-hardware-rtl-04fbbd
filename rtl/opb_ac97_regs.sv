// opb_ac97_regs: OPB slave interface and register file of the AC97
// controller (the "OPB interface logic" and "codec control/status register").
//
// Register map (byte offsets from C_BASEADDR; bits numbered with 0 = LSB,
// the bus documentation's bit [31-n]):
//   +4  R  record data: the oldest record sample in bits 15:0 (zero when the
//          record FIFO is empty); each read pops one sample, left then right.
//   +8  R  FIFO status: 7 record FIFO overrun, 6 play FIFO underrun (always 0,
//          the play FIFO is replaced by the FSL FIFO), 5 codec ready,
//          4 register access finished, 3 out data exists (FSL FIFO has
//          playback data), 2 switch 1, 1 switch 2, 0 playback buffer full.
//   +12 W  FIFO control: bit 1 = 1 clears the record FIFO and its overrun flag.
//   +16 RW codec address: bits 6:0 register index, bit 7 = 1 read / 0 write.
//          A write starts the access and clears "register access finished".
//   +20 RW codec data: write = data for the next register write; read = data
//          returned by the last register read.
// Offsets +4, +8, +12 and their bits follow the controller's memory map; +16,
// +20, the address register layout and the reset value 1 of "register access
// finished" are this design's choices.
//
// Bus timing: a transfer is acknowledged with Sl_xferAck one cycle after
// OPB_select is first seen with an address in [C_BASEADDR, C_HIGHADDR];
// read data is on Sl_DBus during that acknowledge cycle and zero otherwise
// (the OPB data bus is an OR of all slaves). Writes and the record FIFO pop
// take effect at the clock edge that raises Sl_xferAck. Byte enables are
// ignored: all registers are written as whole words.
module opb_ac97_regs
  import guitar_fx_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h7D00_0000,
  parameter logic [31:0] C_HIGHADDR = 32'h7D00_00FF
) (
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

  // record FIFO
  input  sample_t     rec_data,
  input  logic        rec_overrun,
  output logic        rec_rd_en,
  output logic        rec_clr,

  // status sources (already in this clock domain)
  input  logic        codec_ready,
  input  logic        out_exists,
  input  logic        play_full,
  input  logic        switch1,
  input  logic        switch2,

  // codec register access
  output logic        cmd_valid,
  output codec_cmd_t  cmd,
  input  logic        cmd_busy,
  input  logic        rsp_valid,
  input  codec_rsp_t  rsp
);
  logic        hit, start;
  logic [7:0]  offs;
  logic [31:0] status_word, rdata;
  logic [7:0]  caddr_q;
  logic [15:0] cwdata_q, crdata_q;
  logic        reg_done;

  assign hit   = OPB_select && (OPB_ABus >= C_BASEADDR) && (OPB_ABus <= C_HIGHADDR);
  assign start = hit && !Sl_xferAck;
  assign offs  = OPB_ABus[7:0] - C_BASEADDR[7:0];

  assign Sl_errAck  = 1'b0;
  assign Sl_retry   = 1'b0;
  assign Sl_toutSup = 1'b0;

  always_comb begin
    status_word = '0;
    status_word[ST_REC_OVERRUN]   = rec_overrun;
    status_word[ST_PLAY_UNDERRUN] = 1'b0;
    status_word[ST_CODEC_READY]   = codec_ready;
    status_word[ST_REG_DONE]      = reg_done;
    status_word[ST_OUT_EXISTS]    = out_exists;
    status_word[ST_SWITCH1]       = switch1;
    status_word[ST_SWITCH2]       = switch2;
    status_word[ST_PLAY_FULL]     = play_full;
  end

  always_comb begin
    case (offs)
      REG_REC_DATA:   rdata = {16'h0000, rec_data};
      REG_STATUS:     rdata = status_word;
      REG_CODEC_ADDR: rdata = {24'h0, caddr_q};
      REG_CODEC_DATA: rdata = {16'h0000, crdata_q};
      default:        rdata = '0;
    endcase
  end

  assign rec_rd_en = start && OPB_RNW && (offs == REG_REC_DATA);
  assign rec_clr   = start && !OPB_RNW && (offs == REG_CONTROL) && OPB_DBus[CTL_CLR_REC];
  assign cmd       = '{rd: caddr_q[CADDR_READ], addr: caddr_q[6:0], data: cwdata_q};

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      Sl_xferAck <= 1'b0;
      Sl_DBus    <= '0;
      caddr_q    <= '0;
      cwdata_q   <= '0;
      crdata_q   <= '0;
      reg_done   <= 1'b1;
      cmd_valid  <= 1'b0;
    end else begin
      Sl_xferAck <= start;
      Sl_DBus    <= (start && OPB_RNW) ? rdata : '0;

      if (cmd_valid && !cmd_busy) cmd_valid <= 1'b0;
      if (rsp_valid) begin
        reg_done <= 1'b1;
        if (caddr_q[CADDR_READ]) crdata_q <= rsp.data;
      end

      if (start && !OPB_RNW) begin
        case (offs)
          REG_CODEC_ADDR: begin
            caddr_q   <= OPB_DBus[7:0];
            reg_done  <= 1'b0;
            cmd_valid <= 1'b1;
          end
          REG_CODEC_DATA: cwdata_q <= OPB_DBus[15:0];
          default: ;
        endcase
      end
    end
  end

  // OPB rule: a slave acknowledges only while it is selected.
  a_ack_selected: assert property (@(posedge OPB_Clk) disable iff (OPB_Rst)
    Sl_xferAck |-> $past(OPB_select));
endmodule
