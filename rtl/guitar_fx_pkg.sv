// guitar_fx_pkg: constants and types shared by the guitar effects controller.
//
// AC-link frame layout (AC'97 standard): a 256-bit frame made of a 16-bit tag
// slot followed by twelve 20-bit slots. Slot 1 carries a codec register
// address, slot 2 register data, slots 3 and 4 left and right PCM audio. The
// record path captures slots 3 and 4 (left, right), as the controller of this
// design was corrected to do; samples are 16 bits, left-justified in a slot.
//
// Register offsets of the OPB slave follow the controller's memory map:
// +4 record data, +8 FIFO status, +12 FIFO control. The codec address and
// data registers at +16 and +20 are this design's choice. Bit positions are
// given here with bit 0 as the LSB (the bus documentation numbers bits the
// other way round, bit 31 being the LSB).
package guitar_fx_pkg;

  localparam int unsigned TAG_BITS   = 16;
  localparam int unsigned SLOT_BITS  = 20;
  localparam int unsigned FRAME_BITS = 256;
  localparam int unsigned SAMPLE_W   = 16;

  // First bit of slot n (n = 1..12) within the frame.
  function automatic int unsigned slot_start(input int unsigned n);
    return TAG_BITS + (n - 1) * SLOT_BITS;
  endfunction

  // Slots that carry the record samples (left, right).
  localparam int unsigned REC_SLOT_LEFT  = 3;
  localparam int unsigned REC_SLOT_RIGHT = 4;

  // Tag bit positions (within the 16-bit tag word).
  localparam int unsigned TAG_VALID = 15;  // frame valid / codec ready
  localparam int unsigned TAG_SLOT1 = 14;  // slot 1 valid
  localparam int unsigned TAG_SLOT2 = 13;  // slot 2 valid
  localparam int unsigned TAG_SLOT3 = 12;  // slot 3 valid
  localparam int unsigned TAG_SLOT4 = 11;  // slot 4 valid

  // OPB register byte offsets.
  localparam logic [7:0] REG_REC_DATA   = 8'h04;
  localparam logic [7:0] REG_STATUS     = 8'h08;
  localparam logic [7:0] REG_CONTROL    = 8'h0C;
  localparam logic [7:0] REG_CODEC_ADDR = 8'h10;
  localparam logic [7:0] REG_CODEC_DATA = 8'h14;

  // Status register bits, LSB = 0 (bus numbering [31-n]).
  localparam int unsigned ST_PLAY_FULL     = 0;  // [31]
  localparam int unsigned ST_SWITCH2       = 1;  // [30]
  localparam int unsigned ST_SWITCH1       = 2;  // [29]
  localparam int unsigned ST_OUT_EXISTS    = 3;  // [28]
  localparam int unsigned ST_REG_DONE      = 4;  // [27]
  localparam int unsigned ST_CODEC_READY   = 5;  // [26]
  localparam int unsigned ST_PLAY_UNDERRUN = 6;  // [25]
  localparam int unsigned ST_REC_OVERRUN   = 7;  // [24]

  // Control register bit: clear record FIFO ([30]).
  localparam int unsigned CTL_CLR_REC = 1;

  // Codec address register: bits 6:0 register index, bit 7 = read.
  localparam int unsigned CADDR_READ = 7;

  typedef logic [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t left;
    sample_t right;
  } stereo_t;

  typedef struct packed {
    logic       rd;     // 1 = read codec register, 0 = write
    logic [6:0] addr;   // codec register index
    logic [15:0] data;  // write data
  } codec_cmd_t;

  typedef struct packed {
    logic [6:0]  addr;  // register index echoed by the codec
    logic [15:0] data;  // read data (0 for a write)
  } codec_rsp_t;

endpackage
