// fsl_fifo: Fast Simplex Link FIFO between the processor (master side) and
// the AC97 controller (slave side), both on the system clock.
//
// Each entry holds a data word and the FSL control bit (the bit the processor
// sets with the cget/cput style instructions and clears with get/put).
// Master side: FSL_M_Write pushes {control, data} unless FSL_M_Full is high;
// a blocking put on the processor simply waits while FSL_M_Full is high.
// Slave side: first-word fall-through; while FSL_S_Exists is high,
// FSL_S_Data/FSL_S_Control show the oldest entry and FSL_S_Read pops it.
// The depth, 2024 entries, is the depth the project used for playback
// buffering. The 16-bit data width matches the sample width the controller
// consumes; the processor's 32-bit FSL word is narrowed to it (the width is
// a parameter). FSL_Has_Data mirrors Exists. Reset is synchronous on SYS_Rst
// or FSL_Rst.
module fsl_fifo #(
  parameter int unsigned DWIDTH = 16,
  parameter int unsigned DEPTH  = 2024
) (
  input  logic              FSL_Clk,
  input  logic              SYS_Rst,
  input  logic              FSL_Rst,
  // master (write) side
  input  logic [DWIDTH-1:0] FSL_M_Data,
  input  logic              FSL_M_Control,
  input  logic              FSL_M_Write,
  output logic              FSL_M_Full,
  // slave (read) side
  output logic [DWIDTH-1:0] FSL_S_Data,
  output logic              FSL_S_Control,
  input  logic              FSL_S_Read,
  output logic              FSL_S_Exists,
  output logic              FSL_Has_Data
);
  logic empty;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(DWIDTH + 1), .DEPTH(DEPTH)) u_fifo (
    .clk(FSL_Clk), .rst(SYS_Rst || FSL_Rst), .clr(1'b0),
    .wr_en(FSL_M_Write), .wr_data({FSL_M_Control, FSL_M_Data}),
    .rd_en(FSL_S_Read), .rd_data({FSL_S_Control, FSL_S_Data}),
    .empty(empty), .full(FSL_M_Full), .count(count));

  assign FSL_S_Exists = !empty;
  assign FSL_Has_Data = !empty;
endmodule
