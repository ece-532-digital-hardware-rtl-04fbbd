// guitar_fx_top: FPGA-side hardware of the guitar effects system.
//
// Signal flow: the AC'97 codec digitizes the guitar signal and sends stereo
// samples over the AC-link to the OPB AC97 controller, which queues them in
// its record FIFO. The processor (outside this module) reads them over OPB,
// applies the effect chosen by the two switches (clean, hard-clipping
// distortion, polynomial waveshaping or echo) in software and writes the
// results, left then right, into the FSL FIFO with blocking puts. The
// controller pops the FSL FIFO and sends each pair back to the codec for
// playback. Switches drive the LEDs directly and are readable in the
// controller's status register.
//
// Everything except the AC-link BIT_CLK domain inside the controller runs on
// SYS_Clk (the OPB clock). The processor's OPB master signals and FSL master
// signals are ports of this module (with a single master and a single slave
// the OPB bus is just these wires), as are the codec pins, switches and LEDs.
module guitar_fx_top
  import guitar_fx_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR    = 32'h7D00_0000,
  parameter logic [31:0] C_HIGHADDR    = 32'h7D00_00FF,
  parameter int unsigned FSL_DEPTH     = 2024,
  parameter int unsigned REC_DEPTH     = 32,
  parameter int unsigned RESET_CYCLES  = 32
) (
  input  logic        SYS_Clk,
  input  logic        SYS_Rst,

  // processor OPB master
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

  // processor FSL master (playback samples)
  input  sample_t     FSL_M_Data,
  input  logic        FSL_M_Control,
  input  logic        FSL_M_Write,
  output logic        FSL_M_Full,

  // AC'97 codec
  input  logic        Bit_Clk,
  input  logic        SData_In,
  output logic        SData_Out,
  output logic        Sync,
  output logic        AC97Reset_n,

  // user interface
  input  logic [1:0]  Switches,   // [1] = switch 1, [0] = switch 2
  output logic [1:0]  LEDs
);
  sample_t fsl_s_data;
  logic    fsl_s_control, fsl_s_read, fsl_s_exists, fsl_has_data;

  fsl_fifo #(.DWIDTH(SAMPLE_W), .DEPTH(FSL_DEPTH)) u_fsl (
    .FSL_Clk(SYS_Clk), .SYS_Rst(SYS_Rst), .FSL_Rst(1'b0),
    .FSL_M_Data(FSL_M_Data), .FSL_M_Control(FSL_M_Control),
    .FSL_M_Write(FSL_M_Write), .FSL_M_Full(FSL_M_Full),
    .FSL_S_Data(fsl_s_data), .FSL_S_Control(fsl_s_control),
    .FSL_S_Read(fsl_s_read), .FSL_S_Exists(fsl_s_exists),
    .FSL_Has_Data(fsl_has_data));

  opb_ac97_controller #(
    .C_BASEADDR(C_BASEADDR), .C_HIGHADDR(C_HIGHADDR),
    .REC_DEPTH(REC_DEPTH), .RESET_CYCLES(RESET_CYCLES)
  ) u_ac97 (
    .OPB_Clk(SYS_Clk), .OPB_Rst(SYS_Rst),
    .OPB_ABus(OPB_ABus), .OPB_BE(OPB_BE), .OPB_DBus(OPB_DBus),
    .OPB_RNW(OPB_RNW), .OPB_select(OPB_select), .OPB_seqAddr(OPB_seqAddr),
    .Sl_DBus(Sl_DBus), .Sl_xferAck(Sl_xferAck), .Sl_errAck(Sl_errAck),
    .Sl_retry(Sl_retry), .Sl_toutSup(Sl_toutSup),
    .FSL_S_Data(fsl_s_data), .FSL_S_Control(fsl_s_control),
    .FSL_S_Exists(fsl_s_exists), .FSL_S_Read(fsl_s_read),
    .Bit_Clk(Bit_Clk), .SData_In(SData_In), .SData_Out(SData_Out),
    .Sync(Sync), .AC97Reset_n(AC97Reset_n),
    .Switch1(Switches[1]), .Switch2(Switches[0]),
    .LED1(LEDs[1]), .LED2(LEDs[0]));
endmodule
