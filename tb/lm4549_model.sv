// lm4549_model: behavioural model of the digital side of an LM4549A AC'97
// codec, for testbenches only (not synthesizable, no analog behaviour).
//
// While RESET_n is high it runs BIT_CLK (period 2*HALF_NS) and speaks the
// AC-link: it detects the rising edge of SYNC on a falling BIT_CLK edge,
// drives SDATA_IN from the next rising edge and samples SDATA_OUT on falling
// edges. Outgoing frames carry:
//   * tag bit 15 (codec ready) from frame READY_FRAMES after reset on;
//   * slots 3/4: a record sample pair, left = 1 + k*ADC_STEP (16 bit,
//     always odd so never zero), right = left ^ 16'hA5A4, where k counts
//     the pairs sent so far. If INVALID_EVERY is not 0, every
//     INVALID_EVERY-th frame carries no sample (slots 3/4 invalid, zero data);
//   * slots 1/2: the reply to a register read received in the previous frame.
// Incoming frames: a valid slot 1 with bit 19 low and a valid slot 2 write the
// register file; bit 19 high requests a read. Valid slots 3/4 are reported
// as a one-bit-clock dac_valid pulse with the two samples.
// Register defaults are those of the LM4549A register map.
module lm4549_model #(
  parameter int unsigned HALF_NS       = 40,
  parameter int unsigned READY_FRAMES  = 2,
  parameter int unsigned INVALID_EVERY = 0,
  parameter logic [15:0] ADC_STEP      = 16'h26AE
) (
  input  logic        RESET_n,
  output logic        BIT_CLK,
  input  logic        SYNC,
  input  logic        SDATA_OUT,
  output logic        SDATA_IN,

  output logic        dac_valid,
  output logic [15:0] dac_left,
  output logic [15:0] dac_right,
  output int          adc_pairs,     // record pairs sent
  output int          frames,        // frames started
  output int          reg_writes,
  output int          reg_reads
);
  logic [15:0] regs [64];
  logic [255:0] fin, fout;
  int   idx;
  logic sync_prev, start_pend, in_frame;
  logic rd_pend;
  logic [6:0] rd_addr;

  function automatic logic [15:0] adc_left(input int k);
    return 16'(1 + k * int'(ADC_STEP));
  endfunction

  task automatic set_defaults();
    foreach (regs[i]) regs[i] = 16'h0000;
    regs[6'(8'h00 >> 1)] = 16'h0D40;
    regs[6'(8'h02 >> 1)] = 16'h8000;
    regs[6'(8'h04 >> 1)] = 16'h8000;
    regs[6'(8'h06 >> 1)] = 16'h8000;
    regs[6'(8'h0C >> 1)] = 16'h8008;
    regs[6'(8'h0E >> 1)] = 16'h8008;
    regs[6'(8'h10 >> 1)] = 16'h8808;
    regs[6'(8'h12 >> 1)] = 16'h8808;
    regs[6'(8'h14 >> 1)] = 16'h8808;
    regs[6'(8'h16 >> 1)] = 16'h8808;
    regs[6'(8'h18 >> 1)] = 16'h8808;
    regs[6'(8'h1C >> 1)] = 16'h8000;
    regs[6'(8'h22 >> 1)] = 16'h0101;
    regs[6'(8'h28 >> 1)] = 16'h0001;
    regs[6'(8'h2C >> 1)] = 16'hBB80;
    regs[6'(8'h32 >> 1)] = 16'hBB80;
    regs[6'(8'h7C >> 1)] = 16'h4E53;
    regs[6'(8'h7E >> 1)] = 16'h4349;
  endtask

  initial begin
    BIT_CLK = 1'b0;
    SDATA_IN = 1'b0;
    dac_valid = 1'b0;
    dac_left = '0;
    dac_right = '0;
    adc_pairs = 0;
    frames = 0;
    reg_writes = 0;
    reg_reads = 0;
    idx = 0;
    sync_prev = 1'b0;
    start_pend = 1'b0;
    in_frame = 1'b0;
    rd_pend = 1'b0;
    rd_addr = '0;
    fin = '0;
    fout = '0;
    set_defaults();
    forever begin
      #(HALF_NS);
      if (RESET_n) BIT_CLK = ~BIT_CLK;
      else begin
        BIT_CLK = 1'b0;
        frames = 0;
        in_frame = 1'b0;
        start_pend = 1'b0;
        sync_prev = 1'b0;
        rd_pend = 1'b0;
        set_defaults();
      end
    end
  end

  // drive side
  always @(posedge BIT_CLK) begin
    dac_valid <= 1'b0;
    if (start_pend) begin
      logic ready, have_adc;
      start_pend = 1'b0;
      in_frame = 1'b1;
      idx = 0;
      frames = frames + 1;
      ready = (frames > READY_FRAMES);
      have_adc = ready && !(INVALID_EVERY != 0 && (frames % INVALID_EVERY) == 0);
      fin = '0;
      fin[255] = ready;
      if (ready && rd_pend) begin
        fin[254] = 1'b1;
        fin[253] = 1'b1;
        fin[239 -: 20] = {1'b0, rd_addr, 12'h000};
        fin[219 -: 20] = {regs[rd_addr[6:1]], 4'h0};
        rd_pend = 1'b0;
      end
      if (have_adc) begin
        fin[252] = 1'b1;
        fin[251] = 1'b1;
        fin[199 -: 20] = {adc_left(adc_pairs), 4'h0};
        fin[179 -: 20] = {adc_left(adc_pairs) ^ 16'hA5A4, 4'h0};
        adc_pairs = adc_pairs + 1;
      end
    end else if (in_frame) begin
      idx = idx + 1;
    end
    SDATA_IN = (in_frame && idx < 256) ? fin[255 - idx] : 1'b0;
  end

  // sample side
  always @(negedge BIT_CLK) begin
    if (in_frame && idx < 256) begin
      fout[255 - idx] = SDATA_OUT;
      if (idx == 255) begin
        logic [19:0] s1, s2, s3, s4;
        s1 = fout[239 -: 20];
        s2 = fout[219 -: 20];
        s3 = fout[199 -: 20];
        s4 = fout[179 -: 20];
        if (fout[255] && fout[254]) begin
          if (s1[19]) begin
            rd_pend = 1'b1;
            rd_addr = s1[18:12];
            reg_reads = reg_reads + 1;
          end else if (fout[253]) begin
            regs[s1[18:13]] = s2[19:4];
            reg_writes = reg_writes + 1;
          end
        end
        if (fout[255] && fout[252] && fout[251]) begin
          dac_valid <= 1'b1;
          dac_left  <= s3[19:4];
          dac_right <= s4[19:4];
        end
        in_frame = 1'b0;
      end
    end
    if (SYNC && !sync_prev) start_pend = 1'b1;
    sync_prev = SYNC;
  end
endmodule
