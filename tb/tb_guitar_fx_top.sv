// tb_guitar_fx_top: end-to-end test of the guitar effects hardware at its
// default parameters (2024-entry FSL FIFO, 32-word record FIFO).
//
// A processor model runs the effect program against the top: it
// initializes the codec registers 02h, 10h, 1Ah, 1Ch, 20h and 18h through the
// controller, checks the codec's vendor ID, then loops: read the switches
// from the status register, fetch a left and a right record sample
// (re-reading while the FIFO answers zero), apply the selected effect
// (0 clean, 1 hard-clip distortion, 2 waveshaping of positive samples,
// 3 echo with a shift buffer cleared on entry) and put the results into the
// FSL FIFO with blocking writes. The codec model supplies a known sample
// sequence and reports what reaches its DAC; every DAC pair is compared with
// what the processor model queued, in order.
// Mechanisms that must each happen at least once: codec register write and
// read, codec ready wait, record FIFO empty (zero read skipped), record
// overrun and clear, FSL FIFO full (blocking put stalls), frames played with
// no playback data, every effect mode, and mode switches (echo entered twice,
// buffer cleared). The effect parameters are the testbench's own.
`timescale 1ns/1ps
module tb_guitar_fx_top;
  import guitar_fx_pkg::*;
  localparam logic [31:0] BASE = 32'h7D00_0000;   // top's default
  localparam int FSL_WORDS = 2024;                 // top's default depth
  localparam int ITER_PER_MODE = 30;
  localparam int PREROLL_EXTRA = 24;   // pairs beyond the FIFO's depth
  localparam int ECHO_LEN = 8;
  localparam int CLIP = 16'h2000;

  logic clk = 0, rst = 1;
  logic [31:0] abus, dbus, sl_dbus;
  logic [3:0] be;
  logic rnw, select, seqaddr, sl_xferack, sl_errack, sl_retry, sl_toutsup;
  sample_t fsl_m_data = '0;
  logic fsl_m_control = 0, fsl_m_write = 0, fsl_m_full;
  logic bit_clk, sdata_in, sdata_out, sync, reset_n;
  logic [1:0] switches = 2'b00, leds;
  logic dac_valid;
  logic [15:0] dac_left, dac_right;
  int adc_pairs, frames, reg_writes, reg_reads;
  int checks = 0, failures = 0;

  guitar_fx_top dut (
    .SYS_Clk(clk), .SYS_Rst(rst),
    .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus), .OPB_RNW(rnw),
    .OPB_select(select), .OPB_seqAddr(seqaddr), .Sl_DBus(sl_dbus),
    .Sl_xferAck(sl_xferack), .Sl_errAck(sl_errack), .Sl_retry(sl_retry),
    .Sl_toutSup(sl_toutsup),
    .FSL_M_Data(fsl_m_data), .FSL_M_Control(fsl_m_control),
    .FSL_M_Write(fsl_m_write), .FSL_M_Full(fsl_m_full),
    .Bit_Clk(bit_clk), .SData_In(sdata_in), .SData_Out(sdata_out), .Sync(sync),
    .AC97Reset_n(reset_n), .Switches(switches), .LEDs(leds));

  opb_master_bfm bus (.clk(clk), .abus(abus), .be(be), .dbus(dbus), .rnw(rnw),
    .select(select), .seqaddr(seqaddr), .sl_dbus(sl_dbus), .sl_xferack(sl_xferack));

  lm4549_model #(.HALF_NS(41), .INVALID_EVERY(7)) codec (
    .RESET_n(reset_n), .BIT_CLK(bit_clk), .SYNC(sync), .SDATA_OUT(sdata_out),
    .SDATA_IN(sdata_in), .dac_valid(dac_valid), .dac_left(dac_left),
    .dac_right(dac_right), .adc_pairs(adc_pairs), .frames(frames),
    .reg_writes(reg_writes), .reg_reads(reg_reads));

  always #18.5 clk = ~clk;   // 27 MHz system / OPB clock

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_zero_skip = 0, n_fsl_stall = 0, n_overrun = 0, n_clear = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int n_switch = 0, n_echo_clear = 0, n_ready_wait = 0;
  int n_idle_frames = 0;

  // --------------------------------------------------------- DAC checker
  sample_t exp_q[$];
  int dac_seen = 0;
  always @(posedge dac_valid) begin
    sample_t l, r;
    if (exp_q.size() < 2) check(0, "DAC pair with nothing queued");
    else begin
      l = exp_q.pop_front(); r = exp_q.pop_front();
      if (dac_left != l || dac_right != r) begin
        check(0, $sformatf("DAC %0d got %h %h exp %h %h", dac_seen, dac_left, dac_right, l, r));
      end else checks++;
    end
    dac_seen++;
  end
  // frames whose playback slots were empty
  always @(posedge sync) if (reset_n && frames > 3 && exp_q.size() == 0) n_idle_frames++;

  // ------------------------------------------------------ processor model
  task automatic status(output logic [31:0] v);
    bus.read(BASE + REG_STATUS, v);
  endtask

  task automatic write_ac97_reg(input logic [6:0] a, input logic [15:0] d);
    logic [31:0] v;
    bus.write(BASE + REG_CODEC_DATA, 32'(d));
    bus.write(BASE + REG_CODEC_ADDR, {24'h0, 1'b0, a});
    do status(v); while (!v[ST_REG_DONE]);
  endtask

  task automatic read_ac97_reg(input logic [6:0] a, output logic [15:0] d);
    logic [31:0] v;
    bus.write(BASE + REG_CODEC_ADDR, {24'h0, 1'b1, a});
    do status(v); while (!v[ST_REG_DONE]);
    bus.read(BASE + REG_CODEC_DATA, v);
    d = v[15:0];
  endtask

  // fetch one nonzero sample (the record FIFO reads zero when empty)
  task automatic get_sample(output sample_t s);
    logic [31:0] v;
    forever begin
      bus.read(BASE + REG_REC_DATA, v);
      if (v[15:0] != 0) break;
      n_zero_skip++;
    end
    s = v[15:0];
  endtask

  task automatic put_sample(input sample_t s);
    @(negedge clk);
    while (fsl_m_full) begin
      n_fsl_stall++;
      @(negedge clk);
    end
    fsl_m_write = 1; fsl_m_data = s;
    @(negedge clk);
    fsl_m_write = 0;
    exp_q.push_back(s);
  endtask

  // effects
  function automatic sample_t distort(input sample_t x);
    if ($signed(x) > CLIP) return 16'(CLIP);
    if ($signed(x) < -CLIP) return 16'(-CLIP);
    return x;
  endfunction

  function automatic sample_t waveshape(input sample_t x);
    real xn, k, y;
    if ($signed(x) < 0) return x;          // negative samples play clean
    k = 2.0;
    xn = real'($signed(x)) / 32768.0;
    y = xn * (xn + k) / (xn * xn + (k - 1.0) * xn + 1.0);
    return 16'(int'(y * 32767.0));
  endfunction

  sample_t echo_l[ECHO_LEN], echo_r[ECHO_LEN];
  function automatic sample_t echo(input sample_t x, inout sample_t buf_[ECHO_LEN]);
    sample_t oldest;
    oldest = buf_[ECHO_LEN-1];
    for (int i = ECHO_LEN - 1; i > 0; i--) buf_[i] = buf_[i-1];
    buf_[0] = x;
    return 16'(($signed(x) >>> 1) + ($signed(oldest) >>> 1));
  endfunction

  // record sequence tracking
  int rec_k = -1;
  task automatic check_record(input sample_t l, input sample_t r);
    if (rec_k < 0) begin
      rec_k = 0;
      while (16'(1 + rec_k * 16'h26AE) != l && rec_k < 70000) rec_k++;
    end else rec_k++;
    check(l == 16'(1 + rec_k * 16'h26AE) && r == (l ^ 16'hA5A4),
          $sformatf("record pair k=%0d: %h %h", rec_k, l, r));
  endtask

  initial begin
    logic [31:0] v;
    logic [15:0] d;
    sample_t l, r, yl, yr;
    logic [1:0] mode, oldmode;
    int iter;

    repeat (4) @(posedge clk);
    rst = 0;
    // wait for the codec
    do begin status(v); n_ready_wait++; end while (!v[ST_CODEC_READY]);
    check(n_ready_wait > 1, "codec was not ready at once");
    // codec initialization: the registers the design enables
    write_ac97_reg(7'h02, 16'h0000);   // master volume, unmuted
    write_ac97_reg(7'h10, 16'h0808);   // line in volume
    write_ac97_reg(7'h1A, 16'h0404);   // record select: line in
    write_ac97_reg(7'h1C, 16'h0000);   // record gain
    write_ac97_reg(7'h20, 16'h0000);   // general purpose
    write_ac97_reg(7'h18, 16'h0808);   // PCM out volume
    check(reg_writes == 6, $sformatf("six codec writes (%0d)", reg_writes));
    read_ac97_reg(7'h1A, d);
    check(d == 16'h0404, "record select reads back");
    read_ac97_reg(7'h7C, d);
    check(d == 16'h4E53, "vendor ID1");
    check(reg_reads == 2, "two codec reads");

    // a pause long enough for the record FIFO to overrun, then clear it
    #(82ns * 256 * 24);
    status(v);
    if (v[ST_REC_OVERRUN]) n_overrun++;
    bus.write(BASE + REG_CONTROL, 32'h2);
    n_clear++;
    status(v);
    check(!v[ST_REC_OVERRUN], "overrun cleared");

    // fill the FSL FIFO with a pre-roll until a put blocks
    for (int i = 0; i < FSL_WORDS / 2 + PREROLL_EXTRA; i++) begin
      put_sample(16'(16'h0100 + i));
      put_sample(16'(16'h0200 + i));
    end
    check(n_fsl_stall > 0, "FSL FIFO filled and stalled a put");
    status(v);
    check(v[ST_OUT_EXISTS], "out data exists while pre-roll plays");
    bus.write(BASE + REG_CONTROL, 32'h2);
    n_clear++;

    // effect loop, switching modes 0,1,2,3,0,3
    oldmode = 2'b00;
    for (int phase = 0; phase < 6; phase++) begin
      logic [1:0] want;
      want = (phase < 4) ? 2'(phase) : (phase == 4 ? 2'd0 : 2'd3);
      switches = want;                 // switch 1 is the high effect bit
      #1;
      check(leds == switches, "LEDs follow switches");
      repeat (4) @(posedge clk);
      for (iter = 0; iter < ITER_PER_MODE; iter++) begin
        status(v);
        mode = 2'((v & 32'h6) >> 1);
        if (iter == 0) check(mode == want, $sformatf("mode %0d read from switches", want));
        if (mode != oldmode) begin
          n_switch++;
          if (mode == 2'd3) begin
            foreach (echo_l[i]) begin echo_l[i] = 0; echo_r[i] = 0; end
            n_echo_clear++;
          end
          oldmode = mode;
        end
        get_sample(l);
        get_sample(r);
        check_record(l, r);
        case (mode)
          2'd0: begin yl = l; yr = r; end
          2'd1: begin yl = distort(l); yr = distort(r); end
          2'd2: begin yl = waveshape(l); yr = waveshape(r); end
          default: begin yl = echo(l, echo_l); yr = echo(r, echo_r); end
        endcase
        n_mode[mode]++;
        put_sample(yl);
        put_sample(yr);
      end
    end
    // let everything play out
    wait (exp_q.size() == 0);
    repeat (2000) @(posedge clk);
    check(dac_seen == FSL_WORDS / 2 + PREROLL_EXTRA + 6 * ITER_PER_MODE,
          $sformatf("all pairs played (%0d)", dac_seen));

    $display("mechanisms: ready_wait=%0d zero_skip=%0d overrun=%0d clear=%0d fsl_stall=%0d idle_frames=%0d switches=%0d echo_clear=%0d modes=%0d/%0d/%0d/%0d",
             n_ready_wait, n_zero_skip, n_overrun, n_clear, n_fsl_stall, n_idle_frames,
             n_switch, n_echo_clear, n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    check(n_zero_skip > 0, "zero samples skipped");
    check(n_overrun > 0, "record overrun happened");
    check(n_clear > 0, "record clear used");
    check(n_fsl_stall > 0, "FSL full stall happened");
    check(n_idle_frames > 0, "frames without playback data");
    check(n_switch >= 4, "mode switches");
    check(n_echo_clear >= 2, "echo buffer cleared on each entry");
    for (int m = 0; m < 4; m++) check(n_mode[m] >= ITER_PER_MODE, $sformatf("mode %0d ran", m));
    check(bus.timeouts == 0, "every OPB transfer acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80ms;
    failures++;
    $display("watchdog expired: dac_seen=%0d queued=%0d", dac_seen, exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
