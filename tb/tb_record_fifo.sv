// tb_record_fifo: writes stereo pairs into the record FIFO and reads the
// words back against a reference queue: left before right, zero when empty,
// overrun set (and the pair dropped whole) when a pair does not fit, clear
// emptying the FIFO and clearing overrun, and the depth (DEPTH words).
`timescale 1ns/1ps
module tb_record_fifo;
  import guitar_fx_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst = 1, clr = 0, wr_en = 0, rd_en = 0, empty, overrun;
  stereo_t wr_data = '0;
  sample_t rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  sample_t ref_q[$];

  record_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(input sample_t l, input sample_t r);
    @(negedge clk); wr_en = 1; wr_data = '{left: l, right: r};
    @(negedge clk); wr_en = 0;
    @(negedge clk);
  endtask

  task automatic get(output sample_t v);
    @(negedge clk);
    v = rd_data;
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
  endtask

  initial begin
    sample_t v;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(empty && rd_data == 0 && !overrun, "empty after reset, reads zero");
    // fill to the top
    for (int i = 0; i < DEPTH / 2; i++) begin
      put(16'(i * 2 + 1), 16'(16'h8000 + i));
      ref_q.push_back(16'(i * 2 + 1));
      ref_q.push_back(16'(16'h8000 + i));
    end
    check(count == DEPTH && !overrun, $sformatf("full at %0d words", count));
    put(16'hDEAD, 16'hBEEF);
    check(overrun, "overrun after writing to a full FIFO");
    check(count == DEPTH, "dropped pair not stored");
    // drain one word: one free slot is still not enough for a pair
    get(v);
    check(v == ref_q.pop_front(), "first word");
    put(16'hDEAD, 16'hBEEF);
    check(count == DEPTH - 1, "pair does not fit into one free word");
    while (ref_q.size() > 0) begin
      get(v);
      check(v == ref_q.pop_front(), $sformatf("word %h", v));
    end
    check(empty && rd_data == 0, "empty reads zero");
    check(overrun, "overrun is sticky");
    // random traffic
    for (int n = 0; n < 300; n++) begin
      if ($urandom_range(0, 2) == 0 && count <= DEPTH - 2) begin
        sample_t l, r;
        l = 16'($urandom); r = 16'($urandom);
        put(l, r);
        ref_q.push_back(l); ref_q.push_back(r);
      end else if (!empty) begin
        get(v);
        check(v == ref_q.pop_front(), "random traffic order");
      end
    end
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    check(empty && !overrun && count == 0, "clear empties and clears overrun");
    ref_q.delete();
    put(16'h1111, 16'h2222);
    get(v); check(v == 16'h1111, "left after clear");
    get(v); check(v == 16'h2222, "right after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
