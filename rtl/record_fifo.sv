// record_fifo: the controller's record FIFO.
//
// Holds 16-bit record samples in arrival order, left then right, so software
// reads them two at a time. A stereo pair is written with one wr_en pulse;
// the left word enters the FIFO in that cycle and the right word in the
// next, so pairs must be at least two cycles apart (an assertion checks
// this). A pair that does not fit whole is dropped and sets the sticky
// overrun flag, which only clr (the software "reset record FIFO" command)
// clears; clr also empties the FIFO. Dropping whole pairs keeps left and
// right in step. rd_data is the oldest word (first-word fall-through) and
// reads as zero when the FIFO is empty; rd_en pops one word.
// The depth is not given by the documentation of the controller; 32 words
// (16 stereo pairs) is this design's choice.
module record_fifo
  import guitar_fx_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,
  input  logic    wr_en,
  input  stereo_t wr_data,
  input  logic    rd_en,
  output sample_t rd_data,
  output logic    empty,
  output logic    overrun,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic    right_pend;
  sample_t right_q;
  logic    fits;
  logic    f_wr;
  sample_t f_wdata, f_rdata;
  logic    f_full;

  // room for a whole pair, counting a right word still waiting to go in
  assign fits    = (count + CW'(right_pend)) <= CW'(DEPTH - 2);
  assign f_wr    = (wr_en && fits) || right_pend;
  assign f_wdata = right_pend ? right_q : wr_data.left;

  sync_fifo #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_fifo (
    .clk(clk), .rst(rst), .clr(clr),
    .wr_en(f_wr), .wr_data(f_wdata),
    .rd_en(rd_en), .rd_data(f_rdata),
    .empty(empty), .full(f_full), .count(count));

  assign rd_data = empty ? '0 : f_rdata;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      right_pend <= 1'b0;
      right_q    <= '0;
      overrun    <= 1'b0;
    end else begin
      right_pend <= wr_en && fits && !right_pend;
      if (wr_en && fits) right_q <= wr_data.right;
      if (wr_en && !fits) overrun <= 1'b1;
    end
  end

  // A pair must not arrive while the right word of the previous one is
  // still being written.
  a_pair_spacing: assert property (@(posedge clk) disable iff (rst)
    !(wr_en && right_pend));
  a_no_full_write: assert property (@(posedge clk) disable iff (rst)
    !(f_wr && f_full));
endmodule
