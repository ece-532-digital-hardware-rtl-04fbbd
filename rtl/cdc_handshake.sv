// cdc_handshake: passes one word at a time from the src clock domain to the
// dst clock domain with a toggle request / toggle acknowledge handshake.
//
// src side: src_valid with src_busy low captures src_data into a holding
// register and flips the request toggle; src_busy stays high until the
// acknowledge toggle comes back through a two-flop synchronizer.
// dst side: the request toggle is synchronized by two flops; while it differs
// from the acknowledge toggle a word is pending. The word is delivered as a
// one-cycle dst_valid pulse in a cycle where dst_ready is high, and the
// acknowledge toggle flips in that cycle. dst_data is the src holding
// register, stable for the whole time a word is pending.
// A transfer takes about two dst cycles plus two src cycles when dst_ready is
// high; dst_ready gives the receiver back-pressure. Both resets act
// asynchronously, so a side whose clock is stopped still starts idle.
module cdc_handshake #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             src_clk,
  input  logic             src_rst,
  input  logic             src_valid,
  input  logic [WIDTH-1:0] src_data,
  output logic             src_busy,

  input  logic             dst_clk,
  input  logic             dst_rst,
  input  logic             dst_ready,
  output logic             dst_valid,
  output logic [WIDTH-1:0] dst_data
);
  logic [WIDTH-1:0] hold;
  // Power-up values (FPGA flip-flop initialization) keep the two toggles
  // equal before either clock has run, so no transfer appears out of reset.
  logic req_t = 1'b0, ack_t = 1'b0;
  logic [1:0] ack_sync = '0, req_sync = '0;

  // src domain
  always_ff @(posedge src_clk or posedge src_rst) begin
    if (src_rst) begin
      hold     <= '0;
      req_t    <= 1'b0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_t};
      if (src_valid && !src_busy) begin
        hold  <= src_data;
        req_t <= ~req_t;
      end
    end
  end
  assign src_busy = (req_t != ack_sync[1]);

  // dst domain
  always_ff @(posedge dst_clk or posedge dst_rst) begin
    if (dst_rst) begin
      req_sync <= '0;
      ack_t    <= 1'b0;
    end else begin
      req_sync <= {req_sync[0], req_t};
      if (dst_valid) ack_t <= ~ack_t;
    end
  end
  assign dst_valid = (req_sync[1] != ack_t) && dst_ready;
  assign dst_data  = hold;
endmodule
