// reset_sync: asserts rst_out at once when rst_in rises (asynchronously, so it
// works while clk is stopped, as the codec's bit clock is during codec reset)
// and releases it two rising edges of clk after rst_in falls.
module reset_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out = 1'b1
);
  // Power-up value 1: reset is asserted from the start even if rst_in never
  // shows a rising edge.
  logic stage = 1'b1;
  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) begin
      stage   <= 1'b1;
      rst_out <= 1'b1;
    end else begin
      stage   <= 1'b0;
      rst_out <= stage;
    end
  end
endmodule
