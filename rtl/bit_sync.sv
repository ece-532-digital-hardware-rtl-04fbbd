// bit_sync: two-flop synchronizer for a slowly changing level signal that
// crosses into the clock domain of clk. Output lags the input by two to three
// cycles of clk. Each bit is synchronized on its own, so a multi-bit input
// must consist of independent levels (switches, status flags).
module bit_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
