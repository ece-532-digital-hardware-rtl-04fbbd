// ac97_p2s: parallel-to-serial converter for one AC-link slot.
//
// load copies a WIDTH-bit word into a shift register; each cycle with shift
// high moves it one place towards the MSB, filling with zero. sout is the
// register's MSB, so the word leaves MSB first, one bit per enabled clock,
// as the AC-link sends it. load wins over shift in the same cycle. The reset
// is asynchronous because BIT_CLK is stopped while the codec is in reset.
module ac97_p2s #(
  parameter int unsigned WIDTH = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             shift,
  output logic             sout
);
  logic [WIDTH-1:0] sr;
  always_ff @(posedge clk or posedge rst) begin
    if (rst)        sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {sr[WIDTH-2:0], 1'b0};
  end
  assign sout = sr[WIDTH-1];
endmodule
