// ac97_s2p: serial-to-parallel converter for one AC-link slot.
//
// Each cycle with shift high moves sin into the LSB of a WIDTH-bit shift
// register, so after WIDTH enabled cycles dout holds a slot word received
// MSB first. dout changes only on enabled cycles. Asynchronous reset, as
// BIT_CLK may be stopped while reset is asserted.
module ac97_s2p #(
  parameter int unsigned WIDTH = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             shift,
  input  logic             sin,
  output logic [WIDTH-1:0] dout
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)        dout <= '0;
    else if (shift) dout <= {dout[WIDTH-2:0], sin};
  end
endmodule
