// tb_ac97_s2p: shifts random 20-bit words into the serial-to-parallel
// register MSB first, with idle cycles in between, and checks the collected
// word and that it holds while shift is low.
`timescale 1ns/1ps
module tb_ac97_s2p;
  logic clk = 0, rst = 1, shift = 0, sin = 0;
  logic [19:0] dout;
  int checks = 0, failures = 0;

  ac97_s2p #(.WIDTH(20)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [19:0] w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(dout == '0, "reset value");
    for (int n = 0; n < 50; n++) begin
      w = 20'($urandom);
      for (int b = 19; b >= 0; b--) begin
        shift = 1; sin = w[b];
        @(negedge clk);
        if (b == 12) begin
          shift = 0; sin = ~w[b];
          @(negedge clk);
        end
      end
      shift = 0; sin = 1;
      check(dout == w, $sformatf("word %0d: %h exp %h", n, dout, w));
      repeat (3) @(negedge clk);
      check(dout == w, "word held");
    end
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
