// tb_ac97_p2s: loads random 20-bit words into the parallel-to-serial
// register and checks that they come out MSB first, one bit per shift
// cycle, with hold cycles (shift low) in between and load taking priority.
`timescale 1ns/1ps
module tb_ac97_p2s;
  logic clk = 0, rst = 1, load = 0, shift = 0, sout;
  logic [19:0] din = '0;
  int checks = 0, failures = 0;

  ac97_p2s #(.WIDTH(20)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [19:0] w;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 50; n++) begin
      w = 20'($urandom);
      @(negedge clk); load = 1; shift = (n % 2 == 1); din = w;
      @(negedge clk); load = 0; shift = 0;
      for (int b = 19; b >= 0; b--) begin
        check(sout == w[b], $sformatf("word %0d bit %0d", n, b));
        // insert a hold cycle now and then
        if (b % 7 == 3) begin
          @(negedge clk);
          check(sout == w[b], "hold keeps the bit");
        end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
      check(sout == 1'b0, "zero fill after the word");
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
