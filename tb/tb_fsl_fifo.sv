// tb_fsl_fifo: fills the FSL FIFO at its full depth (2024 entries), checks
// FSL_M_Full at exactly that count and that a write while full is dropped,
// drains it checking order and the control bit, then runs random
// simultaneous writes and reads against a reference queue.
`timescale 1ns/1ps
module tb_fsl_fifo;
  localparam int DEPTH = 2024;
  logic clk = 0, rst = 1;
  logic [15:0] m_data = '0, s_data;
  logic m_ctrl = 0, m_write = 0, m_full, s_ctrl, s_read = 0, s_exists, has_data;
  int checks = 0, failures = 0;
  logic [16:0] ref_q[$];

  fsl_fifo #(.DWIDTH(16), .DEPTH(DEPTH)) dut (
    .FSL_Clk(clk), .SYS_Rst(rst), .FSL_Rst(1'b0),
    .FSL_M_Data(m_data), .FSL_M_Control(m_ctrl), .FSL_M_Write(m_write), .FSL_M_Full(m_full),
    .FSL_S_Data(s_data), .FSL_S_Control(s_ctrl), .FSL_S_Read(s_read),
    .FSL_S_Exists(s_exists), .FSL_Has_Data(has_data));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst = 0;
    check(!s_exists && !m_full && !has_data, "empty after reset");
    n = 0;
    while (!m_full && n < DEPTH + 10) begin
      m_write = 1; m_data = 16'(n * 7 + 3); m_ctrl = n[0];
      ref_q.push_back({m_ctrl, m_data});
      @(negedge clk);
      n++;
    end
    check(n == DEPTH, $sformatf("full after %0d writes", n));
    m_data = 16'hFFFF; // dropped
    @(negedge clk);
    m_write = 0;
    check(m_full && s_exists, "full and exists");
    while (s_exists) begin
      logic [16:0] e;
      e = ref_q.pop_front();
      check({s_ctrl, s_data} == e, "drain order");
      s_read = 1;
      @(negedge clk);
      s_read = 0;
    end
    check(ref_q.size() == 0, "dropped write not stored");
    for (int i = 0; i < 3000; i++) begin
      m_write = ($urandom_range(0, 1) == 1);
      m_data = 16'($urandom);
      m_ctrl = 1'($urandom);
      s_read = ($urandom_range(0, 2) != 0);
      if (s_read && s_exists) begin
        check({s_ctrl, s_data} == ref_q[0], "random order");
        void'(ref_q.pop_front());
      end
      if (m_write && !m_full) ref_q.push_back({m_ctrl, m_data});
      @(negedge clk);
    end
    m_write = 0; s_read = 0;
    @(negedge clk);
    check(s_exists == (ref_q.size() != 0), "exists matches occupancy");
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
