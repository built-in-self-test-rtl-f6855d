// Self-checking testbench of gsr_test: the GSR net is the OR of the drive
// switches, and both test flip-flops load 1 and are reset one cycle after
// their reset (GSR, pattern) is high.
module tb_gsr_test;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, exp_rst = 1'b0;
  logic [N-1:0] gsr_drv = '0;
  logic gsr, mon_q, exp_q;
  logic m_mon, m_exp;
  int checks = 0, failures = 0, resets = 0;

  gsr_test #(.N_IOB(N)) dut (.clk, .rst_n, .gsr_drv, .exp_rst, .gsr, .mon_q, .exp_q);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    check(mon_q && exp_q, "reset to 1");
    rst_n = 1'b1;
    m_mon = 1'b1; m_exp = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      gsr_drv = ($urandom % 3 == 0) ? N'(1) << ($urandom % N) : '0;
      if ($urandom % 10 == 0) gsr_drv = N'($urandom);
      exp_rst = 1'($urandom);
      #1;
      check(gsr == (gsr_drv != 0), "GSR net is the OR of the drivers");
      @(posedge clk);
      m_mon = !(gsr_drv != 0);
      m_exp = !exp_rst;
      if (!m_mon) resets++;
      #1;
      check(mon_q == m_mon && exp_q == m_exp, $sformatf("flip-flops at %0d", i));
    end
    check(resets > 0, "GSR resets happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
