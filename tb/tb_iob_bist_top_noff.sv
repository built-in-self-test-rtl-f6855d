// End-to-end testbench of iob_bist_top built from I/O buffers without
// flip-flops (HAS_IO_FF = 0), one bank of eight buffers: 21 fixed steps plus
// 8 global reset steps. Checks the sequence length, a fault-free pass, that
// in every gate step the ORAs observe the gate's routing line and that line
// carries the buffer's own input signal, and that a primary pad held at 0
// fails the primary gate steps but no secondary step.
module tb_iob_bist_top_noff;
  import iob_bist_pkg::*;

  localparam int NB = 1, N_IOB = 8 * NB, N_STEPS = 21 + N_IOB, STEP_CYC = 1 + 64 + 4 * NB + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_IOB-1:0] pad_ext_oe = '0, pad_ext_val = '0, pad_level;
  logic [STEP_W-1:0] step;
  logic busy, done, pass, scan_out;
  logic [N_STEPS-1:0] fail_map;
  int checks = 0, failures = 0;
  int n_obs_p = 0, n_obs_s = 0, n_chain = 0;

  iob_bist_top #(.N_BANKS(NB), .HAS_IO_FF(1'b0)) dut (
    .clk, .rst_n, .start, .pad_ext_oe, .pad_ext_val, .pad_level,
    .step, .busy, .done, .pass, .fail_map, .scan_out);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // gate steps: the observed line of buffer 0 of the session is its own pad
  always @(posedge clk) if (busy && pad_ext_oe == '0 && !dut.ora_clr && !dut.shift_mode) begin
    if (dut.mode.obs_route && dut.mode.session == SESS_PRIMARY) begin
      n_obs_p++;
      check(dut.p_in[0] == pad_level[0], "primary gate passes the input signal to its line");
    end
    if (dut.mode.obs_route && dut.mode.session == SESS_SECONDARY) begin
      n_obs_s++;
      check(dut.s_in[0] == pad_level[1], "secondary gate passes the input signal to its line");
    end
    if (dut.mode.gsr_chain) n_chain++;
  end

  initial begin
    repeat (10 * STEP_CYC * N_STEPS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_bist(output int cycles);
    @(posedge clk); #1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    run_bist(cyc);
    check(cyc == N_STEPS * STEP_CYC + 1, $sformatf("sequence length %0d", cyc));
    check(pass && fail_map == '0, $sformatf("fault-free pass, map %b", fail_map));
    check(n_obs_p == 4 * 64 && n_obs_s == 2 * 64, $sformatf("gate steps observed %0d/%0d", n_obs_p, n_obs_s));
    check(n_chain == N_IOB * 64, "global reset steps");

    pad_ext_oe = 8'h04; pad_ext_val = '0;
    run_bist(cyc);
    check(!pass, "fault detected");
    check(&fail_map[11:8], $sformatf("primary gate steps fail, map %b", fail_map));
    check(fail_map[20:12] == '0, "secondary steps unaffected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
