// Self-checking testbench of bist_controller with a short sequence: checks
// the per-step timing (1 clear + RUN run + SCAN shift cycles), the step
// counter, clear and shift-mode pulses, that a 1 on the serial input during
// any shift cycle of a step marks exactly that step, and the total length.
module tb_bist_controller;
  import iob_bist_pkg::*;
  localparam int NST = 4, RUN = 6, SCAN = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, scan_in = 1'b0;
  logic [STEP_W-1:0] step;
  logic ora_clr, shift_mode, tpg_en, busy, done;
  logic [NST-1:0] fail_map;
  int checks = 0, failures = 0;

  bist_controller #(.N_STEPS(NST), .RUN_CYCLES(RUN), .N_SCAN(SCAN)) dut (
    .clk, .rst_n, .start, .scan_in, .step, .ora_clr, .shift_mode, .tpg_en, .busy,
    .done, .fail_map);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one sequence; a 1 is put on scan_in in shift cycle inj_cyc of step inj_step
  task automatic run_seq(int inj_step, int inj_cyc);
    int cyc, n_clr, n_shift, phase, shift_idx;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 0; n_clr = 0; n_shift = 0;
    while (!done && cyc < 500) begin
      // expected phase from the cycle number
      phase = cyc % (1 + RUN + SCAN);
      check(int'(step) == cyc / (1 + RUN + SCAN), $sformatf("step %0d at cycle %0d", step, cyc));
      check(ora_clr == (phase == 0), "clear in the first cycle of a step");
      check(shift_mode == (phase > RUN), "shift mode in the last SCAN cycles");
      check(tpg_en && busy, "pattern generator enabled while busy");
      shift_idx = phase - RUN - 1;
      scan_in = (shift_mode && int'(step) == inj_step && shift_idx == inj_cyc);
      if (ora_clr) n_clr++;
      if (shift_mode) n_shift++;
      @(posedge clk); #1;
      scan_in = 1'b0;
      cyc++;
    end
    check(cyc == NST * (1 + RUN + SCAN), $sformatf("sequence length %0d", cyc));
    check(n_clr == NST && n_shift == NST * SCAN, "clear / shift counts");
    check(done && !busy, "done");
    check(fail_map == ((inj_step >= 0) ? NST'(1) << inj_step : '0),
          $sformatf("fail map %b for step %0d", fail_map, inj_step));
  endtask

  initial begin
    @(posedge clk); #1;
    check(!busy && !done && fail_map == 0, "idle after reset");
    rst_n = 1'b1;
    @(posedge clk); #1;
    run_seq(-1, 0);
    for (int s = 0; s < NST; s++)
      for (int c = 0; c < SCAN; c++) run_seq(s, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
