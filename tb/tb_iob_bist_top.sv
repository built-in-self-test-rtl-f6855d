// End-to-end testbench of iob_bist_top at its default size (4 banks,
// 32 I/O buffers, 55 configuration steps). It runs the complete BIST
// sequence five times:
//   A  fault-free: must pass with an all-zero fail map;
//   B  primary pad 2 held at 0 from outside: primary steps 8..12 and every
//      global reset step fail, secondary steps pass, and step 5 (which
//      drives 0 onto every pad anyway) passes;
//   C  secondary pad 3 held at 1: secondary steps fail, primary ones pass;
//   D  the global reset switch of pad 5 stuck off: only its own global
//      reset step fails;
//   E  the global reset switch of pad 6 stuck on: every secondary step
//      fails (the idle, pulled-up pad holds the global reset), the global
//      reset steps pass.
// During run A it counts how often each mechanism happens: tri-stated
// outputs with the pull-up and with the pull-down, registered and
// non-registered outputs and inputs, bank tri-state control, the pattern
// generator resetting the buffer flip-flops, the transmission-gate loop
// toggling the pad every clock, the daisy chain carrying the reset pattern
// to the last pad, global reset pulses resetting the monitored flip-flop,
// both sessions, ORA shifting. It also checks the sequence length and that
// each run sees all 64 generator values. In run B it also captures the ORA
// bits shifted out in step 8 and checks that exactly the two ORAs next to
// the faulty buffer (primary buffer 1: ORAs 0 and 1) report it.
module tb_iob_bist_top;
  import iob_bist_pkg::*;

  localparam int N_IOB = 32, N_STEPS = 55, STEP_CYC = 1 + 64 + 17;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_IOB-1:0] pad_ext_oe = '0, pad_ext_val = '0, pad_level;
  logic [STEP_W-1:0] step;
  logic busy, done, pass, scan_out;
  logic [N_STEPS-1:0] fail_map;
  int checks = 0, failures = 0;

  iob_bist_top dut (.clk, .rst_n, .start, .pad_ext_oe, .pad_ext_val, .pad_level,
                    .step, .busy, .done, .pass, .fail_map, .scan_out);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------ mechanism counters
  typedef enum int {
    M_TS_PULLUP, M_TS_PULLDN, M_REG_OUT, M_COMB_OUT, M_REG_IN, M_COMB_IN,
    M_BANK_TS, M_TPG_RST, M_TG_TOGGLE, M_CHAIN, M_GSR_RESET, M_SESS_P,
    M_SESS_S, M_SHIFT, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"tri-state+pull-up", "tri-state+pull-down",
    "registered output", "non-registered output", "registered input",
    "non-registered input", "bank tri-state", "TPG flip-flop reset",
    "gate loop toggle", "daisy chain end", "GSR reset", "primary session",
    "secondary session", "ORA shift"};
  bit counting;
  logic prev_pad0;
  logic [63:0] seen_counts;

  always @(posedge clk) if (counting && busy) begin
    automatic int s = int'(step);
    automatic logic running = !dut.ora_clr && !dut.shift_mode;
    if (running) begin
      if (!dut.g_pad[0].u_iob.ts_mux && dut.cfg_p[0].pull_up && s < 13) mech[M_TS_PULLUP]++;
      if (!dut.g_pad[1].u_iob.ts_mux && dut.cfg_s[0].pull_dn && s >= 13 && s < 23) mech[M_TS_PULLDN]++;
      if (!dut.g_pad[0].u_iob.ts_mux && dut.cfg_p[0].pull_dn && s < 13) mech[M_TS_PULLDN]++;
      if (s < 13 && dut.cfg_p[0].out_reg) mech[M_REG_OUT]++;
      if (s < 13 && !dut.cfg_p[0].out_reg) mech[M_COMB_OUT]++;
      if (s < 13 && dut.cfg_p[0].in_reg) mech[M_REG_IN]++;
      if (s < 13 && !dut.cfg_p[0].in_reg) mech[M_COMB_IN]++;
      if ((s < 13 && dut.cfg_p[0].ts_sel == 4'd7) || (s >= 13 && s < 23 && dut.cfg_s[0].ts_sel == 4'd6))
        mech[M_BANK_TS]++;
      if (dut.g_pad[0].u_iob.rst && !dut.gsr) mech[M_TPG_RST]++;
      if (s >= 9 && s < 13) begin
        if (pad_level[0] != prev_pad0) mech[M_TG_TOGGLE]++;
        else check(dut.ora_clr, $sformatf("gate loop does not toggle in step %0d", s));
      end
      if (dut.mode.gsr_chain && pad_level[N_IOB-1] == dut.tpg_rst) mech[M_CHAIN]++;
      if (dut.mode.gsr_chain && pad_level[N_IOB-1] != dut.tpg_rst)
        check(1'b0, "daisy chain broken");
      if (dut.gsr && dut.mode.gsr_chain) mech[M_GSR_RESET]++;
      if (dut.mode.session == SESS_PRIMARY && s < 13) mech[M_SESS_P]++;
      if (dut.mode.session == SESS_SECONDARY) mech[M_SESS_S]++;
    end
    if (dut.shift_mode) mech[M_SHIFT]++;
    prev_pad0 <= pad_level[0];
  end

  // every run window of a step must see all 64 generator values
  always @(posedge clk) if (counting) begin
    if (dut.ora_clr) seen_counts <= '0;
    else if (busy && !dut.shift_mode) seen_counts[dut.u_tpg.count] <= 1'b1;
    if (dut.shift_mode && dut.u_ctrl.cnt == 0)
      check(&seen_counts, $sformatf("step %0d saw every pattern", step));
  end

  // ORA bits of step 8 as shifted out: shift cycle 0 is the global reset ORA,
  // shift cycle c the ring ORA 16-c.
  logic [16:0] ora_bits;
  always @(posedge clk)
    if (dut.shift_mode && int'(step) == 8) ora_bits[dut.u_ctrl.cnt] <= scan_out;

  initial begin
    repeat (40 * STEP_CYC * N_STEPS) @(posedge clk);
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
    logic [N_STEPS-1:0] expect_map;
    foreach (mech[i]) mech[i] = 0;
    counting = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- A: fault-free
    counting = 1'b1;
    run_bist(cyc);
    counting = 1'b0;
    check(cyc == N_STEPS * STEP_CYC + 1, $sformatf("sequence length %0d cycles", cyc));
    check(pass && fail_map == '0, $sformatf("A: fault-free pass, map %b", fail_map));
    foreach (mech[i]) begin
      $display("mechanism %-24s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, {"mechanism never happened: ", mech_name[i]});
    end

    // ---- B: primary pad 2 stuck at 0
    pad_ext_oe = 32'h4; pad_ext_val = '0;
    run_bist(cyc);
    check(!pass, "B: fault detected");
    check(&fail_map[12:8], $sformatf("B: preload and gate steps fail, map %b", fail_map));
    check(!fail_map[5], "B: step 5 cannot see a pad stuck at 0");
    check(fail_map[22:13] == '0, "B: secondary session unaffected");
    check(&fail_map[54:23], "B: daisy chain broken, all global reset steps fail");
    // ring ORA r is shift cycle 16-r: ORA 0 -> 16, ORA 1 -> 15
    check(ora_bits == 17'b1_1000_0000_0000_0000, $sformatf("B: ORAs 0 and 1 flag buffer 1, bits %b", ora_bits));

    // ---- C: secondary pad 3 stuck at 1
    pad_ext_oe = 32'h8; pad_ext_val = 32'h8;
    run_bist(cyc);
    check(!pass, "C: fault detected");
    check(fail_map[12:0] == '0, $sformatf("C: primary session unaffected, map %b", fail_map));
    check(&fail_map[22:20], "C: secondary preload and gate steps fail");
    check(&fail_map[54:23], "C: all global reset steps fail");
    pad_ext_oe = '0; pad_ext_val = '0;

    // ---- D: GSR switch of pad 5 stuck off
    force dut.gsr_drv[5] = 1'b0;
    run_bist(cyc);
    release dut.gsr_drv[5];
    expect_map = '0; expect_map[23 + 5] = 1'b1;
    check(fail_map == expect_map, $sformatf("D: only step 28 fails, map %b", fail_map));

    // ---- E: GSR switch of pad 6 stuck on
    force dut.gsr_drv[6] = pad_level[6];
    run_bist(cyc);
    release dut.gsr_drv[6];
    check(&fail_map[22:13], $sformatf("E: secondary steps fail, map %b", fail_map));
    check(fail_map[54:23] == '0, "E: global reset steps pass");
    check(!pass, "E: fault detected");

    // ---- fault-free again
    run_bist(cyc);
    check(pass, "fault-free after faults removed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
