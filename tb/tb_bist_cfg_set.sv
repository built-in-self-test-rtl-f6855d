// Self-checking testbench of bist_cfg_set: walks all steps and checks the
// structure of the configuration set: 9 + 4 primary and 8 + 2 secondary
// steps, every tri-state multiplexer input selected once per session, the
// flip-flop preload before the gate tests, one gate per gate step, one
// global reset driver per global reset step in pad order, buffers outside
// the session idle, identical configuration within a session. A second
// instance checks the set for buffers without flip-flops: 8 + 4 and 7 + 2
// steps, nothing registered, the ORAs moved to the gate's line in gate steps.
module tb_bist_cfg_set;
  import iob_bist_pkg::*;
  localparam int NB = 2, NP = 4 * NB, NS = 4 * NB, NIOB = 8 * NB;

  logic [STEP_W-1:0] step;
  iob_cfg_t cfg_p [NP];
  iob_cfg_t cfg_s [NS];
  arr_cfg_t mode;
  int checks = 0, failures = 0;
  logic [7:0] ts_seen_p, ts_seen_s;

  bist_cfg_set #(.N_BANKS(NB)) dut (.step, .cfg_p, .cfg_s, .mode);

  iob_cfg_t n_cfg_p [NP];
  iob_cfg_t n_cfg_s [NS];
  arr_cfg_t n_mode;
  bist_cfg_set #(.N_BANKS(NB), .HAS_IO_FF(1'b0)) dut_n (
    .step, .cfg_p(n_cfg_p), .cfg_s(n_cfg_s), .mode(n_mode));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: step %0d: %s", step, what); end
  endtask

  function automatic bit is_idle(iob_cfg_t c);
    return c.ts_sel == 4'd0 && c.tg_en == '0 && !c.gsr_drive && c.pull_up;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ts_seen_p = '0; ts_seen_s = '0;
    for (int s = 0; s < 23 + NIOB + 2; s++) begin
      int n_gsr;
      step = STEP_W'(s);
      #1;
      n_gsr = 0;
      for (int i = 0; i < NP; i++) n_gsr += int'(cfg_p[i].gsr_drive);
      for (int i = 0; i < NS; i++) n_gsr += int'(cfg_s[i].gsr_drive);
      if (s < 13) begin
        check(mode.session == SESS_PRIMARY && !mode.gsr_chain, "primary session mode");
        for (int i = 0; i < NP; i++) check(cfg_p[i] == cfg_p[0], "primary buffers alike");
        for (int i = 0; i < NS; i++) check(is_idle(cfg_s[i]), "secondary idle");
        check(n_gsr == 0, "no GSR driver");
      end else if (s < 23) begin
        check(mode.session == SESS_SECONDARY && !mode.gsr_chain, "secondary session mode");
        for (int i = 0; i < NS; i++) check(cfg_s[i] == cfg_s[0], "secondary buffers alike");
        for (int i = 0; i < NP; i++) check(is_idle(cfg_p[i]), "primary idle");
        check(n_gsr == 0, "no GSR driver");
      end
      if (s < 8) begin
        ts_seen_p[cfg_p[0].ts_sel] = 1'b1;
        check(cfg_p[0].tg_en == 0 && cfg_p[0].ff_rst_en == (s != 7), "session step");
      end
      if (s == 8 || s == 20) begin
        iob_cfg_t c;
        c = (s == 8) ? cfg_p[0] : cfg_s[0];
        check(c.out_reg && c.in_reg && !c.ff_rst_en && c.data_sel == SEL_R0 &&
              c.ts_sel == SEL_ONE && c.tg_en == 0, "flip-flop preload step");
      end
      if (s >= 9 && s <= 12) begin
        check(cfg_p[0].tg_en == 4'(1 << (s - 9)) && cfg_p[0].data_sel == 4'(2 + s - 9) &&
              cfg_p[0].out_reg && cfg_p[0].in_reg && !cfg_p[0].ff_rst_en, "primary gate step");
      end
      if (s >= 13 && s < 20) begin
        ts_seen_s[cfg_s[0].ts_sel] = 1'b1;
        check(cfg_s[0].tg_en == 0, "secondary session step");
      end
      if (s >= 21 && s <= 22) begin
        check(cfg_s[0].tg_en == 4'(1 << (s - 21)) && cfg_s[0].data_sel == 4'(2 + s - 21),
              "secondary gate step");
      end
      if (s >= 23 && s < 23 + NIOB) begin
        int j;
        j = s - 23;
        check(mode.gsr_chain, "chain mode");
        check(n_gsr == 1, "exactly one GSR driver");
        check(((j % 2 == 0) ? cfg_p[j/2].gsr_drive : cfg_s[j/2].gsr_drive), "driver is pad j");
        for (int i = 0; i < NP; i++)
          check(!cfg_p[i].out_reg && !cfg_p[i].in_reg && cfg_p[i].data_sel == SEL_R0 &&
                cfg_p[i].ts_sel == SEL_ONE, "non-registered chain buffer");
      end
      if (s >= 23 + NIOB) begin
        check(!mode.gsr_chain && n_gsr == 0, "beyond the last step");
        for (int i = 0; i < NP; i++) check(is_idle(cfg_p[i]), "idle beyond last step");
      end
    end
    check(ts_seen_p == 8'hFF, "all 8 primary tri-state inputs");
    check(ts_seen_s == 8'h7F, "all 7 secondary tri-state inputs");

    // ---- set for buffers without flip-flops
    ts_seen_p = '0; ts_seen_s = '0;
    for (int s = 0; s < 21 + NIOB + 1; s++) begin
      step = STEP_W'(s);
      #1;
      for (int i = 0; i < NP; i++)
        check(!n_cfg_p[i].out_reg && !n_cfg_p[i].in_reg && !n_cfg_p[i].ff_rst_en &&
              !n_cfg_s[i].out_reg && !n_cfg_s[i].in_reg, "nothing registered");
      if (s < 8) ts_seen_p[n_cfg_p[0].ts_sel] = 1'b1;
      if (s >= 12 && s < 19) ts_seen_s[n_cfg_s[0].ts_sel] = 1'b1;
      check(n_mode.obs_route == ((s >= 8 && s < 12) || (s >= 19 && s < 21)), "ORA on the gate line");
      if (s >= 8 && s < 12)
        check(n_cfg_p[0].tg_en == 4'(1 << (s - 8)) && n_mode.obs_line == 2'(s - 8) &&
              n_cfg_p[0].data_sel == 4'd6 && n_cfg_p[0].ts_sel == SEL_ONE, "primary gate step");
      if (s >= 19 && s < 21)
        check(n_cfg_s[0].tg_en == 4'(1 << (s - 19)) && n_mode.obs_line == 2'(s - 19) &&
              n_cfg_s[0].data_sel == 4'd4 && n_mode.session == SESS_SECONDARY, "secondary gate step");
      check(n_mode.gsr_chain == (s >= 21 && s < 21 + NIOB), "global reset steps");
    end
    check(ts_seen_p == 8'hFF && ts_seen_s == 8'h7F, "tri-state inputs without flip-flops");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
