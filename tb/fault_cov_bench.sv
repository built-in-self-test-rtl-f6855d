// Fault-coverage bench of the BIST sequence on one primary and one secondary
// I/O buffer; HAS_IO_FF selects the buffer variant with or without I/O
// flip-flops. Used by tb_iob_fault_cov, which runs both variants.
//
// The sequencer, pattern generator and configuration set drive two pairs of
// buffers (a good and a faulty primary buffer, a good and a faulty secondary
// buffer), wired as in the full array. Each pair stands for two neighbours
// that a comparison ORA watches: in every cycle of a step's pattern phase
// the two buffers' ORA signals are compared (the input-portion output, or in
// the gate steps of the variant without flip-flops the gate's routing line).
// The two buffers' drives onto the global set/reset net are compared in
// every step, as the array's global reset ORA sees a stray reset in any step
// and a missing one in the buffer's own global reset step. A difference marks the fault as detected by
// that step. A fault that turns the buffer into a ring oscillator (see
// osc_loop) is counted as detected in the step where the loop closes: the
// oscillating buffer cannot keep matching its neighbour. The bench then
// leaves the fault off for that step, because the oscillation itself cannot
// be simulated without delays.
//
// Faults: single stuck-at-0/1 faults on the configuration bits that reach
// logic (data and tri-state selects, register bypasses, reset enable,
// pull-up, pull-down, transmission gate enables, GSR drive), on every routing
// input, on the bank tri-state, pattern reset and global reset inputs, on
// the pad itself and on the buffer's input-portion output. Without
// flip-flops the register and reset faults reach no logic and are left out.
// The fault sits on the faulty buffer only. The analog settings (drive,
// delay, Schmitt, TTL) have no logic effect and are left out. This is a
// fault list at the level of this RTL's nets, not a gate-level list of a
// real buffer cell.
//
// Output: a table with, for each step, the number of faults it detects on
// its own and the cumulative count, for the primary and the secondary
// buffer. Checks: every fault is detected by the whole sequence except the
// ones below, which must stay undetected, the fault-free pairs never differ,
// and a run takes the sequencer's cycle count.
//
// Not detectable by construction:
//  * the global reset input stuck at 0: the BIST checks that each buffer can
//    drive the global set/reset net, not that the net resets the buffer's
//    flip-flops;
//  * bit 3 of the data and tri-state selects stuck at 0: no multiplexer has
//    more than eight inputs, so the bit is 0 in every legal configuration;
//  * the pull-down stuck off: in this two-state pad model an undriven pad
//    reads 0, exactly like a pulled-down one.
//
// Interface: clk in; finished rises when all faults have been run, with
// n_checks and n_fail then valid. Timing: each fault is one whole BIST run
// (all fixed steps plus the two global reset steps of these two buffers).
module fault_cov_bench
  import iob_bist_pkg::*;
#(
  parameter bit HAS_IO_FF = 1'b1
) (
  input  logic clk,
  output logic finished,
  output int   n_checks,
  output int   n_fail
);
  localparam int N_FIX    = n_fixed(HAS_IO_FF);
  localparam int N_STEPS  = N_FIX + 2;      // fixed steps + 2 GSR steps
  localparam int RUN      = 2 ** TPG_W;
  localparam int N_SCAN   = 2;
  localparam int STEP_CYC = 1 + RUN + N_SCAN;
  // step numbers of the configuration set at N_BANKS = 1
  localparam int P_LAST   = HAS_IO_FF ? 12 : 11;  // last primary step
  localparam int S_LAST   = N_FIX - 1;            // last secondary step
  localparam int GSR_P    = N_FIX;                // pad 0 (primary) drives the net
  localparam int GSR_S    = N_FIX + 1;            // pad 1 (secondary) drives the net

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic rst_n, start;

  // ------------------------------------------------------------ fault list
  typedef enum int {F_NONE, F_CFG, F_ROUTE, F_BANKTS, F_FFRST, F_GSR, F_PAD, F_OUT} fkind_e;
  typedef struct {
    fkind_e kind;
    int     idx;
    bit     val;
  } fault_t;

  // configuration bit fid of a buffer forced to v
  function automatic iob_cfg_t cfg_fault(iob_cfg_t c, int fid, bit v);
    iob_cfg_t r = c;
    if (fid < 4)       r.data_sel[fid]    = v;
    else if (fid < 8)  r.ts_sel[fid - 4]  = v;
    else if (fid == 8)  r.out_reg   = v;
    else if (fid == 9)  r.in_reg    = v;
    else if (fid == 10) r.ff_rst_en = v;
    else if (fid == 11) r.pull_up   = v;
    else if (fid == 12) r.pull_dn   = v;
    else if (fid < 17)  r.tg_en[fid - 13] = v;
    else                r.gsr_drive = v;
    return r;
  endfunction

  function automatic string fname(fault_t f);
    string k;
    case (f.kind)
      F_CFG:    k = $sformatf("cfg bit %0d", f.idx);
      F_ROUTE:  k = $sformatf("routing line %0d", f.idx);
      F_BANKTS: k = "bank tri-state";
      F_FFRST:  k = "pattern reset";
      F_GSR:    k = "global reset in";
      F_PAD:    k = "pad";
      F_OUT:    k = "input-portion out";
      default:  k = "none";
    endcase
    return $sformatf("%s stuck-at-%0d", k, f.val);
  endfunction

  // Without I/O flip-flops the register bypasses, the reset enable and both
  // reset inputs reach no logic and are left out of the list.
  function automatic bit relevant(fkind_e kind, int fid);
    if (HAS_IO_FF) return 1'b1;
    if (kind == F_FFRST || kind == F_GSR) return 1'b0;
    return !(kind == F_CFG && fid >= 8 && fid <= 10);
  endfunction

  function automatic bit escapes(fault_t f);
    return f.val == 1'b0 && (f.kind == F_GSR ||
           (f.kind == F_CFG && (f.idx == 3 || f.idx == 7 || f.idx == 12)));
  endfunction

  fault_t flist_p [$];
  fault_t flist_s [$];

  function automatic void build_list(ref fault_t l [$], input int n_route, input int n_tg);
    for (int v = 0; v < 2; v++) begin
      for (int fid = 0; fid < 18; fid++)
        if ((fid < 13 || fid == 17 || fid - 13 < n_tg) && relevant(F_CFG, fid))
          l.push_back('{F_CFG, fid, v[0]});
      for (int r = 0; r < n_route; r++) l.push_back('{F_ROUTE, r, v[0]});
      l.push_back('{F_BANKTS, 0, v[0]});
      if (HAS_IO_FF) begin
        l.push_back('{F_FFRST, 0, v[0]});
        l.push_back('{F_GSR, 0, v[0]});
      end
      l.push_back('{F_PAD, 0, v[0]});
      l.push_back('{F_OUT, 0, v[0]});
    end
  endfunction

  fault_t fp, fs;                      // faults active now

  // True when cfg closes a loop with no register in it from the
  // input-portion output through a gate that is on into the output enable.
  // Whenever the data bit differs from the pull level that loop is a ring
  // oscillator, which a zero-delay simulation cannot run.
  function automatic bit osc_loop(iob_cfg_t c);
    if (HAS_IO_FF && c.in_reg) return 1'b0;
    for (int k = 0; k < MAX_TG; k++)
      if (c.tg_en[k] && c.ts_sel == SEL_W'(2 + k)) return 1'b1;
    return 1'b0;
  endfunction

  // ------------------------------------------------------- BIST machinery
  logic [STEP_W-1:0] step;
  logic ora_clr, shift_mode, tpg_en, busy, done;
  logic [N_STEPS-1:0] fail_map;
  bist_controller #(.N_STEPS(N_STEPS), .RUN_CYCLES(RUN), .N_SCAN(N_SCAN)) u_ctrl (
    .clk (clk), .rst_n (rst_n), .start (start), .scan_in (1'b0),
    .step (step), .ora_clr (ora_clr), .shift_mode (shift_mode),
    .tpg_en (tpg_en), .busy (busy), .done (done), .fail_map (fail_map)
  );

  iob_cfg_t cfg_p [4];
  iob_cfg_t cfg_s [4];
  arr_cfg_t mode;
  bist_cfg_set #(.N_BANKS(1), .HAS_IO_FF(HAS_IO_FF)) u_cfg (
    .step (step), .cfg_p (cfg_p), .cfg_s (cfg_s), .mode (mode)
  );

  logic [TPG_W-2:0] tpg_route;
  logic tpg_rst;
  bist_tpg #(.WIDTH(TPG_W)) u_tpg (
    .clk (clk), .rst_n (rst_n), .en (tpg_en), .count (),
    .route (tpg_route), .ff_rst (tpg_rst)
  );

  // Routing lines as in the array; in the global reset steps line 0 carries
  // the daisy-chain pattern, which for these buffers is the pattern reset,
  // and a line whose gate is configured on is not driven by the generator.
  logic [N_ROUTE_P-1:0] route_p;
  logic [N_ROUTE_S-1:0] route_s;
  always_comb begin
    route_p = tpg_route[N_ROUTE_P-1:0];
    route_s = tpg_route[N_ROUTE_S-1:0];
    if (mode.gsr_chain) begin
      route_p[0] = tpg_rst;
      route_s[0] = tpg_rst;
    end
    for (int k = 0; k < N_TG_P; k++) if (cfg_p[0].tg_en[k]) route_p[k] = 1'b0;
    for (int k = 0; k < N_TG_S; k++) if (cfg_s[0].tg_en[k]) route_s[k] = 1'b0;
  end

  logic init_gsr;                      // clears all flip-flops between runs

  // ---------------------------------------------------------- buffer pairs
  // good primary
  logic gp_out, gp_gsr, gp_pad;
  logic [N_ROUTE_P-1:0] gp_line;
  io_buffer #(.PRIMARY(1'b1), .HAS_IO_FF(HAS_IO_FF)) u_gp (
    .clk (clk), .cfg (cfg_p[0]), .route_in (route_p), .bank_ts (~tpg_rst),
    .ff_rst (tpg_rst), .gsr (gp_gsr | init_gsr), .ext_oe (1'b0), .ext_val (1'b0),
    .in_out (gp_out), .route_obs (gp_line), .gsr_out (gp_gsr), .pad_level (gp_pad)
  );

  // faulty primary
  iob_cfg_t             bp_cfg;
  logic                 bp_osc;
  logic [N_ROUTE_P-1:0] bp_route;
  logic bp_bts, bp_ffr, bp_gin, bp_eoe, bp_eval, bp_raw, bp_out, bp_gsr, bp_pad;
  logic [N_ROUTE_P-1:0] bp_line;
  always_comb begin
    bp_cfg   = fp.kind == F_CFG ? cfg_fault(cfg_p[0], fp.idx, fp.val) : cfg_p[0];
    bp_osc   = osc_loop(bp_cfg) && !osc_loop(cfg_p[0]);
    if (bp_osc) bp_cfg = cfg_p[0];
    bp_route = route_p;
    if (fp.kind == F_ROUTE) bp_route[fp.idx] = fp.val;
    bp_bts   = fp.kind == F_BANKTS ? fp.val : ~tpg_rst;
    bp_ffr   = fp.kind == F_FFRST ? fp.val : tpg_rst;
    bp_gin   = fp.kind == F_GSR ? fp.val : (bp_gsr | init_gsr);
    bp_eoe   = fp.kind == F_PAD;
    bp_eval  = fp.val;
    bp_out   = fp.kind == F_OUT ? fp.val : bp_raw;
  end
  io_buffer #(.PRIMARY(1'b1), .HAS_IO_FF(HAS_IO_FF)) u_bp (
    .clk (clk), .cfg (bp_cfg), .route_in (bp_route), .bank_ts (bp_bts),
    .ff_rst (bp_ffr), .gsr (bp_gin), .ext_oe (bp_eoe), .ext_val (bp_eval),
    .in_out (bp_raw), .route_obs (bp_line), .gsr_out (bp_gsr), .pad_level (bp_pad)
  );

  // good secondary
  logic gs_out, gs_gsr, gs_pad;
  logic [N_ROUTE_S-1:0] gs_line;
  io_buffer #(.PRIMARY(1'b0), .HAS_IO_FF(HAS_IO_FF)) u_gs (
    .clk (clk), .cfg (cfg_s[0]), .route_in (route_s), .bank_ts (~tpg_rst),
    .ff_rst (tpg_rst), .gsr (gs_gsr | init_gsr), .ext_oe (1'b0), .ext_val (1'b0),
    .in_out (gs_out), .route_obs (gs_line), .gsr_out (gs_gsr), .pad_level (gs_pad)
  );

  // faulty secondary
  iob_cfg_t             bs_cfg;
  logic                 bs_osc;
  logic [N_ROUTE_S-1:0] bs_route;
  logic bs_bts, bs_ffr, bs_gin, bs_eoe, bs_eval, bs_raw, bs_out, bs_gsr, bs_pad;
  logic [N_ROUTE_S-1:0] bs_line;
  always_comb begin
    bs_cfg   = fs.kind == F_CFG ? cfg_fault(cfg_s[0], fs.idx, fs.val) : cfg_s[0];
    bs_osc   = osc_loop(bs_cfg) && !osc_loop(cfg_s[0]);
    if (bs_osc) bs_cfg = cfg_s[0];
    bs_route = route_s;
    if (fs.kind == F_ROUTE) bs_route[fs.idx] = fs.val;
    bs_bts   = fs.kind == F_BANKTS ? fs.val : ~tpg_rst;
    bs_ffr   = fs.kind == F_FFRST ? fs.val : tpg_rst;
    bs_gin   = fs.kind == F_GSR ? fs.val : (bs_gsr | init_gsr);
    bs_eoe   = fs.kind == F_PAD;
    bs_eval  = fs.val;
    bs_out   = fs.kind == F_OUT ? fs.val : bs_raw;
  end
  io_buffer #(.PRIMARY(1'b0), .HAS_IO_FF(HAS_IO_FF)) u_bs (
    .clk (clk), .cfg (bs_cfg), .route_in (bs_route), .bank_ts (bs_bts),
    .ff_rst (bs_ffr), .gsr (bs_gin), .ext_oe (bs_eoe), .ext_val (bs_eval),
    .in_out (bs_raw), .route_obs (bs_line), .gsr_out (bs_gsr), .pad_level (bs_pad)
  );

  // ------------------------------------------------------------ detection
  // Compared only in the pattern phase of a step, as the ORAs are, and only
  // in the steps whose ORAs watch that buffer type.
  // What an ORA sees: the input-portion output, or in the gate steps of
  // buffers without flip-flops the routing line of the gate under test.
  logic [N_STEPS-1:0] det_p, det_s;
  logic run_phase, gp_obs, bp_obs, gs_obs, bs_obs;
  assign run_phase = busy & ~ora_clr & ~shift_mode;
  assign gp_obs = mode.obs_route ? gp_line[3'(mode.obs_line)] : gp_out;
  assign bp_obs = mode.obs_route ? bp_line[3'(mode.obs_line)] : bp_out;
  assign gs_obs = mode.obs_route ? gs_line[mode.obs_line] : gs_out;
  assign bs_obs = mode.obs_route ? bs_line[mode.obs_line] : bs_out;
  always @(posedge clk) begin
    if (run_phase) begin
      int s;
      s = int'(step);
      if (s <= P_LAST && (gp_obs != bp_obs || bp_osc)) det_p[s] <= 1'b1;
      if (gp_gsr != bp_gsr)                det_p[s] <= 1'b1;
      if (s > P_LAST && s <= S_LAST && (gs_obs != bs_obs || bs_osc)) det_s[s] <= 1'b1;
      if (gs_gsr != bs_gsr)                det_s[s] <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- run
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  int alone_p [N_STEPS], cumul_p [N_STEPS];
  int alone_s [N_STEPS], cumul_s [N_STEPS];

  initial finished = 1'b0;

  initial begin
    int n_runs, t0, n_det_p, n_det_s;
    bit first;
    build_list(flist_p, N_ROUTE_P, N_TG_P);
    build_list(flist_s, N_ROUTE_S, N_TG_S);
    n_runs = flist_p.size() > flist_s.size() ? flist_p.size() : flist_s.size();
    foreach (alone_p[i]) begin
      alone_p[i] = 0; cumul_p[i] = 0; alone_s[i] = 0; cumul_s[i] = 0;
    end
    n_det_p = 0;
    n_det_s = 0;
    fp = '{F_NONE, 0, 1'b0};
    fs = '{F_NONE, 0, 1'b0};
    rst_n = 1'b0;
    start = 1'b0;
    init_gsr = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // fault-free run first: nothing may differ
    for (int r = -1; r < n_runs; r++) begin
      fp = '{F_NONE, 0, 1'b0};
      fs = '{F_NONE, 0, 1'b0};
      init_gsr = 1'b1;
      @(posedge clk);
      @(posedge clk);
      #1 init_gsr = 1'b0;
      if (r >= 0 && r < flist_p.size()) fp = flist_p[r];
      if (r >= 0 && r < flist_s.size()) fs = flist_s[r];
      det_p = '0;
      det_s = '0;
      start = 1'b1;
      @(posedge clk);
      t0 = cyc;
      #1 start = 1'b0;
      wait (done);
      @(posedge clk);
      if (r < 0) begin
        check(det_p == '0 && det_s == '0, "fault-free pair shows no difference");
        // one clock more for the edge after done
        check(cyc - t0 == N_STEPS * STEP_CYC + 1,
              $sformatf("run takes %0d cycles, expected %0d", cyc - t0, N_STEPS * STEP_CYC + 1));
      end else begin
        if (r < flist_p.size()) begin
          first = 1'b1;
          for (int s = 0; s < N_STEPS; s++) begin
            if (det_p[s]) alone_p[s]++;
            if (det_p[s] && first) begin
              for (int u = s; u < N_STEPS; u++) cumul_p[u]++;
              first = 1'b0;
            end
          end
          if (det_p != '0) n_det_p++;
          if (escapes(fp))
            check(det_p == '0, $sformatf("primary %s not observable", fname(fp)));
          else
            check(det_p != '0, $sformatf("primary %s detected", fname(fp)));
        end
        if (r < flist_s.size()) begin
          first = 1'b1;
          for (int s = 0; s < N_STEPS; s++) begin
            if (det_s[s]) alone_s[s]++;
            if (det_s[s] && first) begin
              for (int u = s; u < N_STEPS; u++) cumul_s[u]++;
              first = 1'b0;
            end
          end
          if (det_s != '0) n_det_s++;
          if (escapes(fs))
            check(det_s == '0, $sformatf("secondary %s not observable", fname(fs)));
          else
            check(det_s != '0, $sformatf("secondary %s detected", fname(fs)));
        end
      end
    end

    $display("%s: faults detected per step", HAS_IO_FF ? "with I/O flip-flops" : "without I/O flip-flops");
    $display("step  primary: alone cumulative   secondary: alone cumulative");
    for (int s = 0; s < N_STEPS; s++)
      $display("%4d  %14d %10d  %16d %10d", s, alone_p[s], cumul_p[s], alone_s[s], cumul_s[s]);
    $display("primary: %0d of %0d faults detected; secondary: %0d of %0d",
             n_det_p, flist_p.size(), n_det_s, flist_s.size());
    n_checks = checks;
    n_fail   = failures;
    finished = 1'b1;
  end

endmodule
