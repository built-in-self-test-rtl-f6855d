// Self-checking testbench of io_buffer: primary and secondary variants and
// a primary buffer without I/O flip-flops, side by side. Random configurations and inputs are checked cycle by cycle
// against a reference model of the multiplexers, flip-flops, transmission
// gates, pad and GSR switch; then the transmission gate test of the BIST is
// run directly: load opposite values into the two flip-flops, close one gate
// and check that the pad toggles every clock. For the buffer without
// flip-flops the routing lines it shows (route_obs) are checked too, which is
// how its gates are observed.
module tb_io_buffer;
  import iob_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_tristate = 0, n_regout = 0, n_regin = 0, n_tg = 0, n_bank = 0, n_rst = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ----- stimulus shared by both variants
  iob_cfg_t cfg_p, cfg_s, cfg_n;
  int n_tg_nff = 0;
  logic [4:0] route;
  logic bank_ts, ff_rst, gsr, ext_oe, ext_val;
  logic p_in, p_gsr, p_pad, s_in, s_gsr, s_pad, n_in, n_gsr, n_pad;
  logic [4:0] p_line, n_line;
  logic [3:0] s_line;

  io_buffer #(.PRIMARY(1'b1)) dut_p (
    .clk, .cfg(cfg_p), .route_in(route), .bank_ts, .ff_rst, .gsr, .ext_oe, .ext_val,
    .in_out(p_in), .route_obs(p_line), .gsr_out(p_gsr), .pad_level(p_pad));
  io_buffer #(.PRIMARY(1'b0)) dut_s (
    .clk, .cfg(cfg_s), .route_in(route[3:0]), .bank_ts, .ff_rst, .gsr, .ext_oe, .ext_val,
    .in_out(s_in), .route_obs(s_line), .gsr_out(s_gsr), .pad_level(s_pad));
  io_buffer #(.PRIMARY(1'b1), .HAS_IO_FF(1'b0)) dut_n (
    .clk, .cfg(cfg_n), .route_in(route), .bank_ts, .ff_rst, .gsr, .ext_oe, .ext_val,
    .in_out(n_in), .route_obs(n_line), .gsr_out(n_gsr), .pad_level(n_pad));

  // ----- reference model
  typedef struct {
    logic out_q, in_q;
    logic in_out, pad, gsr_out, data, oe;
    logic [4:0] rs;
  } mstate_t;
  mstate_t mp, ms, mn;

  function automatic logic pick(logic [3:0] sel, logic [7:0] src, int n);
    return (int'(sel) < n) ? src[sel] : 1'b0;
  endfunction

  // Combinational outputs for the current inputs and flip-flop contents.
  // A gate that is on needs the input registered, or (without flip-flops)
  // multiplexers that do not select the gate's line.
  function automatic void model_comb(ref mstate_t m, input iob_cfg_t cin, input int nr,
                                     input int ntg, input bit has_ff);
    logic [4:0] rs;
    logic [7:0] dsrc, tsrc;
    logic dout, din;
    iob_cfg_t c;
    c = cin;
    if (!has_ff) begin c.out_reg = 1'b0; c.in_reg = 1'b0; end
    rs = route;
    if (c.in_reg) m.in_out = m.in_q;
    for (int k = 0; k < ntg; k++) if (c.tg_en[k]) rs[k] = m.in_out;
    dsrc = '0; tsrc = '0;
    dsrc[0] = 1'b0; dsrc[1] = 1'b1;
    for (int k = 0; k < nr; k++) dsrc[2+k] = rs[k];
    tsrc = dsrc; tsrc[2+nr] = bank_ts;
    m.data = pick(c.data_sel, dsrc, nr + 2);
    m.oe   = pick(c.ts_sel, tsrc, nr + 3);
    dout   = c.out_reg ? m.out_q : m.data;
    if (ext_oe)         m.pad = ext_val;
    else if (m.oe)      m.pad = dout;
    else if (c.pull_dn) m.pad = 1'b0;
    else if (c.pull_up) m.pad = 1'b1;
    else                m.pad = 1'b0;
    din = m.pad;
    if (!c.in_reg) m.in_out = din;
    m.gsr_out = c.gsr_drive & din;
    for (int k = 0; k < ntg; k++) if (c.tg_en[k]) rs[k] = m.in_out;
    m.rs = rs;
  endfunction

  function automatic void model_clk(ref mstate_t m, input iob_cfg_t c);
    logic r;
    r = gsr | (c.ff_rst_en & ff_rst);
    m.out_q = r ? 1'b0 : m.data;
    m.in_q  = r ? 1'b0 : m.pad;
  endfunction

  function automatic iob_cfg_t rand_cfg();
    iob_cfg_t c;
    c = iob_cfg_t'({$urandom, $urandom});
    c.data_sel = 4'($urandom % 10);
    c.ts_sel   = 4'($urandom % 10);
    if ($urandom % 3 != 0) c.tg_en = '0;
    if (c.tg_en != 0) c.in_reg = 1'b1;
    return c;
  endfunction

  function automatic iob_cfg_t rand_cfg_nff();
    iob_cfg_t c;
    logic [3:0] dsel [3] = '{4'd0, 4'd1, 4'd6};
    logic [3:0] tsel [4] = '{4'd0, 4'd1, 4'd6, 4'd7};
    c = rand_cfg();
    if (c.tg_en != 0) begin
      c.data_sel = dsel[$urandom % 3];
      c.ts_sel   = tsel[$urandom % 4];
    end
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise flip-flops through the global set/reset
    cfg_p = CFG_IDLE; cfg_s = CFG_IDLE; cfg_n = CFG_IDLE;
    route = '0; bank_ts = 0; ff_rst = 0; gsr = 1; ext_oe = 0; ext_val = 0;
    @(posedge clk); #1;
    mp.out_q = 0; mp.in_q = 0; ms.out_q = 0; ms.in_q = 0;
    gsr = 0;

    for (int i = 0; i < 3000; i++) begin
      #1;
      if (i % 8 == 0) begin cfg_p = rand_cfg(); cfg_s = rand_cfg(); cfg_n = rand_cfg_nff(); end
      route = 5'($urandom); bank_ts = 1'($urandom); ff_rst = ($urandom % 6 == 0);
      gsr = ($urandom % 25 == 0); ext_oe = ($urandom % 8 == 0); ext_val = 1'($urandom);
      #1;
      model_comb(mp, cfg_p, N_ROUTE_P, N_TG_P, 1'b1);
      model_comb(ms, cfg_s, N_ROUTE_S, N_TG_S, 1'b1);
      model_comb(mn, cfg_n, N_ROUTE_P, N_TG_P, 1'b0);
      check(p_line == mp.rs && s_line == ms.rs[3:0], "routing lines as seen");
      check(n_in == mn.in_out && n_pad == mn.pad && n_gsr == mn.gsr_out && n_line == mn.rs,
            $sformatf("no-flip-flop cycle %0d: in %b/%b pad %b/%b line %b/%b", i, n_in, mn.in_out,
                      n_pad, mn.pad, n_line, mn.rs));
      if (cfg_n.tg_en != 0) n_tg_nff++;
      check(p_in == mp.in_out && p_pad == mp.pad && p_gsr == mp.gsr_out,
            $sformatf("primary cycle %0d: in %b/%b pad %b/%b gsr %b/%b", i, p_in, mp.in_out, p_pad, mp.pad, p_gsr, mp.gsr_out));
      check(s_in == ms.in_out && s_pad == ms.pad && s_gsr == ms.gsr_out,
            $sformatf("secondary cycle %0d: in %b/%b pad %b/%b", i, s_in, ms.in_out, s_pad, ms.pad));
      if (!mp.oe && !ext_oe) n_tristate++;
      if (cfg_p.out_reg) n_regout++;
      if (cfg_p.in_reg) n_regin++;
      if (cfg_p.tg_en[3:0] != 0) n_tg++;
      if (cfg_p.ts_sel == 4'd7) n_bank++;
      if (gsr || (ff_rst && cfg_p.ff_rst_en)) n_rst++;
      @(posedge clk);
      model_clk(mp, cfg_p);
      model_clk(ms, cfg_s);
    end
    #1;
    check(n_tg_nff > 0, "gates exercised without flip-flops");
    check(n_tristate > 0 && n_regout > 0 && n_regin > 0 && n_tg > 0 && n_bank > 0 && n_rst > 0,
          "all modes exercised");

    // ----- transmission gate test: every gate of both variants
    ext_oe = 0; gsr = 0; ff_rst = 0;
    for (int k = 0; k < N_TG_P; k++) begin
      logic prev_p, prev_s;
      // preload: registered both ways on routing line 0, which toggles
      cfg_p = CFG_IDLE; cfg_p.ts_sel = SEL_ONE; cfg_p.data_sel = SEL_R0;
      cfg_p.out_reg = 1; cfg_p.in_reg = 1;
      cfg_s = cfg_p;
      for (int t = 0; t < 6; t++) begin
        route = {4'b0, 1'(t)};
        @(posedge clk); #1;
      end
      // close gate k: loop out_q -> pad -> in_q -> gate -> data mux -> out_q
      cfg_p.data_sel = SEL_W'(2 + k); cfg_p.tg_en = MAX_TG'(1) << k;
      cfg_s.data_sel = SEL_W'(2 + k % N_TG_S); cfg_s.tg_en = MAX_TG'(1) << (k % N_TG_S);
      route = '0;   // lines held still: a toggle can only come through the gate
      #1 prev_p = p_pad; prev_s = s_pad;
      for (int t = 0; t < 8; t++) begin
        @(posedge clk); #1;
        check(p_pad == ~prev_p, $sformatf("primary gate %0d toggles", k));
        check(s_pad == ~prev_s, $sformatf("secondary gate %0d toggles", k % N_TG_S));
        prev_p = p_pad; prev_s = s_pad;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
