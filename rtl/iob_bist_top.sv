// Built-in self-test of the programmable I/O buffers of an FPGA.
//
// All I/O buffers are configured as bidirectional buffers. One test pattern
// generator (a 6-bit counter) drives the output portion of every buffer; the
// pad loops the pattern back into the input portion; comparison-based ORAs
// compare the input-portion outputs of neighbouring buffers of the same kind,
// in a ring, so every buffer is compared with the two next to it and a fault
// shared by two adjacent buffers still shows against a third. Primary and
// secondary buffers are tested in separate sessions; the ORA ring observes
// the buffers of the current session. For the global reset tests the
// generator's reset pattern is daisy-chained through all buffers on routing
// line 0, and one buffer at a time drives the global set/reset; a further ORA
// compares a flip-flop reset by the global set/reset with a reference reset
// by the pattern, in every step. The sequencer applies all configurations,
// runs each for one full count of the generator, then shifts the ORA chain
// out and records the step's result in fail_map.
//
// Pads are numbered bank by bank, eight to a bank, even pads primary and odd
// pads secondary, so bank b holds primary buffers 4b..4b+3 and secondary
// buffers 4b..4b+3; each bank has its own tri-state control line. Outside
// the chip every pad can be driven through pad_ext_oe / pad_ext_val, which
// also serves to emulate a faulty pad.
//
// From the design description: one pattern generator, the 6-bit counter and
// the use of its bits, a ring of comparison ORAs with two comparisons per
// buffer, separate sessions, the global reset daisy chain, banks of four
// primary and four secondary buffers. This design's own: N_BANKS (4 by
// default, 32 buffers), the bank tri-state lines carrying the inverted reset
// pattern, the ORA read-out order (ring ORAs 0..N_P-1, then the global reset
// ORA, which is nearest the output), the routing of the periphery as fixed
// wires and the sequencer replacing the embedded processor.
//
// The daisy chain and the transmission gates close combinational paths
// through several buffers; they are the intended signal paths of the test
// and are acyclic in every configuration of the BIST set. A routing line
// whose transmission gate is configured on is taken off the generator in
// that step (driven 0): it belongs to the gate loop, so a gate stuck off
// leaves its buffer looking at a constant (this design's choice).
//
// HAS_IO_FF = 0 builds the array from buffers without I/O flip-flops and
// runs the shorter configuration set for them (see bist_cfg_set); in its gate
// steps the ORAs observe each buffer's routing line of the gate under test.
//
// Timing: after start the sequence takes N_STEPS * (1 + 64 + N_P + 1) + 1
// clocks; pass is valid while done is high.
module iob_bist_top
  import iob_bist_pkg::*;
#(
  parameter int N_BANKS   = 4,
  parameter bit HAS_IO_FF = 1'b1,
  localparam int N_P     = 4 * N_BANKS,
  localparam int N_S     = 4 * N_BANKS,
  localparam int N_IOB   = 8 * N_BANKS,
  localparam int N_STEPS = n_fixed(HAS_IO_FF) + N_IOB,
  localparam int N_SCAN  = N_P + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [N_IOB-1:0]   pad_ext_oe,
  input  logic [N_IOB-1:0]   pad_ext_val,
  output logic [N_IOB-1:0]   pad_level,
  output logic [STEP_W-1:0]  step,
  output logic               busy,
  output logic               done,
  output logic               pass,
  output logic [N_STEPS-1:0] fail_map,
  output logic               scan_out
);

  // ---------------------------------------------------------------- control
  logic ora_clr, shift_mode, tpg_en;

  bist_controller #(
    .N_STEPS    (N_STEPS),
    .RUN_CYCLES (2 ** TPG_W),
    .N_SCAN     (N_SCAN)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .scan_in    (scan_out),
    .step       (step),
    .ora_clr    (ora_clr),
    .shift_mode (shift_mode),
    .tpg_en     (tpg_en),
    .busy       (busy),
    .done       (done),
    .fail_map   (fail_map)
  );

  assign pass = done & ~|fail_map;

  iob_cfg_t cfg_p [N_P];
  iob_cfg_t cfg_s [N_S];
  arr_cfg_t mode;

  bist_cfg_set #(.N_BANKS(N_BANKS), .HAS_IO_FF(HAS_IO_FF)) u_cfg (
    .step  (step),
    .cfg_p (cfg_p),
    .cfg_s (cfg_s),
    .mode  (mode)
  );

  // ------------------------------------------------------ pattern generator
  logic [TPG_W-2:0] tpg_route;
  logic             tpg_rst;

  bist_tpg #(.WIDTH(TPG_W)) u_tpg (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (tpg_en),
    .count  (),
    .route  (tpg_route),
    .ff_rst (tpg_rst)
  );

  // ------------------------------------------------------------ I/O buffers
  logic [N_IOB-1:0] iob_in;     // input-portion outputs, pad order
  logic [N_IOB-1:0] gsr_drv;
  logic             gsr;
  logic [N_P-1:0]   p_in;
  logic [N_S-1:0]   s_in;

  for (genvar j = 0; j < N_IOB; j++) begin : g_pad
    localparam bit IS_P = (j % 2) == 0;
    localparam int NR   = IS_P ? N_ROUTE_P : N_ROUTE_S;
    localparam int NRW  = $clog2(NR);
    logic [NR-1:0] route;
    logic          chain_in;

    // Daisy chain of the global reset tests: the reset pattern enters at
    // pad 0 and each buffer passes it on to the next one's routing line 0.
    if (j == 0) begin : g_first
      assign chain_in = tpg_rst;
    end else begin : g_next
      assign chain_in = iob_in[j-1];
    end

    // A routing line whose transmission gate is configured on belongs to
    // the buffer in that configuration and is not driven by the generator.
    iob_cfg_t cfg;
    assign cfg = IS_P ? cfg_p[j/2] : cfg_s[j/2];
    always_comb begin
      route    = tpg_route[NR-1:0];
      if (mode.gsr_chain) route[0] = chain_in;
      for (int k = 0; k < NR && k < MAX_TG; k++)
        if (cfg.tg_en[k]) route[k] = 1'b0;
    end

    logic [NR-1:0] line;

    io_buffer #(.PRIMARY(IS_P), .HAS_IO_FF(HAS_IO_FF)) u_iob (
      .clk       (clk),
      .cfg       (cfg),
      .route_in  (route),
      .bank_ts   (~tpg_rst),
      .ff_rst    (tpg_rst),
      .gsr       (gsr),
      .ext_oe    (pad_ext_oe[j]),
      .ext_val   (pad_ext_val[j]),
      .in_out    (iob_in[j]),
      .route_obs (line),
      .gsr_out   (gsr_drv[j]),
      .pad_level (pad_level[j])
    );

    // What the ORAs see of this buffer: its input portion, or, in the gate
    // steps of buffers without flip-flops, the routing line of the gate.
    if (IS_P) begin : g_p
      assign p_in[j/2] = mode.obs_route ? line[NRW'(mode.obs_line)] : iob_in[j];
    end else begin : g_s
      assign s_in[j/2] = mode.obs_route ? line[NRW'(mode.obs_line)] : iob_in[j];
    end
  end

  // ---------------------------------------------------------- global reset
  logic mon_q, exp_q;

  gsr_test #(.N_IOB(N_IOB)) u_gsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .gsr_drv (gsr_drv),
    .exp_rst (mode.gsr_chain & tpg_rst),
    .gsr     (gsr),
    .mon_q   (mon_q),
    .exp_q   (exp_q)
  );

  // ------------------------------------------------------------- ORA chain
  logic [N_P-1:0] obs;
  logic [N_P-1:0] ora_fail;

  assign obs = (mode.session == SESS_PRIMARY) ? p_in : s_in;

  for (genvar i = 0; i < N_P; i++) begin : g_ora
    bist_ora u_ora (
      .clk        (clk),
      .clr        (ora_clr),
      .a          (obs[i]),
      .b          (obs[(i + 1) % N_P]),
      .shift_mode (shift_mode),
      .shift_data (i == 0 ? 1'b0 : ora_fail[(i + N_P - 1) % N_P]),
      .fail       (ora_fail[i])
    );
  end

  bist_ora u_ora_gsr (
    .clk        (clk),
    .clr        (ora_clr),
    .a          (mon_q),
    .b          (exp_q),
    .shift_mode (shift_mode),
    .shift_data (ora_fail[N_P-1]),
    .fail       (scan_out)
  );

endmodule
