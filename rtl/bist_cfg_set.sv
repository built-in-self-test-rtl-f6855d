// The set of BIST configurations, indexed by step number.
//
// For each step it gives the configuration word of every primary and every
// secondary I/O buffer and the array routing mode. The steps, in order:
//   0..8    primary session. Steps 0..7 each select one of the eight inputs
//           of the tri-state multiplexer ('0', '1', five routing lines, bank
//           control); the data select, registered/non-registered choices,
//           pull mode (up, down, none in turn) and the analog setting bits
//           rotate with the step. The pattern generator reset of the
//           flip-flops is on, except in the step that selects the bank line:
//           both come from the counter's top bit, so with the reset on the
//           tri-stated half would also be the reset half.
//           Step 8 runs both flip-flops registered on routing line 0, the
//           pattern generator's least significant bit, which toggles every
//           clock, so the output and input flip-flops end up holding
//           opposite values.
//   9..12   primary transmission gate k = step-9 on: both registers in the
//           loop, the data multiplexer on routing line k, output always on.
//   13..20  secondary session, the same rule with six data inputs and seven
//           tri-state inputs (steps 13..19), step 20 loads the flip-flops.
//   21..22  secondary transmission gates 0 and 1.
//   23..    one global reset step per I/O buffer, in pad order (even pads
//           primary, odd pads secondary): all buffers non-registered,
//           driving routing line 0, which the array daisy-chains from buffer
//           to buffer; only the buffer of that step drives the global
//           set/reset.
// Buffers not under test in a session are tri-stated with the pull-up on.
//
// With HAS_IO_FF = 0 (buffers without I/O flip-flops) the preload steps are
// dropped (21 fixed steps: primary 0..7, gates 8..11, secondary 12..18, gates
// 19..20, global reset from 21) and nothing is registered. A gate cannot be
// tested by a toggling loop then; instead the data multiplexer takes a
// routing line that has no gate, and the ORAs observe the gate's own routing
// line (mode.obs_route), which carries the input-portion signal only if the
// gate passes it: the signal flow on that line is reversed for each gate.
//
// The configuration counts (9, 4, 8, 2 and one per buffer), the use of the
// tri-state inputs to size a session, the flip-flop preload before the
// transmission gate tests and the daisy chain follow the design
// description; the individual bit values are this design's own rule.
//
// Timing: combinational.
module bist_cfg_set
  import iob_bist_pkg::*;
#(
  parameter int N_BANKS   = 4,
  parameter bit HAS_IO_FF = 1'b1,
  localparam int N_P = 4 * N_BANKS,
  localparam int N_S = 4 * N_BANKS
) (
  input  logic [STEP_W-1:0] step,
  output iob_cfg_t          cfg_p [N_P],
  output iob_cfg_t          cfg_s [N_S],
  output arr_cfg_t          mode
);

  localparam int N_IOB = N_P + N_S;
  localparam int N_PRE = HAS_IO_FF ? 1 : 0;   // preload step per session
  localparam int S_TGP = N_ROUTE_P + 3 + N_PRE;
  localparam int S_S   = S_TGP + N_TG_P;
  localparam int S_TGS = S_S + N_ROUTE_S + 3 + N_PRE;
  localparam int S_GSR = S_TGS + N_TG_S;

  // Configuration c of a session; n_route routing lines, n_ts tri-state
  // inputs (constants, routing lines and bank control).
  function automatic iob_cfg_t session_cfg(int c, int n_route);
    iob_cfg_t r;
    int n_ts, n_data;
    n_data = n_route + 2;
    n_ts   = n_route + 3;
    r = CFG_IDLE;
    if (c < n_ts) begin
      r.ts_sel    = SEL_W'(c);
      r.data_sel  = SEL_W'((c + 2) % n_data);
      r.out_reg   = HAS_IO_FF & c[0];
      r.in_reg    = HAS_IO_FF & c[1];
      // the bank line and the flip-flop reset come from the same counter
      // bit, so in the step that selects the bank line the reset stays off:
      // otherwise the tri-stated half would also be the reset half
      r.ff_rst_en = HAS_IO_FF && c != n_ts - 1;
      r.pull_up   = (c % 3) == 0;
      r.pull_dn   = (c % 3) == 1;
      r.drive     = 2'(c % 3);
      r.delay     = 2'(c % 4);
      r.schmitt   = c[1];
      r.ttl       = c[2];
    end else begin
      // flip-flop preload for the transmission gate tests
      r.ts_sel    = SEL_ONE;
      r.data_sel  = SEL_R0;
      r.out_reg   = 1'b1;
      r.in_reg    = 1'b1;
      r.ff_rst_en = 1'b0;
    end
    return r;
  endfunction

  // Gate k; n_tg gates sit on lines 0..n_tg-1, line n_tg has none.
  function automatic iob_cfg_t tgate_cfg(int k, int n_tg);
    iob_cfg_t r;
    r = CFG_IDLE;
    r.ts_sel   = SEL_ONE;
    r.tg_en    = MAX_TG'(1) << k;
    if (HAS_IO_FF) begin
      r.data_sel = SEL_W'(2 + k);
      r.out_reg  = 1'b1;
      r.in_reg   = 1'b1;
    end else begin
      r.data_sel = SEL_W'(2 + n_tg);
    end
    return r;
  endfunction

  function automatic iob_cfg_t gsr_cfg(bit drives);
    iob_cfg_t r;
    r = CFG_IDLE;
    r.ts_sel    = SEL_ONE;
    r.data_sel  = SEL_R0;
    r.gsr_drive = drives;
    return r;
  endfunction

  always_comb begin
    int s;
    s = int'(step);
    mode = '{session: SESS_PRIMARY, gsr_chain: 1'b0, obs_route: 1'b0, obs_line: 2'd0};
    for (int i = 0; i < N_P; i++) cfg_p[i] = CFG_IDLE;
    for (int i = 0; i < N_S; i++) cfg_s[i] = CFG_IDLE;

    if (s < S_TGP) begin
      for (int i = 0; i < N_P; i++) cfg_p[i] = session_cfg(s, N_ROUTE_P);
    end else if (s < S_S) begin
      for (int i = 0; i < N_P; i++) cfg_p[i] = tgate_cfg(s - S_TGP, N_TG_P);
      mode.obs_route = ~HAS_IO_FF;
      mode.obs_line  = 2'(s - S_TGP);
    end else if (s < S_TGS) begin
      mode.session = SESS_SECONDARY;
      for (int i = 0; i < N_S; i++) cfg_s[i] = session_cfg(s - S_S, N_ROUTE_S);
    end else if (s < S_GSR) begin
      mode.session = SESS_SECONDARY;
      for (int i = 0; i < N_S; i++) cfg_s[i] = tgate_cfg(s - S_TGS, N_TG_S);
      mode.obs_route = ~HAS_IO_FF;
      mode.obs_line  = 2'(s - S_TGS);
    end else if (s < S_GSR + N_IOB) begin
      mode.gsr_chain = 1'b1;
      for (int i = 0; i < N_P; i++) cfg_p[i] = gsr_cfg((s - S_GSR) == 2 * i);
      for (int i = 0; i < N_S; i++) cfg_s[i] = gsr_cfg((s - S_GSR) == 2 * i + 1);
    end
  end

endmodule
