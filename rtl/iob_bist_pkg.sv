// Shared types and constants of the I/O buffer built-in self-test.
//
// The BIST configures the programmable I/O buffers of an FPGA as
// bidirectional buffers: a test pattern generator drives their output
// portion, the pad loops the pattern back, and comparison-based output
// response analysers check the input portions of neighbouring buffers
// against each other. This package holds the configuration word of one
// I/O buffer (the bits that the device's configuration memory would hold),
// the array-level routing mode, the multiplexer select codes, and the
// configuration counts of the test sequence.
//
// Taken from the design description: a 6-bit counter as pattern generator;
// seven data/tri-state multiplexer inputs on a primary buffer and six on a
// secondary one, plus a bank tri-state input on the tri-state multiplexer;
// four transmission gates on a primary buffer and two on a secondary one;
// three drive settings, four input delays, Schmitt trigger and TTL/CMOS
// threshold; 9 + 4 primary and 8 + 2 secondary configurations (23), plus
// one global reset configuration per I/O buffer; buffers without I/O
// flip-flops use the same set less the two flip-flop preload steps. Field order, widths and
// select encodings are this design's own.
package iob_bist_pkg;

  // Pattern generator width: MSB is the flip-flop reset pattern, the rest
  // drive the routing inputs of the multiplexers.
  localparam int TPG_W = 6;

  // Routing lines seen by each multiplexer (besides the constants '0'/'1').
  localparam int N_ROUTE_P = 5;   // primary: 7 data / tri-state inputs
  localparam int N_ROUTE_S = 4;   // secondary: 6 data / tri-state inputs
  localparam int N_TG_P    = 4;   // transmission gates, primary
  localparam int N_TG_S    = 2;   // transmission gates, secondary
  localparam int MAX_TG    = 4;

  // Multiplexer select codes: 0 = constant 0, 1 = constant 1,
  // 2 + k = routing line k, 2 + N_ROUTE = bank tri-state (tri-state mux only).
  localparam int SEL_W    = 4;
  localparam logic [SEL_W-1:0] SEL_ZERO = 4'd0;
  localparam logic [SEL_W-1:0] SEL_ONE  = 4'd1;
  localparam logic [SEL_W-1:0] SEL_R0   = 4'd2;

  // Configuration counts of the test sequence.
  localparam int N_CFG_P    = 9;   // primary session
  localparam int N_TGCFG_P  = 4;   // primary transmission gate tests
  localparam int N_CFG_S    = 8;   // secondary session
  localparam int N_TGCFG_S  = 2;   // secondary transmission gate tests
  localparam int N_FIXED    = N_CFG_P + N_TGCFG_P + N_CFG_S + N_TGCFG_S; // 23

  // Buffers without I/O flip-flops need no preload steps: 21 fixed steps.
  function automatic int n_fixed(bit has_io_ff);
    return has_io_ff ? N_FIXED : N_FIXED - 2;
  endfunction

  localparam int STEP_W = 10;

  // Configuration bits of one I/O buffer.
  typedef struct packed {
    logic [SEL_W-1:0]  data_sel;   // data (output signal) multiplexer
    logic [SEL_W-1:0]  ts_sel;     // tri-state control multiplexer
    logic              out_reg;    // 1: registered output
    logic              in_reg;     // 1: registered input
    logic              ff_rst_en;  // TPG reset pattern reaches the flip-flops
    logic              pull_up;
    logic              pull_dn;
    logic [1:0]        drive;      // drive capability, 0..2
    logic [1:0]        delay;      // input delay, 0..3
    logic              schmitt;
    logic              ttl;        // 1: TTL threshold, 0: CMOS
    logic [MAX_TG-1:0] tg_en;      // transmission gates on
    logic              gsr_drive;  // this buffer drives the global set/reset
  } iob_cfg_t;

  typedef enum logic {
    SESS_PRIMARY   = 1'b0,
    SESS_SECONDARY = 1'b1
  } session_e;

  // Array-level routing mode of a configuration.
  typedef struct packed {
    session_e   session;    // which buffers the ORA ring observes
    logic       gsr_chain;  // daisy-chain the TPG reset pattern through all buffers
    logic       obs_route;  // ORAs observe routing line obs_line instead of in_out
    logic [1:0] obs_line;
  } arr_cfg_t;

  // Configuration of a buffer that is not under test in the current step:
  // output tri-stated, pull-up on.
  localparam iob_cfg_t CFG_IDLE = '{
    data_sel: SEL_ZERO, ts_sel: SEL_ZERO, out_reg: 1'b0, in_reg: 1'b0,
    ff_rst_en: 1'b0, pull_up: 1'b1, pull_dn: 1'b0, drive: 2'd0, delay: 2'd0,
    schmitt: 1'b0, ttl: 1'b0, tg_en: '0, gsr_drive: 1'b0};

endpackage
