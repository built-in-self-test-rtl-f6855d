// Programmable I/O buffer of the FPGA, primary or secondary (PRIMARY = 1/0),
// with or without the two I/O flip-flops (HAS_IO_FF = 1/0; without them the
// buffer is the simpler variant whose signals are never registered and
// cfg.out_reg, cfg.in_reg and cfg.ff_rst_en have no effect).
//
// Output portion: the data multiplexer picks the signal sent to the pad from
// the constants 0 and 1 and the routing lines (five on a primary buffer, four
// on a secondary one); a D flip-flop and a bypass multiplexer make the output
// registered or not. The tri-state multiplexer picks the output-enable from
// the same sources plus the bank tri-state line shared by eight adjacent
// buffers. Input portion: the receiver output goes through a second D
// flip-flop and bypass multiplexer to in_out, which leaves the buffer towards
// the core (and the ORAs). route_obs shows the routing lines as the
// multiplexers see them, so a signal passed through a gate can be observed
// on its line. Transmission gates (four on a primary buffer, two
// on a secondary one) join in_out to routing lines; a gate that is on makes
// the line, as both multiplexers see it, carry in_out. A programmable switch
// lets the buffer drive the global set/reset net with its input signal.
// Pad, output driver, pull-up/pull-down and receiver are the behavioural
// model iob_pad.
//
// Follows the description: the four multiplexers, their input counts, the
// two flip-flops with reset, the transmission gate counts, pull-up/pull-down,
// the bank tri-state input and the GSR drive. This design's choices: select
// codes (see iob_bist_pkg), output enable active high, synchronous
// active-high reset (global set/reset always; the pattern generator's reset
// only when cfg.ff_rst_en), transmission gate k on routing line k, one clock
// for both flip-flops, the GSR tap on the receiver output.
//
// A transmission gate that is on closes a loop from in_out through the data
// multiplexer and the pad back to in_out. It is intended (it is how the gates
// are tested, with both flip-flops in the loop); only a configuration with a
// gate on and both registers bypassed would make it combinational if the
// multiplexers selected the gate's line, and the BIST configuration set never
// does that (without flip-flops the data comes from a line with no gate).
//
// Timing: registered modes add one clock each way; everything else is
// combinational.
module io_buffer
  import iob_bist_pkg::*;
#(
  parameter bit PRIMARY   = 1'b1,
  parameter bit HAS_IO_FF = 1'b1,
  localparam int N_ROUTE = PRIMARY ? N_ROUTE_P : N_ROUTE_S,
  localparam int N_TG    = PRIMARY ? N_TG_P : N_TG_S
) (
  input  logic               clk,
  input  iob_cfg_t           cfg,
  input  logic [N_ROUTE-1:0] route_in,
  input  logic               bank_ts,
  input  logic               ff_rst,
  input  logic               gsr,
  input  logic               ext_oe,
  input  logic               ext_val,
  output logic               in_out,
  output logic [N_ROUTE-1:0] route_obs,
  output logic               gsr_out,
  output logic               pad_level
);

  logic [N_ROUTE-1:0] route_seen;
  logic [N_ROUTE+1:0] data_src;
  logic [N_ROUTE+2:0] ts_src;
  logic data_mux, ts_mux, out_q, dout, din, in_q, rst;

  // Transmission gates: line k carries in_out while gate k is on.
  always_comb begin
    route_seen = route_in;
    for (int k = 0; k < N_TG; k++)
      if (cfg.tg_en[k]) route_seen[k] = in_out;
  end

  assign data_src = {route_seen, 1'b1, 1'b0};
  assign ts_src   = {bank_ts, route_seen, 1'b1, 1'b0};

  always_comb begin
    data_mux = 1'b0;
    for (int i = 0; i < N_ROUTE + 2; i++)
      if (cfg.data_sel == SEL_W'(i)) data_mux = data_src[i];
  end

  always_comb begin
    ts_mux = 1'b0;
    for (int i = 0; i < N_ROUTE + 3; i++)
      if (cfg.ts_sel == SEL_W'(i)) ts_mux = ts_src[i];
  end

  assign route_obs = route_seen;

  if (HAS_IO_FF) begin : g_ff
    assign rst = gsr | (cfg.ff_rst_en & ff_rst);

    always_ff @(posedge clk) begin
      if (rst) begin
        out_q <= 1'b0;
        in_q  <= 1'b0;
      end else begin
        out_q <= data_mux;
        in_q  <= din;
      end
    end

    assign dout   = cfg.out_reg ? out_q : data_mux;
    assign in_out = cfg.in_reg ? in_q : din;
  end else begin : g_no_ff
    assign rst    = 1'b0;
    assign out_q  = 1'b0;
    assign in_q   = 1'b0;
    assign dout   = data_mux;
    assign in_out = din;
  end

  iob_pad u_pad (
    .dout     (dout),
    .oe       (ts_mux),
    .pull_up   (cfg.pull_up),
    .pull_dn (cfg.pull_dn),
    .drive    (cfg.drive),
    .delay    (cfg.delay),
    .schmitt  (cfg.schmitt),
    .ttl      (cfg.ttl),
    .ext_oe   (ext_oe),
    .ext_val  (ext_val),
    .din      (din),
    .level    (pad_level)
  );

  assign gsr_out = cfg.gsr_drive & din;

endmodule
