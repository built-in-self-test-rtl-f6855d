// BIST sequencer: applies the configurations one after another, runs the
// test in each, reads the ORAs out and keeps a pass/fail bit per step.
//
// After start, for every step 0..N_STEPS-1 it spends one cycle in CLEAR
// (new configuration applied, ORAs cleared), RUN_CYCLES cycles in RUN (the
// ORAs compare) and N_SCAN cycles in SCAN (ORA chain in shift mode; the
// serial output scan_in is sampled each cycle and ORed into the step's
// result). The result goes into fail_map[step]; after the last step done is
// raised and held until the next start.
//
// In the devices this sequencing is a configuration download plus a program
// on the embedded processor that rewrites the configuration by partial
// reconfiguration; here it is a state machine and reconfiguration takes no
// time. The pattern generator is not restarted per step (tpg_en is high for
// the whole sequence), so the flip-flop contents loaded in one step survive
// into the next, as the transmission gate tests need. Run length and readout
// scheme are this design's choices.
//
// Timing: a step takes 1 + RUN_CYCLES + N_SCAN clocks; the whole sequence
// N_STEPS times that, plus one cycle to finish.
module bist_controller
  import iob_bist_pkg::*;
#(
  parameter int N_STEPS    = 55,
  parameter int RUN_CYCLES = 64,
  parameter int N_SCAN     = 17
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               scan_in,
  output logic [STEP_W-1:0]  step,
  output logic               ora_clr,
  output logic               shift_mode,
  output logic               tpg_en,
  output logic               busy,
  output logic               done,
  output logic [N_STEPS-1:0] fail_map
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_SCAN, S_DONE} state_e;

  localparam int CNT_W = $clog2((RUN_CYCLES > N_SCAN ? RUN_CYCLES : N_SCAN) + 1);

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic             acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      step     <= '0;
      cnt      <= '0;
      acc      <= 1'b0;
      fail_map <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state    <= S_CLEAR;
          step     <= '0;
          fail_map <= '0;
        end
        S_CLEAR: begin
          state <= S_RUN;
          cnt   <= '0;
          acc   <= 1'b0;
        end
        S_RUN: begin
          if (cnt == CNT_W'(RUN_CYCLES - 1)) begin
            state <= S_SCAN;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_SCAN: begin
          acc <= acc | scan_in;
          if (cnt == CNT_W'(N_SCAN - 1)) begin
            fail_map[$clog2(N_STEPS)'(step)] <= acc | scan_in;
            if (step == STEP_W'(N_STEPS - 1)) begin
              state <= S_DONE;
            end else begin
              state <= S_CLEAR;
              step  <= step + 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ora_clr    = (state == S_CLEAR);
  assign shift_mode = (state == S_SCAN);
  assign busy       = (state == S_CLEAR) || (state == S_RUN) || (state == S_SCAN);
  assign tpg_en     = busy;
  assign done       = (state == S_DONE);

endmodule
