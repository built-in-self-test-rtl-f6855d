// Global set/reset (GSR) net and its test flip-flops.
//
// Any I/O buffer can be configured to drive the global set/reset net; the
// configuration lets only one do so at a time, and the net here is the OR of
// all the buffers' drive switches (gsr_drv). To test a buffer's switch, a
// flip-flop (mon_q) has a constant 1 at its input and the GSR as its reset;
// a reference flip-flop (exp_q), also loading 1, is reset by the pattern the
// pattern generator sends into the buffers (exp_rst). An ORA outside this
// block compares mon_q and exp_q: a switch stuck off leaves mon_q at 1 when
// exp_q is reset; a switch stuck on resets mon_q when exp_q is not.
//
// The constant-1 flip-flop reset by the GSR and compared by an ORA with an
// expectation produced from the pattern generator follow the description;
// building the expectation as a second flip-flop, the OR net and the
// synchronous active-high reset of both flip-flops are this design's choices.
//
// Timing: gsr is combinational from gsr_drv; mon_q and exp_q are registered
// and go to 0 the cycle after their reset is high.
module gsr_test #(
  parameter int N_IOB = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IOB-1:0] gsr_drv,
  input  logic             exp_rst,
  output logic             gsr,
  output logic             mon_q,
  output logic             exp_q
);

  assign gsr = |gsr_drv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mon_q <= 1'b1;
      exp_q <= 1'b1;
    end else begin
      mon_q <= gsr     ? 1'b0 : 1'b1;
      exp_q <= exp_rst ? 1'b0 : 1'b1;
    end
  end

endmodule
