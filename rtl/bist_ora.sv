// Comparison-based output response analyser (ORA).
//
// Compares two responses that should be equal: their XOR is ORed with the
// stored result, so a single mismatch sets the Pass/Fail flip-flop and it
// stays set. A multiplexer in front of the flip-flop, controlled by
// shift_mode, instead loads shift_data, so a row of ORAs chained through
// shift_data forms a shift register through which the results are read out.
//
// The XOR / OR / multiplexer / flip-flop structure follows the description;
// the synchronous clear and the select polarity (shift_mode = 1 shifts) are
// this design's choices.
//
// Timing: fail is registered; a mismatch on a/b in cycle t shows on fail
// after the next rising edge. clr has priority over everything else.
module bist_ora (
  input  logic clk,
  input  logic clr,
  input  logic a,
  input  logic b,
  input  logic shift_mode,
  input  logic shift_data,
  output logic fail
);

  logic compare;

  assign compare = (a ^ b) | fail;

  always_ff @(posedge clk) begin
    if (clr)             fail <= 1'b0;
    else if (shift_mode) fail <= shift_data;
    else                 fail <= compare;
  end

endmodule
