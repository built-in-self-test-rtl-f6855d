// Test pattern generator of the I/O buffer BIST.
//
// A WIDTH-bit binary up-counter. Its most significant bit is the reset
// pattern for the flip-flops inside the I/O buffers (ff_rst); the remaining
// WIDTH-1 bits are the patterns sent over the routing lines to the inputs
// of the buffers' data and tri-state multiplexers (route). One full count
// (2**WIDTH clocks) applies every combination of the routing patterns with
// the reset both released and asserted.
//
// The 6-bit counter and the use of its bits follow the design description;
// the synchronous active-low reset to zero, the count enable and the
// counting direction are this design's choices.
//
// Timing: count advances on every rising clk edge with en high; outputs are
// registered.
module bist_tpg #(
  parameter int WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-2:0] route,
  output logic             ff_rst
);

  always_ff @(posedge clk) begin
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;
  end

  assign route  = count[WIDTH-2:0];
  assign ff_rst = count[WIDTH-1];

endmodule
