// Behavioural model of the analog part of a programmable I/O buffer: the
// tri-statable output driver, the pad, the pull-up and pull-down transistors
// and the input receiver. Not synthesizable as a circuit in the sense of the
// real part; it gives the logic value the pad settles to.
//
// Resolution in this two-state model, strongest first: a driver outside the
// chip (ext_oe / ext_val, which also stands for a pad shorted to a fixed
// level), the on-chip output driver when oe is high, the pull-down, the
// pull-up. A pad with no driver and no pull reads 0. The receiver output din
// equals the pad level.
//
// The drive capability (three settings), the four input delays, the Schmitt
// trigger and the TTL/CMOS threshold select are ports of the real part but
// only change analog behaviour (currents, delay, noise margin, thresholds),
// so they do not change the logic value here and are left unread.
//
// Timing: purely combinational, zero delay.
module iob_pad (
  input  logic       dout,
  input  logic       oe,
  input  logic       pull_up,
  input  logic       pull_dn,
  input  logic [1:0] drive,
  input  logic [1:0] delay,
  input  logic       schmitt,
  input  logic       ttl,
  input  logic       ext_oe,
  input  logic       ext_val,
  output logic       din,
  output logic       level
);

  always_comb begin
    if (ext_oe)        level = ext_val;
    else if (oe)       level = dout;
    else if (pull_dn) level = 1'b0;
    else if (pull_up)   level = 1'b1;
    else               level = 1'b0;
  end

  assign din = level;

endmodule
