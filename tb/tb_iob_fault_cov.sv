// Fault-coverage run of the I/O buffer BIST, for buffers with and without
// I/O flip-flops.
//
// Two instances of fault_cov_bench run side by side: one on buffers with
// I/O flip-flops (23 fixed steps) and one on buffers without them (21 fixed
// steps, gates tested by observing their routing lines). Each injects every
// single stuck-at fault of its list into one buffer of a pair, runs the
// whole BIST sequence per fault and prints the faults each step detects on
// its own and cumulatively. This testbench adds the clock and the watchdog,
// and prints the sum of both benches' checks.
module tb_iob_fault_cov;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic fin_ff, fin_nff;
  int   chk_ff, chk_nff, fail_ff, fail_nff;

  fault_cov_bench #(.HAS_IO_FF(1'b1)) u_ff (
    .clk (clk), .finished (fin_ff), .n_checks (chk_ff), .n_fail (fail_ff)
  );
  fault_cov_bench #(.HAS_IO_FF(1'b0)) u_nff (
    .clk (clk), .finished (fin_nff), .n_checks (chk_nff), .n_fail (fail_nff)
  );

  initial begin
    wait (fin_ff && fin_nff);
    $display("TB_RESULT checks=%0d failures=%0d", chk_ff + chk_nff, fail_ff + fail_nff);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk_ff + chk_nff, fail_ff + fail_nff + 1);
    $finish;
  end
endmodule
