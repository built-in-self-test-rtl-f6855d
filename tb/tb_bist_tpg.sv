// Self-checking testbench of bist_tpg: compares the counter against an
// independent count, checks that route/ff_rst are its low bits and MSB, that
// a low enable holds the count, and that the reset pattern repeats every
// 64 clocks (one full count of the 6-bit generator).
module tb_bist_tpg;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [5:0] count;
  logic [4:0] route;
  logic       ff_rst;
  int checks = 0, failures = 0;
  int model, last_rise, rises;
  logic prev_rst;

  bist_tpg #(.WIDTH(6)) dut (.clk, .rst_n, .en, .count, .route, .ff_rst);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0; rises = 0; last_rise = -1; prev_rst = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(count == 6'd0, "reset value");
    rst_n = 1'b1; en = 1'b1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(posedge clk);
      #1;
      if (cyc % 37 == 36) begin
        // hold for a few cycles with en low
        en = 1'b0;
        repeat (3) @(posedge clk);
        #1 check(count == 6'(model + 1), "hold with en low");
        en = 1'b1;
      end
      model = (model + 1) % 64;
      check(count == 6'(model), $sformatf("count %0d vs %0d", count, model));
      check(route == count[4:0] && ff_rst == count[5], "route/ff_rst split");
    end
    // period of the reset pattern, free-running
    prev_rst = ff_rst;
    en = 1'b1;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(posedge clk);
      #1;
      if (ff_rst && !prev_rst) begin
        if (last_rise >= 0) check(cyc - last_rise == 64, "reset pattern period 64");
        last_rise = cyc;
        rises++;
      end
      prev_rst = ff_rst;
    end
    check(rises >= 3, "reset pattern rises");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
