// Self-checking testbench of bist_ora: random compare/shift/clear stimulus
// against a reference model of the sticky mismatch flag and the shift path.
module tb_bist_ora;
  logic clk = 1'b0, clr, a, b, shift_mode, shift_data, fail;
  int checks = 0, failures = 0;
  logic model;
  int mism_seen = 0, shifts = 0;

  bist_ora dut (.clk, .clr, .a, .b, .shift_mode, .shift_data, .fail);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; a = 0; b = 0; shift_mode = 0; shift_data = 0;
    @(posedge clk);
    #1 model = 1'b0;
    checks++; if (fail !== 1'b0) begin failures++; $display("FAIL: clear"); end
    clr = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      a = 1'($urandom); b = ($urandom % 4 == 0) ? ~a : a;
      shift_mode = ($urandom % 5 == 0);
      shift_data = 1'($urandom);
      clr = ($urandom % 40 == 0);
      @(posedge clk);
      if (clr) model = 1'b0;
      else if (shift_mode) begin model = shift_data; shifts++; end
      else begin
        if (a != b) mism_seen++;
        model = model | (a ^ b);
      end
      #1;
      checks++;
      if (fail !== model) begin
        failures++;
        $display("FAIL: cycle %0d fail=%b model=%b", i, fail, model);
      end
    end
    checks++; if (mism_seen == 0 || shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
