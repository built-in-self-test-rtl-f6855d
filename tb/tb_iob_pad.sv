// Self-checking testbench of the iob_pad behavioural model: every combination
// of outside driver, output driver, enable and pulls, with the analog setting
// bits randomised, against the expected pad level.
module tb_iob_pad;
  logic dout, oe, pull_up, pull_dn, schmitt, ttl, ext_oe, ext_val, din, level;
  logic [1:0] drive, delay;
  int checks = 0, failures = 0;
  logic exp_level;

  iob_pad dut (.dout, .oe, .pull_up, .pull_dn, .drive, .delay, .schmitt, .ttl,
               .ext_oe, .ext_val, .din, .level);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      for (int r = 0; r < 4; r++) begin
        {ext_oe, ext_val, oe, dout, pull_up, pull_dn} = 6'(v);
        drive = 2'($urandom % 3); delay = 2'($urandom); schmitt = 1'($urandom); ttl = 1'($urandom);
        #1;
        case (1'b1)
          ext_oe:  exp_level = ext_val;
          oe:      exp_level = dout;
          pull_dn: exp_level = 1'b0;
          pull_up: exp_level = 1'b1;
          default: exp_level = 1'b0;
        endcase
        checks++;
        if (level !== exp_level || din !== exp_level) begin
          failures++;
          $display("FAIL: v=%b level=%b din=%b exp=%b", 6'(v), level, din, exp_level);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
