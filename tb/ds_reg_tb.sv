// ds_reg_tb: self-checking test of the double-sampling register.
// Random data with random capture enables and random timing violations
// (main sample != shadow sample). Checks that a clean capture appears on q
// with no error, that a violation shows the wrong value with error=1 for
// exactly one cycle, and that q then holds the correct (shadow) value.
module ds_reg_tb;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d_main = '0, d_shadow = '0, q;
  logic error;
  int checks = 0, failures = 0, violations = 0, recoveries = 0;

  ds_reg #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] exp_q, logic exp_err, string what);
    checks++;
    if (q !== exp_q || error !== exp_err) begin
      failures++;
      $display("FAIL %s: q=%h err=%b expected q=%h err=%b", what, q, error, exp_q, exp_err);
    end
  endtask

  initial begin
    logic [W-1:0] good, last_q;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check('0, 1'b0, "reset");
    last_q = '0;
    for (int i = 0; i < 2000; i++) begin
      good     = W'($urandom);
      en       = ($urandom_range(0, 3) != 0);
      d_shadow = good;
      d_main   = ($urandom_range(0, 4) == 0) ? good ^ W'($urandom_range(1, 65535)) : good;
      @(negedge clk);
      if (!en) begin
        check(last_q, 1'b0, "hold");
      end else if (d_main != d_shadow) begin
        violations++;
        check(d_main, 1'b1, "violation visible");
        // the register must now ignore its inputs and recover
        en = 1; d_main = ~good; d_shadow = ~good;
        @(negedge clk);
        check(good, 1'b0, "recovered from shadow");
        recoveries++;
        last_q = good;
        continue;
      end else begin
        check(good, 1'b0, "clean capture");
      end
      if (en) last_q = good;
    end
    if (violations == 0 || recoveries == 0) begin
      failures++;
      $display("FAIL: no violation exercised");
    end
    $display("violations=%0d recoveries=%0d", violations, recoveries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
