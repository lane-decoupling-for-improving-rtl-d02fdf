// lane_regfile_tb: self-checking test of the lane register file. Random
// writes to random (group, register) pairs with random reads on both ports,
// compared with an array model; checks reset to zero and that a write is
// visible in the cycle after its edge.
module lane_regfile_tb;
  localparam int R = 4, N = 16, X = 32;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] grp = 0, wgrp = 0;
  logic [3:0] ra1 = 0, ra2 = 0, wa = 0;
  logic [X-1:0] rd1, rd2, wd = 0;
  logic [X-1:0] model [R][N];
  int checks = 0, failures = 0;

  lane_regfile #(.REPEAT(R), .NREGS(N), .XLEN(X)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (rd1 !== model[grp][ra1] || rd2 !== model[grp][ra2]) begin
      failures++;
      $display("FAIL %s: g=%0d r%0d=%h r%0d=%h expected %h %h", what, grp, ra1, rd1,
               ra2, rd2, model[grp][ra1], model[grp][ra2]);
    end
  endtask

  initial begin
    foreach (model[g, r]) model[g][r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < R; g++)
      for (int r = 0; r < N; r++) begin
        grp = 2'(g); ra1 = 4'(r); ra2 = 4'(N - 1 - r);
        #1 compare("reset value");
      end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wgrp = 2'($urandom); wa = 4'($urandom); wd = $urandom;
      @(posedge clk);
      #1;
      if (we) model[wgrp][wa] = wd;
      we = 0;
      // read back the just-written location on port 1, a random one on port 2
      grp = wgrp; ra1 = wa; ra2 = 4'($urandom);
      #1 compare("read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
