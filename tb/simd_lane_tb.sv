// simd_lane_tb: self-checking test of one decoupled lane (lane 3 of 8).
// A random program (ALU operations, loads and stores, then a dump of every
// thread register to memory) is fed through the lane's queue whenever it is
// not full, while timing violations are injected at random in the EX stage.
// The final memory is compared with the instruction-level model run for the
// lane's four threads in program order. Also checks that every injected
// violation costs exactly one cycle: the span between the first and the last
// operation issue is 4 * instructions - 1 + recovery cycles, and that no
// recovery stall ever lasts longer than one cycle.
module simd_lane_tb;
  import dpsp_pkg::*;
  import dpsp_model::*;
  localparam int LANES = 8, ID = 3, R = 4, MW = 1024;

  logic clk = 0, rst_n = 0;
  logic q_push = 0, q_full, idle, inj = 0;
  instr_t q_wdata = '0;
  logic mem_we, err_stall, op_issue;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [2:0] q_count;
  logic [31:0] tbmem [MW];
  logic [31:0] mm [] = new[MW];
  logic [31:0] regs [R][16];
  instr_t prog [$];
  int checks = 0, failures = 0, span_recov;
  longint err_at [$];
  longint cyc = 0, first_issue = -1, last_issue = -1, issues = 0, recov = 0;

  simd_lane #(.LANES(LANES), .LANE_ID(ID), .REPEAT(R), .QDEPTH(4)) dut (
    .clk, .rst_n, .q_push, .q_wdata, .q_full, .idle, .timing_err_inject(inj),
    .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .err_stall, .op_issue, .q_count);

  always #5 clk = ~clk;
  assign mem_rdata = tbmem[mem_addr % MW];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mem_we) tbmem[mem_addr % MW] <= mem_wdata;
    if (op_issue) begin
      if (first_issue < 0) first_issue = cyc;
      last_issue = cyc;
      issues++;
    end
    if (err_stall) begin recov++; err_at.push_back(cyc); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // program
    prog.push_back(mk(OP_TID, 1, 0, 0, 0));
    prog.push_back(mk(OP_ADDI, 14, 0, 0, 4));
    prog.push_back(mk(OP_SHL, 2, 1, 14, 0));          // r2 = tid * 16
    for (int n = 0; n < 150; n++) begin
      int k;
      k = $urandom_range(0, 9);
      if (k == 0)      prog.push_back(mk(OP_ST, 0, 2, 4'($urandom_range(3, 15)), 16'($urandom_range(0, 15))));
      else if (k == 1) prog.push_back(mk(OP_LD, 4'($urandom_range(3, 15)), 2, 0, 16'($urandom_range(0, 15))));
      else if (k == 2) prog.push_back(mk(OP_ST, 0, 0, 4'($urandom_range(3, 15)), 16'(512 + $urandom_range(0, 3))));
      else if (k == 3) prog.push_back(mk(OP_LD, 4'($urandom_range(3, 15)), 0, 0, 16'(512 + $urandom_range(0, 3))));
      else             prog.push_back(rand_alu(3, 15));
    end
    for (int r = 0; r < 16; r++) prog.push_back(mk(OP_ST, 0, 2, 4'(r), 16'(r)));

    for (int a = 0; a < MW; a++) begin
      tbmem[a] = a * 32'h0101_0101;
      mm[a]    = tbmem[a];
    end
    foreach (regs[g, r]) regs[g][r] = '0;
    foreach (prog[n])
      for (int g = 0; g < R; g++) step(prog[n], g * LANES + ID, regs[g], mm);

    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (!idle) begin failures++; $display("FAIL: not idle after reset"); end
    fork
      begin
        foreach (prog[n]) begin
          q_wdata = prog[n];
          q_push  = 1;
          @(negedge clk);
          while (q_full) begin
            q_push = 0;
            @(negedge clk);
            q_push = 1;
          end
        end
        // the push above went in at the last edge
        q_push = 0;
      end
      begin
        while (1) begin
          @(negedge clk);
          inj = ($urandom_range(0, 9) == 0);
        end
      end
      begin
        forever begin
          @(negedge clk);
          if (err_stall) begin
            @(negedge clk);
            checks++;
            if (err_stall) begin failures++; $display("FAIL: 2-cycle stall"); end
          end
        end
      end
    join_any
    @(negedge clk);
    while (!idle) @(negedge clk);
    inj = 0;
    repeat (4) @(negedge clk);
    disable fork;

    for (int a = 0; a < MW; a++) begin
      checks++;
      if (tbmem[a] !== mm[a]) begin
        failures++;
        if (failures < 10) $display("FAIL mem[%0d]=%h expected %h", a, tbmem[a], mm[a]);
      end
    end
    checks++;
    if (issues != R * prog.size()) begin
      failures++; $display("FAIL: %0d issues, expected %0d", issues, R * prog.size());
    end
    // recoveries after the last issue (the final operations) do not delay it
    span_recov = 0;
    foreach (err_at[k]) if (err_at[k] > first_issue && err_at[k] < last_issue) span_recov++;
    checks++;
    if (last_issue - first_issue != R * prog.size() - 1 + span_recov) begin
      failures++;
      $display("FAIL: issue span %0d, expected %0d (recoveries %0d)", last_issue - first_issue,
               R * prog.size() - 1 + span_recov, recov);
    end
    checks++;
    if (recov == 0) begin failures++; $display("FAIL: no recovery exercised"); end
    $display("instructions=%0d recoveries=%0d span=%0d", prog.size(), recov,
             last_issue - first_issue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
