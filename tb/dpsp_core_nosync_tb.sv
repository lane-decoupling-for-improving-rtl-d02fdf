// dpsp_core_nosync_tb: end-to-end test of the DPSP core with SYNC_ON_MEM=0,
// where only barriers synchronise the lanes and loads and stores are issued
// without draining them first.
//
// Same program, model comparison and three runs (no violations, violations
// in every lane, violations in one lane) as dpsp_core_tb. The program only
// communicates between threads across its barrier, so the results must be
// the same as with synchronised memory operations. The test fails if a
// memory operation is ever synchronised, if lanes never slip, or if the
// barrier, full-queue stalls, synchronisation stalls or recoveries never
// happen.
module dpsp_core_nosync_tb;
  import dpsp_pkg::*;
  import dpsp_model::*;
  localparam int L = 8, R = 4, T = L * R, MW = 1024;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0, start = 0, busy, done, host_we = 0;
  logic [7:0] prog_addr = 0;
  instr_t prog_wdata = '0;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic [L-1:0] timing_err_inject = '0, lane_err_stall, lane_op_issue;
  logic [L-1:0][2:0] lane_q_count;
  logic seq_stall_full, seq_stall_sync, seq_barrier, seq_mem_sync;

  dpsp_core #(.SYNC_ON_MEM(1'b0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [$];
  logic [31:0] mm [] = new[MW];
  logic [31:0] init_mem [MW];
  logic [31:0] regs [T][16];
  int n_instr;

  // per-run event counters
  longint cycles, n_err, n_full, n_sync, n_bar, n_msync, n_slip;
  longint lane_err [L], issued [L];
  bit counting = 0;

  always @(posedge clk) if (counting) begin
    cycles++;
    if (seq_stall_full) n_full++;
    if (seq_stall_sync) n_sync++;
    if (seq_barrier) n_bar++;
    if (seq_mem_sync) n_msync++;
    for (int l = 0; l < L; l++) begin
      if (lane_err_stall[l]) begin n_err++; lane_err[l]++; end
      if (lane_op_issue[l]) issued[l]++;
    end
    for (int l = 1; l < L; l++)
      if (lane_q_count[l] != lane_q_count[0]) begin n_slip++; break; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build_program();
    prog.push_back(mk(OP_TID, 1, 0, 0, 0));
    prog.push_back(mk(OP_ADDI, 14, 0, 0, 4));
    prog.push_back(mk(OP_SHL, 2, 1, 14, 0));        // r2 = 16 * tid
    prog.push_back(mk(OP_MUL, 3, 1, 1, 0));
    prog.push_back(mk(OP_ADDI, 3, 3, 0, 7));        // r3 = tid^2 + 7
    prog.push_back(mk(OP_ST, 0, 1, 3, 0));          // smem[tid] = r3
    prog.push_back(mk(OP_BAR, 0, 0, 0, 0));
    prog.push_back(mk(OP_ADDI, 4, 1, 0, 1));
    prog.push_back(mk(OP_ADDI, 6, 0, 0, 31));
    prog.push_back(mk(OP_AND, 5, 4, 6, 0));         // r5 = (tid + 1) % 32
    prog.push_back(mk(OP_LD, 7, 5, 0, 0));          // neighbour's value
    prog.push_back(mk(OP_XOR, 8, 7, 3, 0));
    for (int n = 0; n < 60; n++) begin
      int k;
      k = $urandom_range(0, 11);
      if (k == 0)      prog.push_back(mk(OP_ST, 0, 2, 4'($urandom_range(3, 13)), 16'(512 + $urandom_range(0, 15))));
      else if (k == 1) prog.push_back(mk(OP_LD, 4'($urandom_range(8, 13)), 2, 0, 16'(512 + $urandom_range(0, 15))));
      else             prog.push_back(rand_alu(8, 13));
    end
    for (int r = 0; r < 16; r++) prog.push_back(mk(OP_ST, 0, 2, 4'(r), 16'(512 + r)));
    prog.push_back(mk(OP_HALT, 0, 0, 0, 0));
    n_instr = 0;
    foreach (prog[n]) if (!(prog[n].op inside {OP_BAR, OP_HALT})) n_instr++;
  endtask

  task automatic run_model();
    foreach (regs[t, r]) regs[t][r] = '0;
    for (int a = 0; a < MW; a++) mm[a] = init_mem[a];
    foreach (prog[n])
      for (int t = 0; t < T; t++) step(prog[n], t, regs[t], mm);
  endtask

  // inj_mode 0: none, 1: every lane 1 in 16 cycles, 2: lane 5 only, 1 in 4 cycles
  task automatic run_core(int inj_mode, string name);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[n]) begin
      prog_we = 1; prog_addr = 8'(n); prog_wdata = prog[n];
      @(negedge clk);
    end
    prog_we = 0;
    for (int a = 0; a < MW; a++) begin
      host_we = 1; host_addr = a; host_wdata = init_mem[a];
      @(negedge clk);
    end
    host_we = 0;
    cycles = 0; n_err = 0; n_full = 0; n_sync = 0; n_bar = 0; n_msync = 0; n_slip = 0;
    foreach (lane_err[l]) begin lane_err[l] = 0; issued[l] = 0; end
    start = 1;
    counting = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      for (int l = 0; l < L; l++)
        case (inj_mode)
          1: timing_err_inject[l] = ($urandom_range(0, 15) == 0);
          2: timing_err_inject[l] = (l == 5) && ($urandom_range(0, 3) == 0);
          default: timing_err_inject[l] = 1'b0;
        endcase
      @(negedge clk);
    end
    counting = 0;
    timing_err_inject = '0;
    // compare the shared memory with the model
    for (int a = 0; a < MW; a++) begin
      host_addr = a;
      #1;
      checks++;
      if (host_rdata !== mm[a]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: smem[%0d]=%h expected %h", name, a, host_rdata, mm[a]);
      end
    end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (issued[l] != R * n_instr) begin
        failures++; $display("FAIL %s: lane %0d issued %0d ops, expected %0d", name, l, issued[l], R * n_instr);
      end
    end
    $display("%s: cycles=%0d recoveries=%0d slip_cycles=%0d full_stalls=%0d sync_stalls=%0d barriers=%0d mem_syncs=%0d",
             name, cycles, n_err, n_slip, n_full, n_sync, n_bar, n_msync);
  endtask

  initial begin
    longint t0, t1, s1, tot_err = 0, tot_slip = 0, tot_full = 0, tot_sync = 0, tot_bar = 0, tot_msync = 0;
    build_program();
    for (int a = 0; a < MW; a++) init_mem[a] = $urandom;
    run_model();

    run_core(0, "no violations");
    t0 = cycles;
    tot_full += n_full; tot_sync += n_sync; tot_bar += n_bar; tot_msync += n_msync;
    checks++;
    if (n_err != 0) begin failures++; $display("FAIL: recovery without a violation"); end

    run_core(1, "violations in all lanes");
    t1 = cycles; s1 = n_err;
    tot_err += n_err; tot_slip += n_slip; tot_full += n_full; tot_sync += n_sync;
    tot_bar += n_bar; tot_msync += n_msync;
    checks++;
    if (!(t1 > t0 && t1 - t0 < s1)) begin
      failures++;
      $display("FAIL: slowdown %0d cycles for %0d recoveries (decoupling expected to hide some)", t1 - t0, s1);
    end
    $display("slowdown %0d cycles for %0d recoveries spread over %0d lanes", t1 - t0, s1, L);

    run_core(2, "violations in lane 5");
    tot_err += n_err; tot_slip += n_slip; tot_full += n_full; tot_sync += n_sync;
    tot_bar += n_bar; tot_msync += n_msync;

    checks++;
    if (tot_err == 0 || tot_slip == 0 || tot_full == 0 || tot_sync == 0 || tot_bar == 0 || tot_msync != 0) begin
      failures++;
      $display("FAIL: a mechanism never happened: recoveries=%0d slip=%0d full=%0d sync=%0d barrier=%0d memsync=%0d",
               tot_err, tot_slip, tot_full, tot_sync, tot_bar, tot_msync);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
