// throughput_bench: throughput of a DPSP core on a compute-bound kernel
// (a long block of independent-lane arithmetic, no memory operations) under
// random timing violations, for a core of L lanes (a parameterized bench
// instantiated by compute_bound_tb; it reports through its ports).
//
// For each violation probability p (per lane, per operation) the test runs
// the kernel, measures the throughput of the arithmetic block in thread-
// group operations per cycle per lane, and checks the final registers
// (dumped to shared memory) against the instruction-level model. With lane
// decoupling each violation costs only its own lane one cycle, so the core
// should behave like a single scalar pipeline with the same error rate,
// throughput ~ 1 / (1 + p); lanes in lock-step would all lose a cycle
// whenever any of the L lanes errs, throughput ~ 1 / (1 + 1 - (1 - p)^L).
// Checks: exactly 1 operation per cycle without violations; with violations
// the measured throughput lies within 0.05 below the scalar estimate and
// well above the lock-step estimate.
module throughput_bench #(
  parameter int L = 8   // lanes of the core under test
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import dpsp_pkg::*;
  import dpsp_model::*;
  localparam int R = 4, T = L * R, NALU = 220;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0, start = 0, busy, done, host_we = 0;
  logic [7:0] prog_addr = 0;
  instr_t prog_wdata = '0;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic [L-1:0] timing_err_inject = '0, lane_err_stall, lane_op_issue;
  logic [L-1:0][2:0] lane_q_count;
  logic seq_stall_full, seq_stall_sync, seq_barrier, seq_mem_sync;

  dpsp_core #(.LANES(L)) dut (.*);

  always #5 clk = ~clk;

  instr_t prog [$];
  logic [31:0] mm [] = new[1024];
  logic [31:0] regs [T][16];
  longint cyc = 0, issued [L], t_first, t_done;
  int perm;   // permille violation probability of the current run

  always @(posedge clk) begin
    automatic bit all_done = 1;
    cyc <= cyc + 1;
    for (int l = 0; l < L; l++) begin
      if (lane_op_issue[l]) begin
        if (issued[l] == 0 && l == 0) t_first = cyc;
        issued[l]++;
      end
      if (issued[l] < R * (NALU + 3)) all_done = 0;
    end
    if (all_done && t_done < 0) t_done = cyc;
  end


  task automatic run(int permille);
    real thr, scal, lock;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[n]) begin
      prog_we = 1; prog_addr = 8'(n); prog_wdata = prog[n];
      @(negedge clk);
    end
    prog_we = 0;
    foreach (issued[l]) issued[l] = 0;
    t_first = -1; t_done = -1;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      for (int l = 0; l < L; l++) timing_err_inject[l] = ($urandom_range(0, 999) < permille);
      @(negedge clk);
    end
    timing_err_inject = '0;
    // registers 1..15 dumped to words 16*tid + r
    for (int t = 0; t < T; t++)
      for (int r = 1; r < 16; r++) begin
        host_addr = 16 * t + r;
        #1;
        checks++;
        if (host_rdata !== mm[16 * t + r]) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d/1000: thread %0d r%0d = %h expected %h",
                                      permille, t, r, host_rdata, mm[16 * t + r]);
        end
      end
    thr  = real'(R * (NALU + 3)) / real'(t_done - t_first + 1);
    scal = 1.0 / (1.0 + permille / 1000.0);
    lock = 1.0 / (2.0 - (1.0 - permille / 1000.0) ** L);
    $display("%0d lanes: p=%0.3f throughput=%0.3f scalar-pipeline estimate=%0.3f lock-step estimate=%0.3f",
             L, permille / 1000.0, thr, scal, lock);
    checks++;
    if (permille == 0) begin
      if (t_done - t_first + 1 != R * (NALU + 3)) begin
        failures++; $display("FAIL: %0d cycles for %0d operations", t_done - t_first + 1, R * (NALU + 3));
      end
    end else if (!(thr > scal - 0.05 && thr <= scal + 0.01 && thr > lock + 0.5 * (scal - lock))) begin
      failures++; $display("FAIL: throughput %0.3f outside the expected range", thr);
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    prog.push_back(mk(OP_TID, 1, 0, 0, 0));
    prog.push_back(mk(OP_ADDI, 14, 0, 0, 4));
    prog.push_back(mk(OP_SHL, 2, 1, 14, 0));    // r2 = 16 * tid
    for (int n = 0; n < NALU; n++) prog.push_back(rand_alu(3, 13));
    for (int r = 1; r < 16; r++) prog.push_back(mk(OP_ST, 0, 2, 4'(r), 16'(r)));
    prog.push_back(mk(OP_HALT, 0, 0, 0, 0));
    foreach (regs[t, r]) regs[t][r] = '0;
    foreach (mm[a]) mm[a] = '0;
    foreach (prog[n])
      for (int t = 0; t < T; t++) step(prog[n], t, regs[t], mm);
    run(0);
    run(20);
    run(50);
    run(100);
    finished = 1;
  end
endmodule
