// sequencer_tb: self-checking test of the instruction sequencer against
// modelled lanes. Each lane is a 4-entry queue occupancy that drains at a
// random rate followed by a two-cycle pipeline. Checks: the instructions
// pushed are the program without its BAR and HALT; nothing is pushed while a
// queue is full; loads and stores are pushed only when every lane is idle;
// no instruction after a barrier is pushed before every lane has been idle;
// 'done' follows HALT once the lanes are idle; and, with lanes that never
// fill, one instruction is issued per cycle.
module sequencer_tb;
  import dpsp_pkg::*;
  import dpsp_model::*;
  localparam int L = 8, D = 4;

  logic clk = 0, rst_n = 0, prog_we = 0, start = 0, busy, done, push;
  logic [7:0] prog_addr = 0;
  instr_t prog_wdata = '0, instr;
  logic [L-1:0] lane_full, lane_idle, pop_en = '0;
  logic ev_stall_full, ev_stall_sync, ev_barrier, ev_mem_sync;
  int cnt [L], pipe [L];
  int checks = 0, failures = 0;
  int n_full = 0, n_sync = 0, n_bar = 0, n_msync = 0;
  instr_t prog [$], expect_q [$];
  logic seen_idle;
  longint cyc = 0;
  longint push_cyc [$];

  sequencer #(.LANES(L), .IMEM_DEPTH(256), .SYNC_ON_MEM(1'b1)) dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int l = 0; l < L; l++) begin
      lane_full[l] = (cnt[l] == D);
      lane_idle[l] = (cnt[l] == 0) && (pipe[l] == 0);
    end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ev_stall_full) n_full++;
      if (ev_stall_sync) n_sync++;
      if (ev_barrier) n_bar++;
      if (ev_mem_sync) n_msync++;
      if (&lane_idle) seen_idle = 1;
      if (push) begin
        checks++;
        if (|lane_full) begin failures++; $display("FAIL: push while a queue is full"); end
        if (is_mem(instr.op)) begin
          checks++;
          if (!(&lane_idle)) begin failures++; $display("FAIL: memory op pushed before drain"); end
        end
        checks++;
        if (expect_q.size() == 0 || instr !== expect_q[0]) begin
          failures++;
          $display("FAIL: pushed %h, expected %h", instr, expect_q.size() ? expect_q[0] : '0);
        end else if (expect_q[0].rd == 4'hE && !seen_idle) begin
          // instructions tagged rd=14 follow a barrier
          failures++;
          $display("FAIL: instruction after a barrier pushed before all lanes were idle");
        end
        if (expect_q.size()) void'(expect_q.pop_front());
        seen_idle = 0;
        push_cyc.push_back(cyc);
      end
    end
    for (int l = 0; l < L; l++) begin
      automatic int c = cnt[l];
      if (pipe[l] > 0) pipe[l] <= pipe[l] - 1;
      if (pop_en[l] && c > 0) begin c--; pipe[l] <= 2; end
      if (push) c++;
      cnt[l] <= c;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_run(int slow);
    @(negedge clk);
    foreach (prog[n]) begin
      prog_we = 1; prog_addr = 8'(n); prog_wdata = prog[n];
      @(negedge clk);
    end
    prog_we = 0;
    expect_q.delete();
    foreach (prog[n]) if (!(prog[n].op inside {OP_BAR, OP_HALT})) expect_q.push_back(prog[n]);
    push_cyc.delete();
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      for (int l = 0; l < L; l++) pop_en[l] = slow ? ($urandom_range(0, 3) == 0) : 1'b1;
      @(negedge clk);
    end
    checks++;
    if (expect_q.size() != 0 || !(&lane_idle) || busy) begin
      failures++; $display("FAIL: done with %0d instructions left", expect_q.size());
    end
  endtask

  initial begin
    foreach (cnt[l]) begin cnt[l] = 0; pipe[l] = 0; end
    seen_idle = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // run 1: fast lanes, ALU only: one instruction per cycle
    for (int n = 0; n < 20; n++) prog.push_back(rand_alu(1, 13));
    prog.push_back(mk(OP_HALT, 0, 0, 0, 0));
    load_and_run(0);
    checks++;
    if (push_cyc.size() != 20 || push_cyc[19] - push_cyc[0] != 19) begin
      failures++; $display("FAIL: 20 instructions not issued in 20 consecutive cycles");
    end
    // run 2: slow random lanes, barriers and memory operations
    prog.delete();
    for (int n = 0; n < 120; n++) begin
      int k;
      k = $urandom_range(0, 9);
      if (k == 0) begin
        prog.push_back(mk(OP_BAR, 0, 0, 0, 0));
        prog.push_back(mk(OP_ADD, 14, 1, 2, 0));   // tagged: follows a barrier
      end else if (k == 1) prog.push_back(mk(OP_LD, 3, 1, 0, 16'(n)));
      else if (k == 2) prog.push_back(mk(OP_ST, 0, 1, 3, 16'(n)));
      else prog.push_back(rand_alu(1, 13));
    end
    prog.push_back(mk(OP_HALT, 0, 0, 0, 0));
    n_bar = 0; n_msync = 0;
    load_and_run(1);
    begin
      int nb = 0, nm = 0;
      foreach (prog[n]) begin
        if (prog[n].op == OP_BAR) nb++;
        if (is_mem(prog[n].op)) nm++;
      end
      checks++;
      if (n_bar != nb || n_msync != nm || nb == 0 || nm == 0) begin
        failures++; $display("FAIL: barriers %0d/%0d memory syncs %0d/%0d", n_bar, nb, n_msync, nm);
      end
    end
    checks++;
    if (n_full == 0 || n_sync == 0) begin
      failures++; $display("FAIL: full stalls %0d sync stalls %0d", n_full, n_sync);
    end
    $display("full stalls=%0d sync stalls=%0d barriers=%0d mem syncs=%0d", n_full, n_sync, n_bar, n_msync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
