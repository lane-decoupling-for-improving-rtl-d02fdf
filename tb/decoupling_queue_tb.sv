// decoupling_queue_tb: self-checking test of the decoupling FIFO against a
// queue model. Random pushes (only when not full, as the sequencer does)
// and random pops; checks head data, full/empty/count each cycle, that the
// queue fills to exactly DEPTH entries, and the one-cycle push-to-head delay.
module decoupling_queue_tb;
  localparam int W = 32, D = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, fills = 0;
  logic [W-1:0] model [$];

  decoupling_queue #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    if (count != model.size() || empty != (model.size() == 0) ||
        full != (model.size() == D) ||
        (model.size() > 0 && rdata !== model[0])) begin
      failures++;
      $display("FAIL %s: count=%0d empty=%b full=%b head=%h model size=%0d head=%h",
               what, count, empty, full, rdata, model.size(),
               model.size() ? model[0] : '0);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare("after reset");
    // push one word: visible at head after exactly one edge
    push = 1; wdata = 32'hCAFE_0001;
    @(negedge clk);
    push = 0;
    model.push_back(32'hCAFE_0001);
    compare("one-cycle push to head");
    pop = 1;
    @(negedge clk);
    pop = 0;
    void'(model.pop_front());
    compare("pop");
    for (int i = 0; i < 5000; i++) begin
      // biased phases: mostly-push then mostly-pop, so the queue fills and drains
      int bias;
      bias = ((i / 64) % 2) ? 1 : 3;
      push  = !full && ($urandom_range(0, 3) < bias);
      pop   = ($urandom_range(0, 3) >= bias);
      wdata = $urandom;
      @(negedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push) model.push_back(wdata);
      if (model.size() == D) fills++;
      push = 0; pop = 0;
      compare("random");
    end
    if (fills == 0) begin
      failures++;
      $display("FAIL: queue never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
