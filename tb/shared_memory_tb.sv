// shared_memory_tb: self-checking test of the multi-ported shared memory.
// Random reads and writes on every port each cycle, compared with an array
// model, including same-word writes from several ports (highest port wins)
// and address wrap-around.
module shared_memory_tb;
  localparam int P = 9, W = 4096, X = 32;
  logic clk = 0;
  logic [P-1:0] we = '0;
  logic [P-1:0][X-1:0] addr = '0, wdata = '0, rdata;
  logic [X-1:0] model [W];
  int checks = 0, failures = 0, collisions = 0;

  shared_memory #(.NPORTS(P), .WORDS(W), .XLEN(X)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise through port 0, one word per cycle
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = '0; we[0] = 1; addr[0] = i; wdata[0] = i * 32'h9E37_79B9;
      model[i] = wdata[0];
    end
    @(negedge clk);
    we = '0;
    for (int i = 0; i < 3000; i++) begin
      // random traffic in a small window so that ports collide
      for (int p = 0; p < P; p++) begin
        we[p]    = ($urandom_range(0, 2) == 0);
        addr[p]  = (i % 50 == 0) ? 32'(W + p) : $urandom_range(0, 31);
        wdata[p] = $urandom;
      end
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (rdata[p] !== model[addr[p] % W]) begin
          failures++;
          $display("FAIL read port %0d addr %0d: %h expected %h", p, addr[p], rdata[p],
                   model[addr[p] % W]);
        end
      end
      for (int p = 0; p < P; p++)
        for (int q = p + 1; q < P; q++)
          if (we[p] && we[q] && addr[p] % W == addr[q] % W) collisions++;
      for (int p = 0; p < P; p++) if (we[p]) model[addr[p] % W] = wdata[p];
      @(negedge clk);
    end
    we = '0;
    if (collisions == 0) begin
      failures++;
      $display("FAIL: no write collision exercised");
    end
    $display("collisions=%0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
