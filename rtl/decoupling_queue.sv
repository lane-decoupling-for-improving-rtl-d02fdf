// decoupling_queue: the per-lane instruction FIFO that replaces the
// pipeline latch between the sequencer and a lane's register-access stage.
//
// The sequencer writes the same instruction into every lane's queue in the
// same cycle; each lane reads its own queue at its own pace, so a lane that
// stalls to recover from a timing error falls behind the others by up to
// DEPTH instructions without holding them up. A full queue in any lane stalls
// the sequencer. Depth 4 and 32-bit entries are the sizes the design is
// evaluated with; the circular-buffer organisation is this design's own.
//
// Interface: push/wdata write at the clock edge when not full; rdata is the
// head entry (valid while !empty) and pop removes it at the clock edge.
// A push and a pop in the same cycle are both performed, even when full
// (the pop frees the slot in the same edge) -- the sequencer nevertheless
// only pushes when every queue is not full. One cycle from push to head.
module decoupling_queue #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rdata = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && full && !pop))
    else $error("decoupling_queue: push into a full queue");

endmodule
