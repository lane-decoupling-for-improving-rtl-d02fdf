// sequencer: the single instruction sequencer that feeds all lanes.
//
// It fetches the warp's program from a small instruction memory and places
// each instruction into every lane's decoupling queue in the same cycle,
// one instruction per cycle. It stalls while any queue is full -- the only
// way a slow lane holds up the others. Lane synchronisation is done here:
//   * BAR: the sequencer stops issuing until every lane is idle (queue empty
//     and pipeline drained up to the memory stage), then moves past the
//     barrier. The barrier is not placed into the queues.
//   * LD/ST with SYNC_ON_MEM=1: the same wait happens before every memory
//     instruction is issued, so all lanes start each memory access together
//     (the "synchronise on every memory operation" variant, the best one in
//     the evaluation, and the default here).
//   * HALT: waits until every lane is idle, then raises 'done'.
// Waiting for the lanes to drain past RF and EX as well, not only for the
// queues to be empty, is this design's own choice: it makes a store that a
// stalled lane still holds reach memory before any lane's load after the
// barrier. The instruction memory, its host write port and the start/done
// handshake are also this design's own.
//
// Timing: 'start' (one cycle, while not busy) begins at address 0. An
// instruction is pushed in the cycle it is fetched if no queue is full.
// 'done' rises the cycle after HALT finds all lanes idle and stays high
// until the next start.
module sequencer
  import dpsp_pkg::*;
#(
  parameter int unsigned LANES       = 8,
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter bit          SYNC_ON_MEM = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load (host)
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_wdata,
  // control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // to and from the lanes
  input  logic [LANES-1:0]              lane_full,
  input  logic [LANES-1:0]              lane_idle,
  output logic                          push,
  output instr_t                        instr,
  // events, one pulse per cycle in which they happen
  output logic                          ev_stall_full,  // a queue was full
  output logic                          ev_stall_sync,  // waiting for lanes to drain
  output logic                          ev_barrier,     // a barrier was passed
  output logic                          ev_mem_sync     // a synchronised memory op was issued
);

  localparam int unsigned PW = $clog2(IMEM_DEPTH);

  instr_t        imem [IMEM_DEPTH];
  logic [PW-1:0] pc;
  logic          any_full, all_idle, advance;
  instr_t        cur;

  always_ff @(posedge clk) begin
    if (prog_we) imem[prog_addr] <= prog_wdata;
  end

  assign cur      = imem[pc];
  assign any_full = |lane_full;
  assign all_idle = &lane_idle;
  assign instr    = cur;

  always_comb begin
    push          = 1'b0;
    advance       = 1'b0;
    ev_stall_full = 1'b0;
    ev_stall_sync = 1'b0;
    ev_barrier    = 1'b0;
    ev_mem_sync   = 1'b0;
    if (busy) begin
      unique case (cur.op)
        OP_BAR: begin
          advance       = all_idle;
          ev_barrier    = all_idle;
          ev_stall_sync = !all_idle;
        end
        OP_HALT: begin
          ev_stall_sync = !all_idle;
        end
        OP_LD, OP_ST: begin
          if (SYNC_ON_MEM) begin
            push          = all_idle;   // an idle lane's queue is empty
            ev_mem_sync   = all_idle;
            ev_stall_sync = !all_idle;
          end else begin
            push          = !any_full;
            ev_stall_full = any_full;
          end
          advance = push;
        end
        default: begin
          push          = !any_full;
          advance       = push;
          ev_stall_full = any_full;
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        pc   <= '0;
        busy <= 1'b1;
        done <= 1'b0;
      end
    end else if (cur.op == OP_HALT) begin
      if (all_idle) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else if (advance) begin
      pc <= pc + 1'b1;
    end
  end

  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                        push |-> !any_full);

endmodule
