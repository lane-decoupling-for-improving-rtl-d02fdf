// dpsp_core: a decoupled parallel SIMD pipeline (DPSP) core.
//
// One sequencer issues a single instruction stream to LANES lanes. Between
// the sequencer and each lane sits a shallow FIFO, the decoupling queue, in
// place of the usual lock-step pipeline latch. Every lane captures its ALU
// result in a double-sampling register; a detected timing violation stalls
// only that lane for one cycle while it restarts from the shadow sample. The
// other lanes and the sequencer continue, so the lanes may slip apart by up
// to QDEPTH instructions; only a full queue stalls the sequencer. Barriers,
// and by default every load and store, make the sequencer wait until all
// lanes have drained, so lanes meet again before they can communicate
// through the shared memory.
//
// Default sizes: 8 lanes, each warp instruction repeated for 4 thread groups
// (a 32-thread warp), 4-entry queues, 16 KB shared memory (4096 x 32 bits),
// 32-bit datapath -- the configuration the design was evaluated in. The
// instruction set (dpsp_pkg), the 256-word instruction memory, the host
// ports and the event outputs are this design's own.
//
// Interface:
//   prog_*      write the instruction memory while not busy
//   host_*      read/write the shared memory (an extra port; combinational
//               read) -- intended for use while not busy
//   start/busy/done   run the program from address 0 until HALT
//   timing_err_inject[l]  stands in for a late ALU result in lane l (see
//               simd_lane); it has no effect in cycles where the lane's EX
//               stage holds no operation
//   lane_*, seq_*   one-cycle event pulses and queue occupancies for
//               performance counting
module dpsp_core
  import dpsp_pkg::*;
#(
  parameter int unsigned LANES       = 8,
  parameter int unsigned REPEAT      = 4,
  parameter int unsigned QDEPTH      = 4,
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter int unsigned SMEM_WORDS  = 4096,
  parameter bit          SYNC_ON_MEM = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_wdata,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  input  logic                          host_we,
  input  logic [XLEN-1:0]               host_addr,
  input  logic [XLEN-1:0]               host_wdata,
  output logic [XLEN-1:0]               host_rdata,
  input  logic [LANES-1:0]              timing_err_inject,
  output logic [LANES-1:0]              lane_err_stall,
  output logic [LANES-1:0]              lane_op_issue,
  output logic [LANES-1:0][$clog2(QDEPTH+1)-1:0] lane_q_count,
  output logic                          seq_stall_full,
  output logic                          seq_stall_sync,
  output logic                          seq_barrier,
  output logic                          seq_mem_sync
);

  logic [LANES-1:0] lane_full, lane_idle;
  logic             push;
  instr_t           instr;

  logic [LANES:0]           sm_we;
  logic [LANES:0][XLEN-1:0] sm_addr, sm_wdata, sm_rdata;

  sequencer #(
    .LANES(LANES), .IMEM_DEPTH(IMEM_DEPTH), .SYNC_ON_MEM(SYNC_ON_MEM)
  ) u_seq (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_wdata,
    .start, .busy, .done,
    .lane_full, .lane_idle,
    .push, .instr,
    .ev_stall_full(seq_stall_full),
    .ev_stall_sync(seq_stall_sync),
    .ev_barrier   (seq_barrier),
    .ev_mem_sync  (seq_mem_sync)
  );

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane
    simd_lane #(
      .LANES(LANES), .LANE_ID(l), .REPEAT(REPEAT), .QDEPTH(QDEPTH)
    ) u_lane (
      .clk, .rst_n,
      .q_push           (push),
      .q_wdata          (instr),
      .q_full           (lane_full[l]),
      .idle             (lane_idle[l]),
      .timing_err_inject(timing_err_inject[l]),
      .mem_we           (sm_we[l]),
      .mem_addr         (sm_addr[l]),
      .mem_wdata        (sm_wdata[l]),
      .mem_rdata        (sm_rdata[l]),
      .err_stall        (lane_err_stall[l]),
      .op_issue         (lane_op_issue[l]),
      .q_count          (lane_q_count[l])
    );
  end

  assign sm_we[LANES]    = host_we;
  assign sm_addr[LANES]  = host_addr;
  assign sm_wdata[LANES] = host_wdata;
  assign host_rdata      = sm_rdata[LANES];

  shared_memory #(
    .NPORTS(LANES + 1), .WORDS(SMEM_WORDS), .XLEN(XLEN)
  ) u_smem (
    .clk,
    .we   (sm_we),
    .addr (sm_addr),
    .wdata(sm_wdata),
    .rdata(sm_rdata)
  );

endmodule
