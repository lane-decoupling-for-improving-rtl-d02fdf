// simd_lane: one decoupled lane of the SIMD pipeline.
//
// Stages: decoupling queue -> RF (register access) -> EX (ALU) -> MEM
// (shared memory) -> WB. The lane reads warp instructions from its own queue
// and executes each one REPEAT times, once for every thread group it holds
// (thread id = group * LANES + LANE_ID), popping the queue after the last
// group. The ALU result is captured in a double-sampling register (ds_reg).
// When that register reports a timing error, only this lane stalls, for one
// cycle: RF and EX hold, the queue is not read, the MEM stage treats the
// wrong value as a bubble (no store, nothing written back) and the register
// reloads the correct shadow sample. Other lanes and the sequencer keep
// running; the queue absorbs the slip. Queue, stage order, lane-local stall
// and single-cycle recovery follow the design; the stage registers, the
// thread-group scheme inside the lane and the instruction set are this
// design's own.
//
// Hazards: with REPEAT >= 4 a thread's next instruction is read at least four
// cycles after the previous one, by which time write-back has completed, so
// no forwarding or interlock is needed (a stall delays the whole lane and
// keeps that spacing).
//
// Timing: an instruction at the queue head is read in cycle t (group 0),
// executes in t+1, accesses memory in t+2 and is written back at the end of
// t+3; each detected timing error adds one cycle. 'timing_err_inject' stands
// in for a late ALU result: when set in a cycle in which EX captures a valid
// operation, the main sample is corrupted (inverted) and the shadow sample is
// correct. 'idle' is high when the queue is empty and no operation is in RF,
// EX or MEM, i.e. everything this lane was given has reached memory.
module simd_lane
  import dpsp_pkg::*;
#(
  parameter int unsigned LANES   = 8,
  parameter int unsigned LANE_ID = 0,
  parameter int unsigned REPEAT  = 4,
  parameter int unsigned QDEPTH  = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the sequencer
  input  logic            q_push,
  input  instr_t          q_wdata,
  output logic            q_full,
  output logic            idle,
  // timing-violation stand-in for the EX stage
  input  logic            timing_err_inject,
  // shared-memory port
  output logic            mem_we,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  input  logic [XLEN-1:0] mem_rdata,
  // events, one pulse per occurrence
  output logic            err_stall,  // cycle lost to error recovery
  output logic            op_issue,   // one thread-group operation read from RF
  output logic [$clog2(QDEPTH+1)-1:0] q_count
);

  localparam int unsigned GW = (REPEAT > 1) ? $clog2(REPEAT) : 1;
  localparam int unsigned RW = $clog2(NREGS);

  if (REPEAT < 4) begin : g_check
    $error("simd_lane: REPEAT must be at least 4 (no forwarding paths)");
  end

  typedef struct packed {
    logic            valid;
    opcode_e         op;
    logic [3:0]      rd;
    logic [GW-1:0]   grp;
    logic [XLEN-1:0] b;      // rs2 value (store data)
  } ctl_t;

  // ---------------- queue
  instr_t head;
  logic   q_empty, q_pop;

  decoupling_queue #(.WIDTH($bits(instr_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .push (q_push),
    .wdata(q_wdata),
    .pop  (q_pop),
    .rdata(head),
    .full (q_full),
    .empty(q_empty),
    .count(q_count)
  );

  logic stall;   // lane-local recovery stall

  // ---------------- RF stage
  logic [GW-1:0]   grp;
  logic [XLEN-1:0] rd1, rd2;
  logic            issue;

  // the sequencer consumes BAR and HALT; anything else is executed
  assign issue    = !q_empty && !stall;
  assign q_pop    = issue && (grp == GW'(REPEAT - 1));
  assign op_issue = issue;

  // RF -> EX register
  ctl_t            rx;
  logic [XLEN-1:0] rx_a;
  logic [15:0]     rx_imm;

  // EX -> MEM
  ctl_t            xm;
  logic [XLEN-1:0] xm_y;
  logic            ex_err;

  // MEM -> WB
  logic            mw_we;
  logic [GW-1:0]   mw_grp;
  logic [3:0]      mw_rd;
  logic [XLEN-1:0] mw_data;

  lane_regfile #(.REPEAT(REPEAT), .NREGS(NREGS), .XLEN(XLEN)) u_rf (
    .clk, .rst_n,
    .grp (grp),
    .ra1 (RW'(head.rs1)),
    .ra2 (RW'(head.rs2)),
    .rd1 (rd1),
    .rd2 (rd2),
    .we  (mw_we),
    .wgrp(mw_grp),
    .wa  (RW'(mw_rd)),
    .wd  (mw_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp    <= '0;
      rx     <= '0;
      rx_a   <= '0;
      rx_imm <= '0;
    end else if (!stall) begin
      rx.valid <= issue;
      if (issue) begin
        rx.op  <= head.op;
        rx.rd  <= head.rd;
        rx.grp <= grp;
        rx.b   <= rd2;
        rx_a   <= rd1;
        rx_imm <= head.imm;
        grp    <= (grp == GW'(REPEAT - 1)) ? '0 : grp + 1'b1;
      end
    end
  end

  // ---------------- EX stage
  logic [XLEN-1:0] alu_y, tid;
  assign tid = XLEN'(rx.grp) * XLEN'(LANES) + XLEN'(LANE_ID);

  lane_alu u_alu (
    .op (rx.op),
    .a  (rx_a),
    .b  (rx.b),
    .imm(rx_imm),
    .tid(tid),
    .y  (alu_y)
  );

  logic inject;
  assign inject = timing_err_inject && rx.valid;

  ds_reg #(.WIDTH(XLEN)) u_ds (
    .clk, .rst_n,
    .en      (!stall),
    .d_main  (inject ? ~alu_y : alu_y),
    .d_shadow(alu_y),
    .q       (xm_y),
    .error   (ex_err)
  );

  assign stall     = ex_err;
  assign err_stall = ex_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      xm <= '0;
    else if (!stall) xm <= rx;
  end

  // ---------------- MEM stage
  logic mem_act;
  assign mem_act   = xm.valid && !stall;
  assign mem_we    = mem_act && (xm.op == OP_ST);
  assign mem_addr  = xm_y;
  assign mem_wdata = xm.b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mw_we   <= 1'b0;
      mw_grp  <= '0;
      mw_rd   <= '0;
      mw_data <= '0;
    end else begin
      mw_we   <= mem_act && writes_rd(xm.op);
      mw_grp  <= xm.grp;
      mw_rd   <= xm.rd;
      mw_data <= (xm.op == OP_LD) ? mem_rdata : xm_y;
    end
  end

  // ---------------- WB stage: the register file write above (mw_*)

  assign idle = q_empty && !rx.valid && !xm.valid;

  // a recovery stall never lasts more than one cycle
  a_single_cycle_recovery: assert property (@(posedge clk) disable iff (!rst_n)
                                            ex_err |=> !ex_err);

endmodule
