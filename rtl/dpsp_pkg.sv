// dpsp_pkg: types and constants shared by the decoupled parallel SIMD
// pipeline (DPSP) core.
//
// The core runs one warp of THREADS = LANES * REPEAT threads on LANES SIMD
// lanes; every warp instruction is executed REPEAT times by each lane, once
// per thread group. The lane count (8), the repeat factor (4), the 32-bit
// datapath and the 4-entry decoupling queue follow the evaluated GPU
// configuration. The instruction set below is this design's own: the
// architecture only needs arithmetic, shared-memory loads and stores and a
// barrier, so a minimal register-register ISA with a 16-bit immediate is used.
//
// Instruction word (32 bits, the width of one decoupling-queue entry):
//   [31:28] opcode   [27:24] rd   [23:20] rs1   [19:16] rs2   [15:0] imm
package dpsp_pkg;

  localparam int unsigned XLEN  = 32;  // datapath and instruction width
  localparam int unsigned NREGS = 16;  // architectural registers per thread

  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_ADD  = 4'h1,  // rd = rs1 + rs2
    OP_SUB  = 4'h2,  // rd = rs1 - rs2
    OP_MUL  = 4'h3,  // rd = rs1[15:0] * rs2[15:0] (16x16 -> 32, unsigned)
    OP_AND  = 4'h4,
    OP_OR   = 4'h5,
    OP_XOR  = 4'h6,
    OP_SHL  = 4'h7,  // rd = rs1 << rs2[4:0]
    OP_SHR  = 4'h8,  // rd = rs1 >> rs2[4:0] (logical)
    OP_ADDI = 4'h9,  // rd = rs1 + sext(imm)
    OP_TID  = 4'hA,  // rd = thread id + sext(imm)
    OP_LD   = 4'hB,  // rd = smem[rs1 + sext(imm)]
    OP_ST   = 4'hC,  // smem[rs1 + sext(imm)] = rs2
    OP_BAR  = 4'hD,  // barrier: sequencer waits until every lane has drained
    OP_HALT = 4'hF   // end of program
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  rd;
    logic [3:0]  rs1;
    logic [3:0]  rs2;
    logic [15:0] imm;
  } instr_t;

  function automatic logic writes_rd(opcode_e op);
    return !(op inside {OP_NOP, OP_ST, OP_BAR, OP_HALT});
  endfunction

  function automatic logic is_mem(opcode_e op);
    return op inside {OP_LD, OP_ST};
  endfunction

  // Helpers to assemble instruction words (used by testbenches).
  function automatic instr_t mk(opcode_e op, logic [3:0] rd, logic [3:0] rs1,
                                logic [3:0] rs2, logic [15:0] imm);
    instr_t i;
    i.op  = op;
    i.rd  = rd;
    i.rs1 = rs1;
    i.rs2 = rs2;
    i.imm = imm;
    return i;
  endfunction

endpackage
