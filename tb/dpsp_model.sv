// dpsp_model: instruction-level reference model of the DPSP instruction set,
// used by the testbenches. It executes one instruction for one thread on a
// register array and a word-addressed memory, independently of the RTL.
package dpsp_model;
  import dpsp_pkg::*;

  function automatic logic [31:0] sext16(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  // Executes 'i' for thread 'tid'. regs is that thread's register set, mem
  // the memory (addresses wrap modulo its size).
  function automatic void step(input instr_t i, input int tid,
                               ref logic [31:0] regs [16], ref logic [31:0] mem []);
    logic [31:0] a = regs[i.rs1], b = regs[i.rs2], r = '0, ea;
    int unsigned sz = mem.size();
    ea = a + sext16(i.imm);
    case (i.op)
      OP_ADD:  r = a + b;
      OP_SUB:  r = a - b;
      OP_MUL:  r = 32'(a[15:0]) * 32'(b[15:0]);
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_SHL:  r = a << b[4:0];
      OP_SHR:  r = a >> b[4:0];
      OP_ADDI: r = ea;
      OP_TID:  r = 32'(tid) + sext16(i.imm);
      OP_LD:   r = mem[ea % sz];
      OP_ST:   mem[ea % sz] = b;
      default: ;
    endcase
    if (writes_rd(i.op)) regs[i.rd] = r;
  endfunction

  // A random ALU instruction writing one of rd_lo..rd_hi.
  function automatic instr_t rand_alu(int rd_lo, int rd_hi);
    opcode_e ops[] = '{OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
                       OP_ADDI, OP_TID};
    return mk(ops[$urandom_range(0, ops.size() - 1)], 4'($urandom_range(rd_lo, rd_hi)),
              4'($urandom), 4'($urandom), 16'($urandom));
  endfunction
endpackage
