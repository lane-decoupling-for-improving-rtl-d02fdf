// lane_alu: the execute unit of one SIMD lane (purely combinational).
//
// It computes one operation of the instruction set in dpsp_pkg for one
// thread. Besides the arithmetic and logic operations it forms the effective
// address of loads and stores (rs1 + immediate) and the value of TID (the
// thread's id plus the immediate). The multiplier is 16 x 16 -> 32 bits and
// the adder 32 bits, the widths of the units whose timing errors the design
// was characterised with; the operation set itself is this design's own.
// The result is captured by the lane's double-sampling register, which is
// where a late result from this unit would be detected.
module lane_alu
  import dpsp_pkg::*;
(
  input  opcode_e         op,
  input  logic [XLEN-1:0] a,      // rs1 value
  input  logic [XLEN-1:0] b,      // rs2 value
  input  logic [15:0]     imm,
  input  logic [XLEN-1:0] tid,    // thread id of the operand's thread
  output logic [XLEN-1:0] y
);

  logic [XLEN-1:0] simm;
  assign simm = XLEN'(signed'(imm));

  always_comb begin
    unique case (op)
      OP_ADD:         y = a + b;
      OP_SUB:         y = a - b;
      OP_MUL:         y = a[15:0] * b[15:0];
      OP_AND:         y = a & b;
      OP_OR:          y = a | b;
      OP_XOR:         y = a ^ b;
      OP_SHL:         y = a << b[4:0];
      OP_SHR:         y = a >> b[4:0];
      OP_ADDI:        y = a + simm;
      OP_TID:         y = tid + simm;
      OP_LD, OP_ST:   y = a + simm;
      default:        y = '0;
    endcase
  end

endmodule
