// lane_alu_tb: self-checking test of the lane ALU. Every operation with
// random operands and immediates, compared with expressions written
// directly in the testbench, plus edge values.
module lane_alu_tb;
  import dpsp_pkg::*;
  opcode_e op;
  logic [31:0] a, b, tid, y, e;
  logic [15:0] imm;
  int checks = 0, failures = 0;

  lane_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_y(opcode_e o, logic [31:0] x, logic [31:0] z,
                                           logic [15:0] i, logic [31:0] t);
    logic [31:0] si = {{16{i[15]}}, i};
    case (o)
      OP_ADD:  return x + z;
      OP_SUB:  return x + (~z) + 1;
      OP_MUL: begin
        logic [31:0] p = 0;
        for (int k = 0; k < 16; k++) if (z[k]) p += {16'b0, x[15:0]} << k;
        return p;
      end
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_XOR:  return x ^ z;
      OP_SHL:  return x << z[4:0];
      OP_SHR:  return x >> z[4:0];
      OP_ADDI, OP_LD, OP_ST: return x + si;
      OP_TID:  return t + si;
      default: return 0;
    endcase
  endfunction

  initial begin
    opcode_e ops[] = '{OP_NOP, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL,
                       OP_SHR, OP_ADDI, OP_TID, OP_LD, OP_ST, OP_BAR, OP_HALT};
    for (int n = 0; n < 3000; n++) begin
      op  = ops[$urandom_range(0, ops.size() - 1)];
      a   = (n % 7 == 0) ? 32'hFFFF_FFFF : $urandom;
      b   = (n % 11 == 0) ? 32'h0000_FFFF : $urandom;
      imm = (n % 5 == 0) ? 16'h8000 : 16'($urandom);
      tid = $urandom_range(0, 31);
      #1;
      e = expect_y(op, a, b, imm, tid);
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h imm=%h tid=%0d y=%h expected %h",
                 op.name(), a, b, imm, tid, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
