// lane_regfile: register file of one SIMD lane.
//
// A lane executes every warp instruction for REPEAT thread groups, so it
// holds the registers of REPEAT threads: REPEAT * NREGS words of XLEN bits,
// indexed by {group, register}. Two combinational read ports serve the
// register-access stage and one synchronous write port the write-back stage.
// A write becomes visible to reads from the cycle after the write edge.
// Register 0 is an ordinary register. Sizes other than the 32-bit word and
// the 4 thread groups are this design's own choice. Contents are cleared by
// reset so that every read returns a defined value.
module lane_regfile #(
  parameter int unsigned REPEAT = 4,
  parameter int unsigned NREGS  = 16,
  parameter int unsigned XLEN   = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(REPEAT)-1:0]     grp,     // thread group of the reads
  input  logic [$clog2(NREGS)-1:0]      ra1,
  input  logic [$clog2(NREGS)-1:0]      ra2,
  output logic [XLEN-1:0]               rd1,
  output logic [XLEN-1:0]               rd2,
  input  logic                          we,
  input  logic [$clog2(REPEAT)-1:0]     wgrp,
  input  logic [$clog2(NREGS)-1:0]      wa,
  input  logic [XLEN-1:0]               wd
);

  logic [XLEN-1:0] regs [REPEAT][NREGS];

  assign rd1 = regs[grp][ra1];
  assign rd2 = regs[grp][ra2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < int'(REPEAT); g++)
        for (int r = 0; r < int'(NREGS); r++)
          regs[g][r] <= '0;
    end else if (we) begin
      regs[wgrp][wa] <= wd;
    end
  end

endmodule
