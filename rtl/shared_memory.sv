// shared_memory: the per-core shared memory, one word-wide port per lane
// plus any extra ports (the core adds one for the host).
//
// WORDS words of XLEN bits (16 KB of 32-bit words by default, the per-core
// shared-memory size of the evaluated GPU). Every port can read or write one
// word per cycle. Reads are combinational (the lane's memory stage registers
// the data); writes take effect at the clock edge. If several ports write
// the same word in one cycle, the highest-numbered port wins. Addresses are
// word addresses and wrap modulo WORDS. A fully multi-ported array, rather
// than a banked memory with conflict handling, is this design's own
// simplification: the evaluated GPU's shared-memory organisation is not part
// of the decoupling scheme.
module shared_memory #(
  parameter int unsigned NPORTS = 9,
  parameter int unsigned WORDS  = 4096,
  parameter int unsigned XLEN   = 32
) (
  input  logic                      clk,
  input  logic [NPORTS-1:0]         we,
  input  logic [NPORTS-1:0][XLEN-1:0] addr,
  input  logic [NPORTS-1:0][XLEN-1:0] wdata,
  output logic [NPORTS-1:0][XLEN-1:0] rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [XLEN-1:0] mem [WORDS];

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++)
      rdata[p] = mem[addr[p][AW-1:0]];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(NPORTS); p++)
      if (we[p]) mem[addr[p][AW-1:0]] <= wdata[p];
  end

endmodule
