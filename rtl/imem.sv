// imem: instruction memory (IMem) of the single-cycle Thumb datapath.
//
// Holds WORDS 16-bit instructions.  The fetch port is combinational: the
// current pc selects a halfword (pc[0] ignored) and instr follows in the same
// cycle, as a single-cycle machine needs (modelling an instruction cache that
// always hits).  Addresses wrap modulo the memory size.
// A synchronous write port (we/waddr/wdata, byte address of a halfword) lets
// the surrounding system load a program; that port is this design's own
// addition.  The contents are not reset.
module imem #(
  parameter int unsigned WORDS = 2048
) (
  input  logic        clk,
  input  logic [31:0] pc,
  output logic [15:0] instr,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [15:0] wdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [15:0] mem [0:WORDS-1];

  assign instr = mem[pc[AW:1]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW:1]] <= wdata;
  end
endmodule
