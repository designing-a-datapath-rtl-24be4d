// dmem: data memory (DMem) of the single-cycle Thumb datapath.
//
// WORDS 32-bit words, addressed by the byte address addr (the ALU output);
// only word transfers exist, so addr[1:0] is ignored and addresses wrap
// modulo the memory size.  A read (cMemRd) is combinational so that a load
// completes in its own cycle, like a data cache that always hits; memout is
// 0 when cMemRd is low, so that nothing is read needlessly.  A write
// (cMemWr) stores wdata (the register value rc) at the rising clock edge.
// The contents are not reset.
module dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        cMemRd,
  input  logic        cMemWr,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] memout
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [0:WORDS-1];

  assign memout = cMemRd ? mem[addr[AW+1:2]] : 32'd0;

  always_ff @(posedge clk) begin
    if (cMemWr) mem[addr[AW+1:2]] <= wdata;
  end

  // A transfer is either a read or a write, never both.
  assert property (@(posedge clk) !(cMemRd && cMemWr));
endmodule
