// flags_reg: the 4-bit NZCV status register ("Flags").
//
// Loads newflags from the ALU at the rising clock edge when cWFlags is set,
// otherwise holds its value, so a compare can be followed by several
// conditional branches.  Synchronous active-high reset to all zeros (this
// design's choice).
module flags_reg
  import thumb_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   cWFlags,
  input  flags_t newflags,
  output flags_t flags
);
  always_ff @(posedge clk) begin
    if (rst)          flags <= '0;
    else if (cWFlags) flags <= newflags;
  end
endmodule
