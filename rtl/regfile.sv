// regfile: the "turbocharged" register file of the single-cycle Thumb datapath.
//
// Sixteen 32-bit registers r0..r15, with r15 the program counter, so that the
// PC can be read and written like any other register.
//   * Three read ports ra/rb/rc give the registers numbered cRegA/B/C.  When
//     a port selects r15 it returns PC+4, the value the architecture specifies.
//   * A dedicated output pc always gives the current PC (to fetch from).
//   * Each clock edge the PC is loaded with nextpc (PC+2), unless the
//     instruction writes r15 explicitly: that write takes precedence, so
//     branches work by writing r15.
//   * When regwrite is set, result is written to register cRegC.
//   * When cLink is set, nextpc is also written to the link register r14.
// Reads are combinational, writes happen on the rising clock edge, so a whole
// instruction executes in one cycle.
//
// This design's own choices: a synchronous active-high reset clears r0..r14
// and sets the PC to RESET_PC; a value written to the PC has bit 0 cleared
// (branch targets held in registers carry the Thumb bit 0 = 1); if an explicit
// write to r14 and cLink coincide (no implemented instruction does this) the
// link write wins.
module regfile
  import thumb_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  cRegA,
  input  logic [3:0]  cRegB,
  input  logic [3:0]  cRegC,
  output logic [31:0] ra,
  output logic [31:0] rb,
  output logic [31:0] rc,
  output logic [31:0] pc,
  input  logic [31:0] nextpc,
  input  logic [31:0] result,
  input  logic        regwrite,
  input  logic        cLink
);

  logic [31:0] regs [0:14];
  logic [31:0] pc_q;

  function automatic logic [31:0] rd(logic [3:0] n, logic [31:0] cur_pc,
                                     logic [31:0] r [0:14]);
    return (n == REG_PC) ? cur_pc + 32'd4 : r[n];
  endfunction

  assign pc = pc_q;
  assign ra = rd(cRegA, pc_q, regs);
  assign rb = rd(cRegB, pc_q, regs);
  assign rc = rd(cRegC, pc_q, regs);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) regs[i] <= '0;
      pc_q <= RESET_PC;
    end else begin
      if (regwrite && cRegC == REG_PC) pc_q <= {result[31:1], 1'b0};
      else                             pc_q <= nextpc;
      if (regwrite && cRegC != REG_PC) regs[cRegC] <= result;
      if (cLink)                       regs[REG_LR] <= nextpc;
    end
  end

endmodule
