// thumb_datapath: a single-cycle datapath for a subset of the Thumb
// instruction set.
//
// Every instruction is fetched, decoded and executed in one clock cycle.
// The PC (register r15 of the register file) addresses the instruction
// memory; the decoder turns the 16-bit instruction into control signals.
// Three register selectors pick the register numbers, the register file
// gives three values ra, rb, rc.  The second operand is chosen by rand2sel,
// passes through the barrel shifter (amount from shiftsel) and meets ra in the
// ALU, whose operation comes from alusel.  The ALU output is either the result
// or the address for the data memory; a result mux picks memout for loads.
// The NZCV flags register is written under cWFlags, and the condition unit
// turns flags and instr[11:8] into `enable`, which makes the register write of
// a conditional branch conditional (cWReg = C).  The link selector (cWLink)
// makes the register file also write PC+2 into LR for bl and blx.
//
// Four small parts are written inline here: the +2 incrementer producing
// nextpc, the result mux (controlled by cMemRd), the regwrite mux
// (N / Y / enable) and the link mux (0 / 1 / instr[7]).
//
// Interface: clk, rst (synchronous, active high); a program-load port into
// the instruction memory (imem_we/imem_waddr/imem_wdata, used while the
// processor is held in reset or idle); and trace outputs showing the current
// pc and instruction, undefined opcodes, the data-memory write of the cycle
// and the flags.  One instruction completes at every rising clock edge.
module thumb_datapath
  import thumb_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 2048,   // 16-bit instructions
  parameter int unsigned DMEM_WORDS = 1024,   // 32-bit data words
  parameter logic [31:0] RESET_PC   = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  // program loading
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [15:0] imem_wdata,
  // trace
  output logic [31:0] pc,
  output logic [15:0] instr,
  output logic        undef,
  output logic        mem_wr,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output flags_t      flags
);

  ctrl_t       ctrl;
  logic [3:0]  cRegA, cRegB, cRegC;
  logic [31:0] ra, rb, rc, nextpc;
  logic [31:0] shiftin, aluin2, aluout, memout, result;
  logic [7:0]  shiftamt;
  logic        shcarry, enable, regwrite, cLink;
  aluop_e      cAluOp;
  flags_t      newflags;

  // Fetch and decode
  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .pc, .instr, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));

  decoder u_decode (.instr, .ctrl);

  assign nextpc = pc + 32'd2;

  // Register selection and register file
  regsel u_regselA (.sel(ctrl.sel_a), .instr, .regno(cRegA));
  regsel u_regselB (.sel(ctrl.sel_b), .instr, .regno(cRegB));
  regsel u_regselC (.sel(ctrl.sel_c), .instr, .regno(cRegC));

  always_comb begin
    case (ctrl.wreg)
      W_Y:     regwrite = 1'b1;
      W_C:     regwrite = enable;
      default: regwrite = 1'b0;
    endcase
    case (ctrl.wlink)
      W_Y:     cLink = 1'b1;
      W_C:     cLink = instr[7];
      default: cLink = 1'b0;
    endcase
  end

  regfile #(.RESET_PC(RESET_PC)) u_regfile (
    .clk, .rst, .cRegA, .cRegB, .cRegC, .ra, .rb, .rc, .pc,
    .nextpc, .result, .regwrite, .cLink);

  // Operand, shifter, ALU
  rand2sel u_rand2sel (.cRand2(ctrl.rand2), .instr, .rb, .shiftin);

  shiftsel u_shiftsel (.cShiftAmt(ctrl.shift_amt), .cShiftOp(ctrl.shift_op),
                       .instr, .ra, .shiftamt);

  shifter u_shifter (.cShiftOp(ctrl.shift_op), .shiftin, .shiftamt,
                     .cin(flags.c), .aluin2, .shcarry);

  alusel u_alusel (.cAluSel(ctrl.alu_sel), .instr, .cAluOp);

  alu u_alu (.cAluOp, .ra, .aluin2, .shcarry, .flags, .aluout, .newflags);

  // Data memory and result
  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .cMemRd(ctrl.mem_rd), .cMemWr(ctrl.mem_wr), .addr(aluout),
    .wdata(rc), .memout);

  assign result = ctrl.mem_rd ? memout : aluout;

  // Flags and condition
  flags_reg u_flags (.clk, .rst, .cWFlags(ctrl.wflags), .newflags, .flags);

  condx u_condx (.cCond(instr[11:8]), .flags, .enable);

  // Trace
  assign undef     = ctrl.undef;
  assign mem_wr    = ctrl.mem_wr;
  assign mem_addr  = aluout;
  assign mem_wdata = rc;

endmodule
