// alusel: derives the ALU operation cAluOp from the decoded rule cAluSel.
//
// Most rules name the operation directly.  Two rules cover pairs of
// instructions whose add/subtract choice is not fixed by the opcode bits the
// decoder looks at: Bit9 (adds/subs r/i3) subtracts when instr[9] is 1, and
// Bit7 (add/sub sp) subtracts when instr[7] is 1.  Combinational.
module alusel
  import thumb_pkg::*;
(
  input  alusel_e     cAluSel,
  input  logic [15:0] instr,
  output aluop_e      cAluOp
);
  always_comb begin
    case (cAluSel)
      AS_ADD:  cAluOp = ALU_ADD;
      AS_SUB:  cAluOp = ALU_SUB;
      AS_AND:  cAluOp = ALU_AND;
      AS_EOR:  cAluOp = ALU_EOR;
      AS_ORR:  cAluOp = ALU_ORR;
      AS_BIC:  cAluOp = ALU_BIC;
      AS_MVN:  cAluOp = ALU_MVN;
      AS_MOV:  cAluOp = ALU_MOV;
      AS_ADC:  cAluOp = ALU_ADC;
      AS_SBC:  cAluOp = ALU_SBC;
      AS_NEG:  cAluOp = ALU_NEG;
      AS_MUL:  cAluOp = ALU_MUL;
      AS_ADR:  cAluOp = ALU_ADR;
      AS_BIT9: cAluOp = instr[9] ? ALU_SUB : ALU_ADD;
      AS_BIT7: cAluOp = instr[7] ? ALU_SUB : ALU_ADD;
      default: cAluOp = ALU_MOV;
    endcase
  end
endmodule
