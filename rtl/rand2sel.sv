// rand2sel: chooses the shifter input (shiftin), which becomes the ALU's
// second operand after shifting.
//
// Rules (cRand2): RegB = register value rb; Imm3 = instr[8:6];
// RImm3 = rb or instr[8:6] according to instr[10] (adds/subs r/i3);
// Imm5 = instr[10:6]; Imm7 = instr[6:0]; Imm8 = instr[7:0];
// SImm8 = instr[7:0] sign-extended; Imm11 = instr[10:0];
// SImm11 = instr[10:0] sign-extended.  Scaling of offsets (x2, x4, x4096) is
// left to the shifter.  Combinational.
module rand2sel
  import thumb_pkg::*;
(
  input  rand2_e      cRand2,
  input  logic [15:0] instr,
  input  logic [31:0] rb,
  output logic [31:0] shiftin
);
  always_comb begin
    case (cRand2)
      RAND_REGB:   shiftin = rb;
      RAND_IMM3:   shiftin = {29'd0, instr[8:6]};
      RAND_RIMM3:  shiftin = instr[10] ? {29'd0, instr[8:6]} : rb;
      RAND_IMM5:   shiftin = {27'd0, instr[10:6]};
      RAND_IMM7:   shiftin = {25'd0, instr[6:0]};
      RAND_IMM8:   shiftin = {24'd0, instr[7:0]};
      RAND_SIMM8:  shiftin = {{24{instr[7]}}, instr[7:0]};
      RAND_IMM11:  shiftin = {21'd0, instr[10:0]};
      RAND_SIMM11: shiftin = {{21{instr[10]}}, instr[10:0]};
      default:     shiftin = rb;
    endcase
  end
endmodule
