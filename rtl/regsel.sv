// regsel: register selector (one of three identical units, regselA/B/C).
//
// Turns a register-selection rule (cRegSel*) into a 4-bit register number
// (cReg*), either by picking a field of the instruction or by giving a fixed
// register.  Fields: Rx = instr[2:0], Ry = instr[5:3], Rz = instr[8:6],
// Rw = instr[10:8], Ryy = instr[6:3] and Rxx = {instr[7], instr[2:0]} (the
// high-register forms); fixed: Rsp = 13, Rlr = 14, Rpc = 15.  The "no register
// needed" rule reads r0 in this design.  Combinational.
module regsel
  import thumb_pkg::*;
(
  input  regsel_e     sel,
  input  logic [15:0] instr,
  output logic [3:0]  regno
);
  always_comb begin
    case (sel)
      RS_X:    regno = {1'b0, instr[2:0]};
      RS_Y:    regno = {1'b0, instr[5:3]};
      RS_Z:    regno = {1'b0, instr[8:6]};
      RS_W:    regno = {1'b0, instr[10:8]};
      RS_XX:   regno = {instr[7], instr[2:0]};
      RS_YY:   regno = instr[6:3];
      RS_SP:   regno = REG_SP;
      RS_LR:   regno = REG_LR;
      RS_PC:   regno = REG_PC;
      default: regno = 4'd0;
    endcase
  end
endmodule
