// shiftsel: chooses the shift amount for the barrel shifter.
//
// Rules (cShiftAmt): Sh0, Sh1, Sh2, Sh12 are constants; ShImm is the 5-bit
// field instr[10:6]; ShReg is the bottom byte of the first register value ra.
// Following the Thumb encoding, an immediate amount of 0 with a right shift
// (lsrs/asrs #0) means a shift by 32; that rule is why the shift operation is
// an input here.  Combinational; output is 8 bits, enough for ShReg.
module shiftsel
  import thumb_pkg::*;
(
  input  shiftamt_e   cShiftAmt,
  input  shiftop_e    cShiftOp,
  input  logic [15:0] instr,
  input  logic [31:0] ra,
  output logic [7:0]  shiftamt
);
  always_comb begin
    case (cShiftAmt)
      AMT_SH0:  shiftamt = 8'd0;
      AMT_SH1:  shiftamt = 8'd1;
      AMT_SH2:  shiftamt = 8'd2;
      AMT_SH12: shiftamt = 8'd12;
      AMT_IMM:  shiftamt = (instr[10:6] == 5'd0 && cShiftOp inside {SH_LSR, SH_ASR})
                           ? 8'd32 : {3'd0, instr[10:6]};
      AMT_REG:  shiftamt = ra[7:0];
      default:  shiftamt = 8'd0;
    endcase
  end
endmodule
