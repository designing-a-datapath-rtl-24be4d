// shifter: 32-bit barrel shifter placed in series in front of the ALU.
//
// Shifts shiftin by shiftamt (0..255) with cShiftOp = Lsl, Lsr, Asr or Ror,
// giving aluin2 and the carry-out shcarry.  Results follow the ARM rules for
// shifts by a register amount: Lsl/Lsr by 32 or more give 0, Asr by 32 or
// more gives copies of the sign bit, Ror uses the amount modulo 32; the carry
// is the last bit shifted out (for Ror, bit 31 of the result).
// For an amount of 0 the value is unchanged and the carry is the current C
// flag, cin: this input is this design's addition, so that instructions that
// do not shift leave C as it was.  Combinational.
module shifter
  import thumb_pkg::*;
(
  input  shiftop_e    cShiftOp,
  input  logic [31:0] shiftin,
  input  logic [7:0]  shiftamt,
  input  logic        cin,
  output logic [31:0] aluin2,
  output logic        shcarry
);
  logic [63:0] wide;
  logic [4:0]  n5;

  always_comb begin
    n5      = shiftamt[4:0];
    wide    = '0;
    aluin2  = shiftin;
    shcarry = cin;
    if (shiftamt != 8'd0) begin
      case (cShiftOp)
        SH_LSL: begin
          if (shiftamt < 8'd32) begin
            wide    = {32'd0, shiftin} << shiftamt;
            aluin2  = wide[31:0];
            shcarry = wide[32];
          end else begin
            aluin2  = '0;
            shcarry = (shiftamt == 8'd32) ? shiftin[0] : 1'b0;
          end
        end
        SH_LSR: begin
          if (shiftamt < 8'd32) begin
            wide    = {shiftin, 32'd0} >> shiftamt;
            aluin2  = wide[63:32];
            shcarry = wide[31];
          end else begin
            aluin2  = '0;
            shcarry = (shiftamt == 8'd32) ? shiftin[31] : 1'b0;
          end
        end
        SH_ASR: begin
          if (shiftamt < 8'd32) begin
            wide    = $signed({shiftin, 32'd0}) >>> shiftamt;
            aluin2  = wide[63:32];
            shcarry = wide[31];
          end else begin
            aluin2  = {32{shiftin[31]}};
            shcarry = shiftin[31];
          end
        end
        default: begin // SH_ROR
          wide    = {shiftin, shiftin} >> n5;
          aluin2  = wide[31:0];
          shcarry = aluin2[31];
        end
      endcase
    end
  end
endmodule
