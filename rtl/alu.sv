// alu: the arithmetic and logic unit of the single-cycle Thumb datapath.
//
// Combines the first register value ra with aluin2 (the shifter output) and
// computes new N Z C V flags:
//   Add, Sub, Adc, Sbc, Neg (0 - aluin2), Adr (ra rounded down to a multiple
//   of 4, plus aluin2; used for PC-relative addresses), And, Eor, Orr,
//   Bic (ra & ~aluin2), Mvn (~aluin2), Mov (aluin2), Mul (low 32 bits of
//   ra * aluin2).
// Flag rules are those of the Thumb instruction set: adds and subtracts set
// all four flags, with C a carry (for subtraction, "no borrow"); logical
// operations and Mov set N and Z, take C from the shifter carry shcarry and
// keep V; Mul sets N and Z and keeps C and V.  Whether the flags are actually
// stored is decided outside (cWFlags).  The incoming flags give the carry for
// Adc/Sbc (cbit) and the V (and, for Mul, C) kept unchanged.
// Combinational; the multiplier is a single-cycle array multiplier.
module alu
  import thumb_pkg::*;
(
  input  aluop_e      cAluOp,
  input  logic [31:0] ra,
  input  logic [31:0] aluin2,
  input  logic        shcarry,
  input  flags_t      flags,
  output logic [31:0] aluout,
  output flags_t      newflags
);
  logic [32:0] sum;
  logic [31:0] x, y;
  logic        cy;
  logic        arith;

  always_comb begin
    // Operand set-up for the adder: x + y + cy.
    x = ra;  y = aluin2;  cy = 1'b0;  arith = 1'b1;
    case (cAluOp)
      ALU_ADD: begin x = ra;             y = aluin2;  cy = 1'b0;    end
      ALU_ADR: begin x = {ra[31:2], 2'b00}; y = aluin2; cy = 1'b0;  end
      ALU_SUB: begin x = ra;             y = ~aluin2; cy = 1'b1;    end
      ALU_ADC: begin x = ra;             y = aluin2;  cy = flags.c; end
      ALU_SBC: begin x = ra;             y = ~aluin2; cy = flags.c; end
      ALU_NEG: begin x = 32'd0;          y = ~aluin2; cy = 1'b1;    end
      default: arith = 1'b0;
    endcase
    sum = {1'b0, x} + {1'b0, y} + {32'd0, cy};

    newflags = flags;
    if (arith) begin
      aluout     = sum[31:0];
      newflags.c = sum[32];
      newflags.v = (x[31] == y[31]) && (sum[31] != x[31]);
    end else begin
      case (cAluOp)
        ALU_AND: aluout = ra & aluin2;
        ALU_EOR: aluout = ra ^ aluin2;
        ALU_ORR: aluout = ra | aluin2;
        ALU_BIC: aluout = ra & ~aluin2;
        ALU_MVN: aluout = ~aluin2;
        ALU_MUL: aluout = ra * aluin2;
        default: aluout = aluin2; // ALU_MOV
      endcase
      if (cAluOp != ALU_MUL) newflags.c = shcarry;
    end
    newflags.n = aluout[31];
    newflags.z = (aluout == 32'd0);
  end
endmodule
