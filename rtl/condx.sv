// condx: condition evaluator ("Condx").
//
// Compares the NZCV flags with the 4-bit condition field cCond (instr[11:8]
// of a conditional branch) and says whether the condition holds (enable).
// Codes 0..13 are the Thumb conditions EQ NE CS CC MI PL VS VC HI LS GE LT
// GT LE.  Code 14 gives 1 and code 15 gives 0; the decoder never uses them.
// It works for every instruction, but its output only matters for a
// conditional branch.  Combinational.
module condx
  import thumb_pkg::*;
(
  input  logic [3:0] cCond,
  input  flags_t     flags,
  output logic       enable
);
  always_comb begin
    case (cCond)
      4'h0: enable = flags.z;                              // EQ
      4'h1: enable = !flags.z;                             // NE
      4'h2: enable = flags.c;                              // CS
      4'h3: enable = !flags.c;                             // CC
      4'h4: enable = flags.n;                              // MI
      4'h5: enable = !flags.n;                             // PL
      4'h6: enable = flags.v;                              // VS
      4'h7: enable = !flags.v;                             // VC
      4'h8: enable = flags.c && !flags.z;                  // HI
      4'h9: enable = !flags.c || flags.z;                  // LS
      4'hA: enable = (flags.n == flags.v);                 // GE
      4'hB: enable = (flags.n != flags.v);                 // LT
      4'hC: enable = !flags.z && (flags.n == flags.v);     // GT
      4'hD: enable = flags.z || (flags.n != flags.v);      // LE
      4'hE: enable = 1'b1;
      default: enable = 1'b0;
    endcase
  end
endmodule
