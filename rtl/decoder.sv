// decoder: instruction decoder of the single-cycle Thumb datapath ("Decode").
//
// Expands a 16-bit Thumb instruction into the decoded control signals of
// thumb_pkg::ctrl_t.  It is purely combinational and is organised as three
// lookup tables, as a ROM-based decoder would be:
//   * a 32-entry main table indexed by instr[15:11], which identifies most
//     instructions;
//   * a 16-entry table for the register-to-register ALU group that starts
//     010000, indexed by instr[9:6];
//   * a 4-entry table for the high-register group that starts 010001,
//     indexed by instr[9:8].
// A few main-table entries also check further opcode bits so that only the
// implemented encodings are accepted (register-offset word load/store,
// add/sub sp, conditional branch with a real condition).
//
// The table contents follow the design's decoding table for all instructions.
// Encodings outside that table (byte/halfword transfers, push/pop, ldm/stm,
// svc, ...) are not implemented: this design's choice is to decode them as a
// no-op that only advances the PC and to raise `undef`.
//
// Interface: instr in, ctrl out.  No clock.
module decoder
  import thumb_pkg::*;
(
  input  logic [15:0] instr,
  output ctrl_t       ctrl
);

  function automatic ctrl_t row(regsel_e a, regsel_e b, regsel_e c,
                                rand2_e r, shiftop_e op, shiftamt_e amt,
                                alusel_e as, logic rd, logic wr, logic wf,
                                wrule_e wreg, wrule_e wlink);
    ctrl_t t;
    t.sel_a = a;  t.sel_b = b;  t.sel_c = c;
    t.rand2 = r;  t.shift_op = op;  t.shift_amt = amt;  t.alu_sel = as;
    t.mem_rd = rd;  t.mem_wr = wr;  t.wflags = wf;
    t.wreg = wreg;  t.wlink = wlink;  t.undef = 1'b0;
    return t;
  endfunction

  function automatic ctrl_t undefined();
    ctrl_t t;
    t = CTRL_NOP;
    t.undef = 1'b1;
    return t;
  endfunction

  // Table for the ALU group 010000 oooo.
  function automatic ctrl_t alu_group(logic [3:0] op);
    case (op)
      4'h0: return row(RS_X,    RS_Y, RS_X,    RAND_REGB, SH_LSL, AMT_SH0, AS_AND, 0,0,1, W_Y, W_N); // ands
      4'h1: return row(RS_X,    RS_Y, RS_X,    RAND_REGB, SH_LSL, AMT_SH0, AS_EOR, 0,0,1, W_Y, W_N); // eors
      4'h2: return row(RS_Y,    RS_X, RS_X,    RAND_REGB, SH_LSL, AMT_REG, AS_MOV, 0,0,1, W_Y, W_N); // lsls r
      4'h3: return row(RS_Y,    RS_X, RS_X,    RAND_REGB, SH_LSR, AMT_REG, AS_MOV, 0,0,1, W_Y, W_N); // lsrs r
      4'h4: return row(RS_Y,    RS_X, RS_X,    RAND_REGB, SH_ASR, AMT_REG, AS_MOV, 0,0,1, W_Y, W_N); // asrs r
      4'h5: return row(RS_X,    RS_Y, RS_X,    RAND_REGB, SH_LSL, AMT_SH0, AS_ADC, 0,0,1, W_Y, W_N); // adcs
      4'h6: return row(RS_X,    RS_Y, RS_X,    RAND_REGB, SH_LSL, AMT_SH0, AS_SBC, 0,0,1, W_Y, W_N); // sbcs
      4'h7: return row(RS_Y,    RS_X, RS_X,    RAND_REGB, SH_ROR, AMT_REG, AS_MOV, 0,0,1, W_Y, W_N); // rors r
      4'h8: return row(RS_X,    RS_Y, RS_NONE, RAND_REGB, SH_LSL, AMT_SH0, AS_AND, 0,0,1, W_N, W_N); // tst
      4'h9: return row(RS_NONE, RS_Y, RS_X,    RAND_REGB, SH_LSL, AMT_SH0, AS_NEG, 0,0,1, W_Y, W_N); // negs
      4'hA: return row(RS_X,    RS_Y, RS_NONE, RAND_REGB, SH_LSL, AMT_SH0, AS_SUB, 0,0,1, W_N, W_N); // cmp r
      4'hB: return row(RS_X,    RS_Y, RS_NONE, RAND_REGB, SH_LSL, AMT_SH0, AS_ADD, 0,0,1, W_N, W_N); // cmn
      4'hC: return row(RS_X,    RS_Y, RS_X,    RAND_REGB, SH_LSL, AMT_SH0, AS_ORR, 0,0,1, W_Y, W_N); // orrs
      4'hD: return row(RS_X,    RS_Y, RS_X,    RAND_REGB, SH_LSL, AMT_SH0, AS_MUL, 0,0,1, W_Y, W_N); // muls
      4'hE: return row(RS_X,    RS_Y, RS_X,    RAND_REGB, SH_LSL, AMT_SH0, AS_BIC, 0,0,1, W_Y, W_N); // bics
      default: return row(RS_NONE, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_MVN, 0,0,1, W_Y, W_N); // mvns
    endcase
  endfunction

  // Table for the high-register group 010001 oo.
  function automatic ctrl_t hi_group(logic [1:0] op);
    case (op)
      2'd0: return row(RS_XX,   RS_YY, RS_XX,   RAND_REGB, SH_LSL, AMT_SH0, AS_ADD, 0,0,0, W_Y, W_N); // add hi
      2'd1: return row(RS_XX,   RS_YY, RS_NONE, RAND_REGB, SH_LSL, AMT_SH0, AS_SUB, 0,0,1, W_N, W_N); // cmp hi
      2'd2: return row(RS_NONE, RS_YY, RS_XX,   RAND_REGB, SH_LSL, AMT_SH0, AS_MOV, 0,0,0, W_Y, W_N); // mov hi
      default: return row(RS_NONE, RS_YY, RS_PC, RAND_REGB, SH_LSL, AMT_SH0, AS_MOV, 0,0,0, W_Y, W_C); // bx/blx
    endcase
  endfunction

  // Main table, indexed by the first five opcode bits.
  always_comb begin
    case (instr[15:11])
      5'b00000: ctrl = row(RS_NONE, RS_Y, RS_X, RAND_REGB,  SH_LSL, AMT_IMM, AS_MOV,  0,0,1, W_Y, W_N); // lsls i5
      5'b00001: ctrl = row(RS_NONE, RS_Y, RS_X, RAND_REGB,  SH_LSR, AMT_IMM, AS_MOV,  0,0,1, W_Y, W_N); // lsrs i5
      5'b00010: ctrl = row(RS_NONE, RS_Y, RS_X, RAND_REGB,  SH_ASR, AMT_IMM, AS_MOV,  0,0,1, W_Y, W_N); // asrs i5
      5'b00011: ctrl = row(RS_Y,    RS_Z, RS_X, RAND_RIMM3, SH_LSL, AMT_SH0, AS_BIT9, 0,0,1, W_Y, W_N); // adds/subs r/i3
      5'b00100: ctrl = row(RS_NONE, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH0, AS_MOV, 0,0,1, W_Y, W_N); // movs i8
      5'b00101: ctrl = row(RS_W, RS_NONE, RS_NONE, RAND_IMM8, SH_LSL, AMT_SH0, AS_SUB, 0,0,1, W_N, W_N); // cmp i8
      5'b00110: ctrl = row(RS_W, RS_NONE, RS_W, RAND_IMM8,  SH_LSL, AMT_SH0, AS_ADD,  0,0,1, W_Y, W_N); // adds i8
      5'b00111: ctrl = row(RS_W, RS_NONE, RS_W, RAND_IMM8,  SH_LSL, AMT_SH0, AS_SUB,  0,0,1, W_Y, W_N); // subs i8
      5'b01000: ctrl = instr[10] ? hi_group(instr[9:8]) : alu_group(instr[9:6]);
      5'b01001: ctrl = row(RS_PC, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH2, AS_ADR,  1,0,0, W_Y, W_N); // ldr pc
      5'b01010: ctrl = (instr[10:9] == 2'b00)                                                      // str r
                       ? row(RS_Y, RS_Z, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_ADD, 0,1,0, W_N, W_N)
                       : undefined();
      5'b01011: ctrl = (instr[10:9] == 2'b00)                                                      // ldr r
                       ? row(RS_Y, RS_Z, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_ADD, 1,0,0, W_Y, W_N)
                       : undefined();
      5'b01100: ctrl = row(RS_Y,  RS_NONE, RS_X,  RAND_IMM5,  SH_LSL, AMT_SH2,  AS_ADD,  0,1,0, W_N, W_N); // str i5
      5'b01101: ctrl = row(RS_Y,  RS_NONE, RS_X,  RAND_IMM5,  SH_LSL, AMT_SH2,  AS_ADD,  1,0,0, W_Y, W_N); // ldr i5
      5'b10010: ctrl = row(RS_SP, RS_NONE, RS_W,  RAND_IMM8,  SH_LSL, AMT_SH2,  AS_ADD,  0,1,0, W_N, W_N); // str sp
      5'b10011: ctrl = row(RS_SP, RS_NONE, RS_W,  RAND_IMM8,  SH_LSL, AMT_SH2,  AS_ADD,  1,0,0, W_Y, W_N); // ldr sp
      5'b10100: ctrl = row(RS_PC, RS_NONE, RS_W,  RAND_IMM8,  SH_LSL, AMT_SH2,  AS_ADR,  0,0,0, W_Y, W_N); // add pc
      5'b10101: ctrl = row(RS_SP, RS_NONE, RS_W,  RAND_IMM8,  SH_LSL, AMT_SH2,  AS_ADD,  0,0,0, W_Y, W_N); // add sp
      5'b10110: ctrl = (instr[10:8] == 3'b000)                                                    // add/sub sp
                       ? row(RS_SP, RS_NONE, RS_SP, RAND_IMM7, SH_LSL, AMT_SH2, AS_BIT7, 0,0,0, W_Y, W_N)
                       : undefined();
      5'b11010,
      5'b11011: ctrl = (instr[11:9] != 3'b111)                                                    // b<c>
                       ? row(RS_PC, RS_NONE, RS_PC, RAND_SIMM8, SH_LSL, AMT_SH1, AS_ADD, 0,0,0, W_C, W_N)
                       : undefined();
      5'b11100: ctrl = row(RS_PC, RS_NONE, RS_PC, RAND_SIMM11, SH_LSL, AMT_SH1,  AS_ADD,  0,0,0, W_Y, W_N); // b
      5'b11110: ctrl = row(RS_PC, RS_NONE, RS_LR, RAND_SIMM11, SH_LSL, AMT_SH12, AS_ADD,  0,0,0, W_Y, W_N); // bl1
      5'b11111: ctrl = row(RS_LR, RS_NONE, RS_PC, RAND_IMM11,  SH_LSL, AMT_SH1,  AS_ADD,  0,0,0, W_Y, W_Y); // bl2
      default:  ctrl = undefined();
    endcase
  end

endmodule
