// tb_decoder: self-checking test of the instruction decoder.  For each
// implemented instruction, random instructions with that opcode (other bits
// random) are decoded and the whole control bundle is compared with the row
// of the decoding table for all instructions, written out here as
// (opcode value, opcode mask, expected controls).  Encodings that are not
// implemented must decode to the no-op settings with undef raised.
module tb_decoder;
  import thumb_pkg::*;
  logic [15:0] instr; ctrl_t ctrl;
  decoder dut (.instr, .ctrl);
  int checks = 0, failures = 0;

  function automatic ctrl_t R(regsel_e a, regsel_e b, regsel_e c, rand2_e r, shiftop_e op,
                              shiftamt_e amt, alusel_e s, bit rd, bit wr, bit wf, wrule_e wreg, wrule_e wl);
    return '{sel_a: a, sel_b: b, sel_c: c, rand2: r, shift_op: op, shift_amt: amt, alu_sel: s,
             mem_rd: rd, mem_wr: wr, wflags: wf, wreg: wreg, wlink: wl, undef: 1'b0};
  endfunction

  task automatic t(string name, logic [15:0] val, logic [15:0] mask, ctrl_t want);
    for (int k = 0; k < 20; k++) begin
      instr = (16'($urandom) & ~mask) | val;
      #1;
      checks++;
      if (ctrl !== want) begin
        failures++;
        $display("FAIL %s instr=%h got %h want %h", name, instr, ctrl, want);
      end
    end
  endtask

  task automatic u(logic [15:0] val, logic [15:0] mask);
    ctrl_t nop = CTRL_NOP;
    nop.undef = 1'b1;
    t("undefined", val, mask, nop);
  endtask

  initial begin
    t("lsls i5", 16'h0000, 16'hF800, R(RS_NONE, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_IMM, AS_MOV, 0,0,1, W_Y, W_N));
    t("lsrs i5", 16'h0800, 16'hF800, R(RS_NONE, RS_Y, RS_X, RAND_REGB, SH_LSR, AMT_IMM, AS_MOV, 0,0,1, W_Y, W_N));
    t("asrs i5", 16'h1000, 16'hF800, R(RS_NONE, RS_Y, RS_X, RAND_REGB, SH_ASR, AMT_IMM, AS_MOV, 0,0,1, W_Y, W_N));
    t("adds/subs i3", 16'h1800, 16'hF800, R(RS_Y, RS_Z, RS_X, RAND_RIMM3, SH_LSL, AMT_SH0, AS_BIT9, 0,0,1, W_Y, W_N));
    t("movs i8", 16'h2000, 16'hF800, R(RS_NONE, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH0, AS_MOV, 0,0,1, W_Y, W_N));
    t("cmp i8",  16'h2800, 16'hF800, R(RS_W, RS_NONE, RS_NONE, RAND_IMM8, SH_LSL, AMT_SH0, AS_SUB, 0,0,1, W_N, W_N));
    t("adds i8", 16'h3000, 16'hF800, R(RS_W, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH0, AS_ADD, 0,0,1, W_Y, W_N));
    t("subs i8", 16'h3800, 16'hF800, R(RS_W, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH0, AS_SUB, 0,0,1, W_Y, W_N));
    t("ands",  16'h4000, 16'hFFC0, R(RS_X, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_AND, 0,0,1, W_Y, W_N));
    t("eors",  16'h4040, 16'hFFC0, R(RS_X, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_EOR, 0,0,1, W_Y, W_N));
    t("lsls r", 16'h4080, 16'hFFC0, R(RS_Y, RS_X, RS_X, RAND_REGB, SH_LSL, AMT_REG, AS_MOV, 0,0,1, W_Y, W_N));
    t("lsrs r", 16'h40C0, 16'hFFC0, R(RS_Y, RS_X, RS_X, RAND_REGB, SH_LSR, AMT_REG, AS_MOV, 0,0,1, W_Y, W_N));
    t("asrs r", 16'h4100, 16'hFFC0, R(RS_Y, RS_X, RS_X, RAND_REGB, SH_ASR, AMT_REG, AS_MOV, 0,0,1, W_Y, W_N));
    t("adcs",  16'h4140, 16'hFFC0, R(RS_X, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_ADC, 0,0,1, W_Y, W_N));
    t("sbcs",  16'h4180, 16'hFFC0, R(RS_X, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_SBC, 0,0,1, W_Y, W_N));
    t("rors r", 16'h41C0, 16'hFFC0, R(RS_Y, RS_X, RS_X, RAND_REGB, SH_ROR, AMT_REG, AS_MOV, 0,0,1, W_Y, W_N));
    t("tst",   16'h4200, 16'hFFC0, R(RS_X, RS_Y, RS_NONE, RAND_REGB, SH_LSL, AMT_SH0, AS_AND, 0,0,1, W_N, W_N));
    t("negs",  16'h4240, 16'hFFC0, R(RS_NONE, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_NEG, 0,0,1, W_Y, W_N));
    t("cmp r", 16'h4280, 16'hFFC0, R(RS_X, RS_Y, RS_NONE, RAND_REGB, SH_LSL, AMT_SH0, AS_SUB, 0,0,1, W_N, W_N));
    t("cmn",   16'h42C0, 16'hFFC0, R(RS_X, RS_Y, RS_NONE, RAND_REGB, SH_LSL, AMT_SH0, AS_ADD, 0,0,1, W_N, W_N));
    t("orrs",  16'h4300, 16'hFFC0, R(RS_X, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_ORR, 0,0,1, W_Y, W_N));
    t("muls",  16'h4340, 16'hFFC0, R(RS_X, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_MUL, 0,0,1, W_Y, W_N));
    t("bics",  16'h4380, 16'hFFC0, R(RS_X, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_BIC, 0,0,1, W_Y, W_N));
    t("mvns",  16'h43C0, 16'hFFC0, R(RS_NONE, RS_Y, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_MVN, 0,0,1, W_Y, W_N));
    t("add hi", 16'h4400, 16'hFF00, R(RS_XX, RS_YY, RS_XX, RAND_REGB, SH_LSL, AMT_SH0, AS_ADD, 0,0,0, W_Y, W_N));
    t("cmp hi", 16'h4500, 16'hFF00, R(RS_XX, RS_YY, RS_NONE, RAND_REGB, SH_LSL, AMT_SH0, AS_SUB, 0,0,1, W_N, W_N));
    t("mov hi", 16'h4600, 16'hFF00, R(RS_NONE, RS_YY, RS_XX, RAND_REGB, SH_LSL, AMT_SH0, AS_MOV, 0,0,0, W_Y, W_N));
    t("bx/blx", 16'h4700, 16'hFF00, R(RS_NONE, RS_YY, RS_PC, RAND_REGB, SH_LSL, AMT_SH0, AS_MOV, 0,0,0, W_Y, W_C));
    t("ldr pc", 16'h4800, 16'hF800, R(RS_PC, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH2, AS_ADR, 1,0,0, W_Y, W_N));
    t("str r",  16'h5000, 16'hFE00, R(RS_Y, RS_Z, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_ADD, 0,1,0, W_N, W_N));
    t("ldr r",  16'h5800, 16'hFE00, R(RS_Y, RS_Z, RS_X, RAND_REGB, SH_LSL, AMT_SH0, AS_ADD, 1,0,0, W_Y, W_N));
    t("str i5", 16'h6000, 16'hF800, R(RS_Y, RS_NONE, RS_X, RAND_IMM5, SH_LSL, AMT_SH2, AS_ADD, 0,1,0, W_N, W_N));
    t("ldr i5", 16'h6800, 16'hF800, R(RS_Y, RS_NONE, RS_X, RAND_IMM5, SH_LSL, AMT_SH2, AS_ADD, 1,0,0, W_Y, W_N));
    t("str sp", 16'h9000, 16'hF800, R(RS_SP, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH2, AS_ADD, 0,1,0, W_N, W_N));
    t("ldr sp", 16'h9800, 16'hF800, R(RS_SP, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH2, AS_ADD, 1,0,0, W_Y, W_N));
    t("add pc", 16'hA000, 16'hF800, R(RS_PC, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH2, AS_ADR, 0,0,0, W_Y, W_N));
    t("add sp", 16'hA800, 16'hF800, R(RS_SP, RS_NONE, RS_W, RAND_IMM8, SH_LSL, AMT_SH2, AS_ADD, 0,0,0, W_Y, W_N));
    t("add/sub sp", 16'hB000, 16'hFF00, R(RS_SP, RS_NONE, RS_SP, RAND_IMM7, SH_LSL, AMT_SH2, AS_BIT7, 0,0,0, W_Y, W_N));
    for (int cnd = 0; cnd < 14; cnd++)
      t("b<c>", 16'hD000 | 16'(cnd << 8), 16'hFF00, R(RS_PC, RS_NONE, RS_PC, RAND_SIMM8, SH_LSL, AMT_SH1, AS_ADD, 0,0,0, W_C, W_N));
    t("b",   16'hE000, 16'hF800, R(RS_PC, RS_NONE, RS_PC, RAND_SIMM11, SH_LSL, AMT_SH1, AS_ADD, 0,0,0, W_Y, W_N));
    t("bl1", 16'hF000, 16'hF800, R(RS_PC, RS_NONE, RS_LR, RAND_SIMM11, SH_LSL, AMT_SH12, AS_ADD, 0,0,0, W_Y, W_N));
    t("bl2", 16'hF800, 16'hF800, R(RS_LR, RS_NONE, RS_PC, RAND_IMM11, SH_LSL, AMT_SH1, AS_ADD, 0,0,0, W_Y, W_Y));
    // not implemented: strh/strb/ldrsb, ldrh/ldrb/ldrsh, strb/ldrb/strh/ldrh imm,
    // push/pop and other misc, ldm/stm, udf/svc, 32-bit prefix
    u(16'h5200, 16'hFE00); u(16'h5400, 16'hFE00); u(16'h5600, 16'hFE00);
    u(16'h5A00, 16'hFE00); u(16'h5C00, 16'hFE00); u(16'h5E00, 16'hFE00);
    u(16'h7000, 16'hF000); u(16'h8000, 16'hF000);
    u(16'hB400, 16'hFE00); u(16'hBC00, 16'hFE00); u(16'hB800, 16'hF800);
    u(16'hC000, 16'hF000); u(16'hDE00, 16'hFF00); u(16'hDF00, 16'hFF00); u(16'hE800, 16'hF800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
