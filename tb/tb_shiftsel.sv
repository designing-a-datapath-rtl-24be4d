// tb_shiftsel: self-checking test of the shift-amount selector: constants,
// the imm5 field (with #0 meaning 32 for right shifts) and the low byte of ra.
module tb_shiftsel;
  import thumb_pkg::*;
  shiftamt_e amt; shiftop_e op; logic [15:0] instr; logic [31:0] ra; logic [7:0] shiftamt;
  shiftsel dut (.cShiftAmt(amt), .cShiftOp(op), .instr, .ra, .shiftamt);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int want, imm;
      amt = shiftamt_e'($urandom_range(0, 5)); op = shiftop_e'($urandom_range(0, 3));
      instr = 16'($urandom); ra = $urandom;
      if (i % 4 == 0) instr[10:6] = 5'd0;
      #1;
      imm = (int'(instr) >> 6) & 31;
      case (amt)
        AMT_SH0: want = 0;  AMT_SH1: want = 1;  AMT_SH2: want = 2;  AMT_SH12: want = 12;
        AMT_IMM: want = (imm == 0 && (op == SH_LSR || op == SH_ASR)) ? 32 : imm;
        default: want = int'(ra) & 255;
      endcase
      checks++;
      if (shiftamt !== 8'(want)) begin failures++; $display("FAIL %s %s instr=%h got %0d want %0d", amt.name(), op.name(), instr, shiftamt, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
