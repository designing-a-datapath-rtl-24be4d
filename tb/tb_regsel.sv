// tb_regsel: self-checking test of the register selector: each rule with
// random instructions, against register numbers extracted from the
// instruction bits one at a time.
module tb_regsel;
  import thumb_pkg::*;
  regsel_e sel; logic [15:0] instr; logic [3:0] regno;
  regsel dut (.sel, .instr, .regno);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [3:0] want;
      sel = regsel_e'($urandom_range(0, 9)); instr = 16'($urandom); #1;
      case (sel)
        RS_X:  want = {1'b0, instr[2], instr[1], instr[0]};
        RS_Y:  want = {1'b0, instr[5], instr[4], instr[3]};
        RS_Z:  want = {1'b0, instr[8], instr[7], instr[6]};
        RS_W:  want = {1'b0, instr[10], instr[9], instr[8]};
        RS_XX: want = {instr[7], instr[2], instr[1], instr[0]};
        RS_YY: want = {instr[6], instr[5], instr[4], instr[3]};
        RS_SP: want = 4'd13;
        RS_LR: want = 4'd14;
        RS_PC: want = 4'd15;
        default: want = 4'd0;
      endcase
      checks++;
      if (regno !== want) begin failures++; $display("FAIL sel=%s instr=%h got %0d want %0d", sel.name(), instr, regno, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
