// tb_alusel: self-checking test of the ALU-operation selector: fixed rules
// map to their operation, Bit9 and Bit7 choose add or subtract by the bit.
module tb_alusel;
  import thumb_pkg::*;
  alusel_e s; logic [15:0] instr; aluop_e op;
  alusel dut (.cAluSel(s), .instr, .cAluOp(op));
  int checks = 0, failures = 0;
  aluop_e fixed [13] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_EOR, ALU_ORR, ALU_BIC, ALU_MVN,
                         ALU_MOV, ALU_ADC, ALU_SBC, ALU_NEG, ALU_MUL, ALU_ADR};
  initial begin
    for (int i = 0; i < 2000; i++) begin
      aluop_e want;
      s = alusel_e'($urandom_range(0, 14)); instr = 16'($urandom); #1;
      if (s == AS_BIT9)      want = instr[9] ? ALU_SUB : ALU_ADD;
      else if (s == AS_BIT7) want = instr[7] ? ALU_SUB : ALU_ADD;
      else                   want = fixed[int'(s)];
      checks++;
      if (op !== want) begin failures++; $display("FAIL %s instr=%h got %s", s.name(), instr, op.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
