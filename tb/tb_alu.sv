// tb_alu: self-checking test of the ALU.  Random operands (and boundary
// values such as 0, 0x7FFFFFFF, 0x80000000, 0xFFFFFFFF) for every
// operation; the reference computes results in 64-bit arithmetic and derives
// C and V from signed and unsigned 64-bit sums.
module tb_alu;
  import thumb_pkg::*;
  aluop_e op; logic [31:0] ra, aluin2, aluout; logic shcarry; flags_t flags, newflags;
  alu dut (.cAluOp(op), .ra, .aluin2, .shcarry, .flags, .aluout, .newflags);
  int checks = 0, failures = 0;

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 5))
      0: return 32'h0; 1: return 32'h7FFFFFFF; 2: return 32'h80000000; 3: return 32'hFFFFFFFF;
      default: return $urandom;
    endcase
  endfunction

  // add a + b + c and give {result, C, V} from wide sums
  function automatic logic [33:0] addf(logic [31:0] a, logic [31:0] b, logic c);
    longint unsigned us = longint'(a) + longint'(b) + longint'(c);
    longint          ss = longint'($signed(a)) + longint'($signed(b)) + longint'(c);
    logic [31:0] r = us[31:0];
    return {r, us[32], (ss != longint'($signed(r)))};
  endfunction

  initial begin
    for (int i = 0; i < 6000; i++) begin
      logic [31:0] r; logic c, v; logic [33:0] s;
      op = aluop_e'($urandom_range(0, 12));
      ra = pick(); aluin2 = pick(); shcarry = 1'($urandom); flags = 4'($urandom);
      #1;
      c = flags.c; v = flags.v;
      case (op)
        ALU_ADD: begin s = addf(ra, aluin2, 0); {r, c, v} = s; end
        ALU_ADR: begin s = addf(ra & ~32'd3, aluin2, 0); {r, c, v} = s; end
        ALU_SUB: begin s = addf(ra, ~aluin2, 1); {r, c, v} = s; end
        ALU_ADC: begin s = addf(ra, aluin2, flags.c); {r, c, v} = s; end
        ALU_SBC: begin s = addf(ra, ~aluin2, flags.c); {r, c, v} = s; end
        ALU_NEG: begin s = addf(0, ~aluin2, 1); {r, c, v} = s; end
        ALU_AND: begin r = ra & aluin2; c = shcarry; end
        ALU_EOR: begin r = ra ^ aluin2; c = shcarry; end
        ALU_ORR: begin r = ra | aluin2; c = shcarry; end
        ALU_BIC: begin r = ra & ~aluin2; c = shcarry; end
        ALU_MVN: begin r = ~aluin2; c = shcarry; end
        ALU_MOV: begin r = aluin2; c = shcarry; end
        default: begin r = 32'(longint'(ra) * longint'(aluin2)); end // MUL
      endcase
      checks++;
      if (aluout !== r || newflags !== {r[31], r == 0, c, v}) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h: got %h %b want %h %b", op.name(), ra, aluin2,
                                    aluout, newflags, r, {r[31], r == 0, c, v});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
