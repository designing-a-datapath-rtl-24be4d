// tb_rand2sel: self-checking test of the second-operand selector: every
// rule with random instructions and register values; the reference forms
// the immediate fields arithmetically (shift and mask, sign by subtraction).
module tb_rand2sel;
  import thumb_pkg::*;
  rand2_e r; logic [15:0] instr; logic [31:0] rb, shiftin;
  rand2sel dut (.cRand2(r), .instr, .rb, .shiftin);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int unsigned u; int want;
      r = rand2_e'($urandom_range(0, 8)); instr = 16'($urandom); rb = $urandom; #1;
      u = int'(instr);
      case (r)
        RAND_REGB:   want = int'(rb);
        RAND_IMM3:   want = (u / 64) % 8;
        RAND_RIMM3:  want = ((u / 1024) % 2) ? (u / 64) % 8 : int'(rb);
        RAND_IMM5:   want = (u / 64) % 32;
        RAND_IMM7:   want = u % 128;
        RAND_IMM8:   want = u % 256;
        RAND_SIMM8:  want = (u % 256 >= 128) ? (u % 256) - 256 : u % 256;
        RAND_IMM11:  want = u % 2048;
        default:     want = (u % 2048 >= 1024) ? (u % 2048) - 2048 : u % 2048;
      endcase
      checks++;
      if (shiftin !== 32'(want)) begin failures++; $display("FAIL %s instr=%h got %h want %h", r.name(), instr, shiftin, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
