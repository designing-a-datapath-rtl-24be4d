// tb_condx: self-checking test of the condition evaluator over all 16
// condition codes and all 16 flag values.  The reference evaluates the
// condition pair selected by cond[3:1] and inverts it when cond[0] is set.
module tb_condx;
  import thumb_pkg::*;
  logic [3:0] cond; flags_t flags; logic enable;
  condx dut (.cCond(cond), .flags, .enable);
  int checks = 0, failures = 0;
  initial begin
    for (int c = 0; c < 16; c++) for (int f = 0; f < 16; f++) begin
      logic base, want;
      cond = 4'(c); flags = 4'(f); #1;
      case (c >> 1)
        0: base = flags.z;
        1: base = flags.c;
        2: base = flags.n;
        3: base = flags.v;
        4: base = flags.c & ~flags.z;
        5: base = ~(flags.n ^ flags.v);
        6: base = ~flags.z & ~(flags.n ^ flags.v);
        default: base = 1'b1;
      endcase
      want = (c[0]) ? ~base : base;
      checks++;
      if (enable !== want) begin failures++; $display("FAIL cond=%h flags=%b got %b", c, f, enable); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
