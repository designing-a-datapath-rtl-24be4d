// tb_shifter: self-checking test of the barrel shifter.  Random values and
// amounts (with extra weight on 0, 1, 31, 32, 33 and large amounts) are
// shifted and compared with a reference that shifts one bit at a time,
// tracking the last bit shifted out as the carry.
module tb_shifter;
  import thumb_pkg::*;
  shiftop_e op; logic [31:0] shiftin, aluin2; logic [7:0] shiftamt; logic cin, shcarry;
  shifter dut (.cShiftOp(op), .shiftin, .shiftamt, .cin, .aluin2, .shcarry);
  int checks = 0, failures = 0;

  function automatic logic [32:0] ref_shift(shiftop_e o, logic [31:0] v, int n, logic c);
    logic [31:0] r = v; logic cc = c;
    if (o == SH_ROR && n != 0) begin
      for (int i = 0; i < (n % 32); i++) r = {r[0], r[31:1]};
      cc = r[31];
      return {cc, r};
    end
    for (int i = 0; i < n; i++) begin
      case (o)
        SH_LSL: begin cc = r[31]; r = {r[30:0], 1'b0}; end
        SH_LSR: begin cc = r[0];  r = {1'b0, r[31:1]}; end
        default: begin cc = r[0]; r = {r[31], r[31:1]}; end
      endcase
    end
    return {cc, r};
  endfunction

  initial begin
    int amts [8] = '{0, 1, 31, 32, 33, 255, 8, 16};
    for (int i = 0; i < 4000; i++) begin
      logic [32:0] want;
      op = shiftop_e'($urandom_range(0, 3));
      shiftin = $urandom;
      shiftamt = (i % 2) ? 8'($urandom) : 8'(amts[$urandom_range(0, 7)]);
      if (i % 3 == 0) shiftamt = 8'($urandom_range(0, 40));
      cin = 1'($urandom);
      #1;
      want = ref_shift(op, shiftin, int'(shiftamt), cin);
      checks++;
      if ({shcarry, aluin2} !== want) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d in=%h n=%0d cin=%b: got %b/%h want %b/%h",
                                    op, shiftin, shiftamt, cin, shcarry, aluin2, want[32], want[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
