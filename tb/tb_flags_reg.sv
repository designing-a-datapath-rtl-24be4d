// tb_flags_reg: self-checking test of the NZCV register: reset to zero,
// loads only when cWFlags is set, holds otherwise.  One load per cycle.
module tb_flags_reg;
  import thumb_pkg::*;
  logic clk = 0, rst = 1, we = 0; flags_t nf, flags;
  flags_reg dut (.clk, .rst, .cWFlags(we), .newflags(nf), .flags);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    flags_t model;
    nf = 4'hF;
    @(negedge clk); @(negedge clk);
    checks++; if (flags !== 4'h0) begin failures++; $display("FAIL reset"); end
    rst = 0; model = 0;
    for (int i = 0; i < 200; i++) begin
      we = 1'($urandom); nf = 4'($urandom);
      @(negedge clk);
      if (we) model = nf;
      checks++;
      if (flags !== model) begin failures++; $display("FAIL cycle %0d got %b want %b", i, flags, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
