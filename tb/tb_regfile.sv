// tb_regfile: self-checking test of the register file with r15 as PC.
// Random sequences of reads and writes are compared with a model: reads of
// r15 give PC+4, the pc port gives the PC, the PC advances to nextpc unless
// r15 is written (then bit 0 of the written value is dropped), and cLink
// writes nextpc to r14.  One update per clock cycle.
module tb_regfile;
  logic clk = 0, rst = 1;
  logic [3:0] a = 0, b = 0, c = 0;
  logic [31:0] ra, rb, rc, pc, nextpc, result = 0;
  logic regwrite = 0, link = 0;
  regfile #(.RESET_PC(32'h40)) dut (.clk, .rst, .cRegA(a), .cRegB(b), .cRegC(c), .ra, .rb, .rc, .pc,
                                    .nextpc, .result, .regwrite, .cLink(link));
  assign nextpc = pc + 2;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] m [16];
  function automatic logic [31:0] rdm(logic [3:0] n);
    return (n == 15) ? m[15] + 4 : m[n];
  endfunction
  task automatic chk(string w, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s got %h want %h", w, got, want); end
  endtask
  initial begin
    @(negedge clk); @(negedge clk);
    for (int i = 0; i < 15; i++) m[i] = 0;
    m[15] = 32'h40;
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      a = 4'($urandom); b = 4'($urandom); c = 4'($urandom);
      regwrite = ($urandom_range(0, 2) != 0);
      if (c == 15) regwrite = ($urandom_range(0, 5) == 0);
      link = ($urandom_range(0, 7) == 0);
      result = $urandom;
      #1;
      chk("ra", ra, rdm(a)); chk("rb", rb, rdm(b)); chk("rc", rc, rdm(c)); chk("pc", pc, m[15]);
      begin
        logic [31:0] np;
        np = m[15] + 2;
        if (regwrite && c == 15) m[15] = {result[31:1], 1'b0};
        else m[15] = np;
        if (regwrite && c != 15) m[c] = result;
        if (link) m[14] = np;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
