// tb_imem: self-checking test of the instruction memory: load random
// halfwords through the load port, then fetch them back by PC in random
// order; the fetch is combinational and pc[0] is ignored.
module tb_imem;
  localparam int W = 128;
  logic clk = 0, we = 0; logic [31:0] pc = 0, waddr = 0; logic [15:0] wdata = 0, instr;
  imem #(.WORDS(W)) dut (.clk, .pc, .instr, .we, .waddr, .wdata);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] model [W];
  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; waddr = 32'(2*i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 400; i++) begin
      pc = $urandom; #1;
      checks++;
      if (instr !== model[pc[7:1]]) begin failures++; $display("FAIL pc=%h got %h", pc, instr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
