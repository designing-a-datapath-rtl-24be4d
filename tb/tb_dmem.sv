// tb_dmem: self-checking test of the data memory: random word writes and
// reads against an associative-array model, reads in the same cycle (no
// latency), memout 0 when not reading, and wrap-around of addresses.
module tb_dmem;
  localparam int W = 64;
  logic clk = 0, rd = 0, wr = 0; logic [31:0] addr = 0, wdata = 0, memout;
  dmem #(.WORDS(W)) dut (.clk, .cMemRd(rd), .cMemWr(wr), .addr, .wdata, .memout);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] model [int];
  initial begin
    // fill
    for (int i = 0; i < W; i++) begin
      @(negedge clk); wr = 1; rd = 0; addr = 32'(4*i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); wr = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      addr = $urandom; rd = 0; wr = 0;
      if ($urandom_range(0, 2) == 0) begin
        wr = 1; wdata = $urandom; model[int'(addr[7:2])] = wdata;
      end else begin
        rd = $urandom_range(0, 3) != 0;
        #1;
        checks++;
        if (memout !== (rd ? model[int'(addr[7:2])] : 32'd0)) begin
          failures++; $display("FAIL read %h rd=%b got %h", addr, rd, memout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
