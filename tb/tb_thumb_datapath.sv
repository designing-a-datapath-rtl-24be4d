// tb_thumb_datapath: end-to-end test of the single-cycle Thumb datapath at
// its default sizes.
//
// A program is assembled in place with the encoders of thumb_asm_pkg and
// loaded into the instruction memory during reset.  It exercises every
// instruction class the datapath implements: immediate and register ALU
// operations, shifts by immediate and by register, adcs/sbcs with the carry,
// muls, negs, bics, mvns, compares followed by taken and untaken conditional
// branches, an unconditional branch, PC-relative add and load, SP-relative
// add/load/store and add/sub sp, high-register add/mov/cmp, register-offset
// load/store, bl (both halves), blx, bx lr, and one unimplemented opcode.
// Each store the program makes is compared with the value worked out by hand
// for that program, and the program must reach its final self-loop after
// exactly as many cycles as it executes instructions (one per cycle).
// The trace ports are used to count how often each mechanism happened.
module tb_thumb_datapath;
  import thumb_pkg::*;
  import thumb_asm_pkg::*;

  localparam int HALT_PC   = 160;
  localparam int EXP_INSTR = 110;   // dynamic instruction count to reach HALT_PC

  logic        clk = 1'b0, rst = 1'b1;
  logic        imem_we = 1'b0;
  logic [31:0] imem_waddr = '0;
  logic [15:0] imem_wdata = '0;
  logic [31:0] pc, mem_addr, mem_wdata;
  logic [15:0] instr;
  logic        undef, mem_wr;
  flags_t      flags;

  thumb_datapath dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] prog [0:255];

  // expected stores, in program order
  logic [31:0] exp_addr [0:18];
  logic [31:0] exp_data [0:18];
  int nstore = 0;

  // mechanism counters
  int n_bc_taken = 0, n_bc_not = 0, n_b = 0, n_bl = 0, n_blx = 0, n_bx = 0;
  int n_ld = 0, n_st = 0, n_flagw = 0, n_undef = 0, n_hi = 0, n_pcrel = 0;
  int n_regshift = 0, n_sp = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic put(int addr, logic [15:0] ins);
    prog[addr/2] = ins;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) prog[i] = b(-2);  // self-loops everywhere else
    put(  0, movs_i(7, 8'h40));
    put(  2, lsls_i(7, 7, 2));          // r7 = 0x100, base of results
    // sum 10..1
    put(  4, movs_i(0, 0));
    put(  6, movs_i(1, 10));
    put(  8, adds_r(0, 0, 1));
    put( 10, subs_i8(1, 1));
    put( 12, bcond(4'h1, -4));          // bne 8
    put( 14, str_i(0, 7, 0));
    // shifts and logic
    put( 16, movs_i(2, 8'h81));
    put( 18, lsls_i(3, 2, 24));
    put( 20, asrs_i(4, 3, 4));
    put( 22, str_i(4, 7, 1));
    put( 24, movs_i(5, 8));
    put( 26, alu_r(7, 3, 5));           // rors r3, r5
    put( 28, str_i(3, 7, 2));
    put( 30, movs_i(6, 8'hF0));
    put( 32, alu_r(0, 6, 2));           // ands
    put( 34, alu_r(1, 6, 2));           // eors
    put( 36, alu_r(12, 6, 3));          // orrs
    put( 38, alu_r(15, 5, 6));          // mvns r5, r6
    put( 40, str_i(5, 7, 3));
    // muls, negs, bics
    put( 42, movs_i(0, 13));
    put( 44, movs_i(1, 11));
    put( 46, alu_r(13, 0, 1));          // muls
    put( 48, alu_r(9, 1, 0));           // negs r1, r0
    put( 50, str_i(1, 7, 4));
    put( 52, movs_i(2, 8'hFF));
    put( 54, alu_r(14, 2, 0));          // bics
    put( 56, str_i(2, 7, 5));
    // carry chain
    put( 58, movs_i(0, 0));
    put( 60, subs_i8(0, 1));            // r0 = -1, C = 0
    put( 62, movs_i(1, 1));
    put( 64, adds_r(2, 0, 1));          // 0, C = 1
    put( 66, movs_i(3, 5));             // C kept
    put( 68, alu_r(5, 3, 1));           // adcs: 7, C = 0
    put( 70, alu_r(6, 3, 1));           // sbcs: 5
    put( 72, str_i(3, 7, 6));
    // signed compare and branches
    put( 74, movs_i(4, 3));
    put( 76, cmp_i(4, 5));
    put( 78, bcond(4'hA, 1));           // bge 84: not taken
    put( 80, movs_i(5, 1));
    put( 82, b(0));                     // b 86
    put( 84, movs_i(5, 2));
    put( 86, str_i(5, 7, 7));
    put( 88, bcond(4'hC, 0));           // bgt 92: taken (movs cleared N)
    put( 90, movs_i(5, 9));
    put( 92, str_i(5, 7, 8));
    // PC-relative
    put( 94, add_pc(0, 1));             // r0 = 100
    put( 96, str_i(0, 0, 0));           // [100] = 100
    put( 98, ldr_pc(1, 0));             // r1 = [100]
    put(100, adds_i8(1, 1));
    put(102, str_i(1, 7, 9));
    // stack pointer
    put(104, movs_i(2, 8'h80));
    put(106, lsls_i(2, 2, 2));
    put(108, mov_hi(13, 2));            // sp = 0x200
    put(110, subsp(2));                 // sp = 0x1F8
    put(112, str_sp(1, 1));             // [0x1FC] = 101
    put(114, ldr_sp(3, 1));
    put(116, add_sp(4, 2));             // r4 = 0x200
    put(118, addsp(2));                 // sp = 0x200
    put(120, add_hi(4, 13));            // r4 = 0x400
    put(122, str_i(4, 7, 10));
    put(124, str_i(3, 7, 11));
    // register offset
    put(126, movs_i(0, 8));
    put(128, str_r(4, 7, 0));
    put(130, ldr_r(5, 7, 0));
    put(132, lsrs_i(5, 5, 10));
    put(134, str_i(5, 7, 12));
    // calls
    put(136, bl1(164 - 140));
    put(138, bl2(164 - 140));
    put(140, str_i(0, 7, 13));
    put(142, movs_i(6, 169));
    put(144, blx(6));
    put(146, str_i(0, 7, 14));
    put(148, mov_hi(8, 7));
    put(150, cmp_hi(8, 7));
    put(152, bcond(4'h1, 2));           // bne 160: not taken
    put(154, movs_i(0, 8'h77));
    put(156, str_i(0, 7, 15));
    put(158, 16'hB500);                 // push {lr}: not implemented
    put(160, b(-2));                    // halt
    put(164, movs_i(0, 42));
    put(166, bx(14));
    put(168, movs_i(0, 43));
    put(170, lsls_i(0, 0, 1));
    put(172, bx(14));

    exp_addr = '{32'h100, 32'h104, 32'h108, 32'h10C, 32'h110, 32'h114, 32'h118,
                 32'h11C, 32'h120, 32'd100, 32'h124, 32'h1FC, 32'h128, 32'h12C,
                 32'h108, 32'h130, 32'h134, 32'h138, 32'h13C};
    exp_data = '{32'd55, 32'hF8100000, 32'h00810000, 32'hFF7EFFFE, 32'hFFFFFF71,
                 32'h70, 32'd5, 32'd1, 32'd1, 32'd100, 32'd101, 32'd101,
                 32'h400, 32'd101, 32'h400, 32'd1, 32'd42, 32'd86, 32'h77};
  end

  // Load the program during reset, then run.
  int cycles = 0;
  int halted_at = -1;
  initial begin
    #1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 32'(2*i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
  end

  // Observe every executed instruction (sampled just before the clock edge).
  logic [31:0] pc_before;
  logic        was_bc;
  flags_t      flags_before;
  always @(negedge clk) if (!rst) begin
    if (pc == HALT_PC && halted_at < 0) halted_at = cycles;
    if (mem_wr) begin
      if (nstore < 19) begin
        check($sformatf("store %0d addr", nstore), mem_addr, exp_addr[nstore]);
        check($sformatf("store %0d data", nstore), mem_wdata, exp_data[nstore]);
      end else begin
        checks++; failures++;
        $display("FAIL unexpected store %h <- %h", mem_addr, mem_wdata);
      end
      nstore++;
      n_st++;
    end
    if (undef) n_undef++;
    casez (instr)
      16'b1101_????_????????: if (instr[11:9] != 3'b111) was_bc = 1'b1;
      16'b11100???????????:   n_b++;
      16'b11111???????????:   n_bl++;
      16'b010001111???????:   n_blx++;
      16'b010001110???????:   n_bx++;
      16'b01001???????????:   begin n_ld++; n_pcrel++; end
      16'b10100???????????:   n_pcrel++;
      16'b01011???????????, 16'b01101???????????, 16'b10011???????????: n_ld++;
      16'b010000_0010??????, 16'b010000_0011??????,
      16'b010000_0100??????, 16'b010000_0111??????: n_regshift++;
      16'b0100010?????????:   n_hi++;
      16'b10110000????????, 16'b10101???????????, 16'b1001????????????: n_sp++;
      default: ;
    endcase
    pc_before = pc;
    flags_before = flags;
  end

  always @(posedge clk) if (!rst) begin
    cycles <= cycles + 1;
    #1;
    if (was_bc) begin
      if (pc == pc_before + 2) n_bc_not++; else n_bc_taken++;
      was_bc = 1'b0;
    end
    if (flags != flags_before) n_flagw++;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    was_bc = 1'b0;
    wait (!rst);
    wait (halted_at >= 0);
    repeat (3) @(negedge clk);
    check("cycles to reach halt", 32'(halted_at), 32'(EXP_INSTR));
    check("number of stores", 32'(nstore), 32'd19);
    check("flags at halt (NZCV)", 32'(flags), 32'b0010);
    $display("mechanisms:");
    need("conditional branch taken", n_bc_taken);
    need("conditional branch not taken", n_bc_not);
    need("unconditional branch", n_b);
    need("bl (second half, links)", n_bl);
    need("blx (links)", n_blx);
    need("bx (return)", n_bx);
    need("load", n_ld);
    need("store", n_st);
    need("PC-relative address", n_pcrel);
    need("SP-relative operation", n_sp);
    need("high-register operation", n_hi);
    need("shift by register", n_regshift);
    need("flags changed", n_flagw);
    need("unimplemented opcode", n_undef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: halt address not reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
