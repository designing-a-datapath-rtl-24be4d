// tb_thumb_random: random-program co-simulation of the single-cycle Thumb
// datapath against an instruction-set model written in this testbench.
//
// Each of NPROG programs starts with a prologue that gives r0..r7 known
// values, points r7 and SP at a data area and fills the 32 words there, so
// that every later load reads a known value.  Then NINSTR random
// instructions follow, drawn from the implemented set (shifts, add/sub in all
// forms, mov/cmp, the whole register ALU group, high-register add/mov/cmp,
// adr/add sp, word loads and stores based on r7 and SP, and forward b<c>, b
// and bl).  Random instructions write only r0..r6 and r8..r12, so the bases
// stay valid.  Padding and a self-loop close the program.
//
// The model executes the same program from its own copy of the code, with
// the Thumb rules for results and flags.  After every clock edge the model's
// PC, r0..r14 and NZCV are compared with the datapath's, so each instruction
// is checked in the cycle it executes.
module tb_thumb_random;
  import thumb_pkg::*;
  import thumb_asm_pkg::*;

  localparam int NPROG  = 12;
  localparam int NINSTR = 600;
  localparam int DATA   = 32'h400;   // data area base (byte address)

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

  // ---------------------------------------------------------------- program
  logic [15:0] prog [0:2047];
  int          plen, halt_pc;

  function automatic int lo();  return $urandom_range(0, 6); endfunction
  function automatic int hi();  return $urandom_range(8, 12); endfunction

  task automatic gen_program();
    int a = 0;
    // prologue: r0..r6 random bytes, r7 = DATA, sp = DATA + 128, fill data
    for (int r = 0; r < 7; r++) begin prog[a] = movs_i(r, $urandom_range(0, 255)); a++; end
    prog[a] = movs_i(7, DATA >> 4); a++;
    prog[a] = lsls_i(7, 7, 4); a++;
    prog[a] = mov_hi(13, 7); a++;
    prog[a] = add_sp(6, 32); a++;          // r6 = sp + 128
    prog[a] = mov_hi(13, 6); a++;          // sp = DATA + 128
    for (int r = 0; r < 6; r++) begin prog[a] = lsls_i(r, r, $urandom_range(0, 31)); a++; end
    for (int w = 0; w < 32; w++) begin prog[a] = str_i(w % 6, 7, w); a++; end
    for (int w = 0; w < 32; w++) begin prog[a] = str_sp(w % 6, w); a++; end
    for (int r = 8; r < 13; r++) begin prog[a] = mov_hi(r, r - 8); a++; end
    prog[a] = str_r(0, 7, 7); a++;         // word at r7 + r7, used by reg+reg transfers
    // random body
    for (int i = 0; i < NINSTR; i++) begin
      logic [15:0] x;
      case ($urandom_range(0, 21))
        0: x = lsls_i(lo(), lo(), $urandom_range(0, 31));
        1: x = lsrs_i(lo(), lo(), $urandom_range(0, 31));
        2: x = asrs_i(lo(), lo(), $urandom_range(0, 31));
        3: x = ($urandom_range(0, 1)) ? adds_r(lo(), lo(), lo()) : subs_r(lo(), lo(), lo());
        4: x = ($urandom_range(0, 1)) ? adds_i3(lo(), lo(), $urandom_range(0, 7))
                                      : subs_i3(lo(), lo(), $urandom_range(0, 7));
        5: x = movs_i(lo(), $urandom_range(0, 255));
        6: x = cmp_i(lo(), $urandom_range(0, 255));
        7: x = ($urandom_range(0, 1)) ? adds_i8(lo(), $urandom_range(0, 255))
                                      : subs_i8(lo(), $urandom_range(0, 255));
        8, 9, 10: x = alu_r($urandom_range(0, 15), lo(), lo());
        11: x = add_hi(($urandom_range(0, 1)) ? hi() : lo(), $urandom_range(0, 12));
        12: x = mov_hi(($urandom_range(0, 1)) ? hi() : lo(), $urandom_range(0, 14));
        13: x = cmp_hi($urandom_range(0, 12), $urandom_range(0, 14));
        14: x = ($urandom_range(0, 1)) ? add_pc(lo(), $urandom_range(0, 255))
                                       : add_sp(lo(), $urandom_range(0, 255));
        15: x = ($urandom_range(0, 1)) ? str_i(lo(), 7, $urandom_range(0, 31))
                                       : ldr_i(lo(), 7, $urandom_range(0, 31));
        16: x = ($urandom_range(0, 1)) ? str_sp(lo(), $urandom_range(0, 31))
                                       : ldr_sp(lo(), $urandom_range(0, 31));
        17, 18: x = bcond($urandom_range(0, 13), $urandom_range(0, 3));
        19: x = b($urandom_range(0, 3));
        20: begin  // bl to a forward target, written as its two halves
          int off = 2 * $urandom_range(0, 3);
          prog[a] = bl1(off); a++;
          x = bl2(off);
        end
        default: x = ($urandom_range(0, 1)) ? str_r(lo(), 7, 7) : ldr_r(lo(), 7, 7);
      endcase
      prog[a] = x; a++;
    end
    for (int i = 0; i < 8; i++) begin prog[a] = mov_hi(8, 8); a++; end
    // A branch must not land on the second half of a bl: turn such branches
    // into padding, and such bl offsets into 0.
    for (int k = 0; k < a; k++) begin
      logic [15:0] x;
      int t;
      x = prog[k];
      t = -1;
      if (x[15:12] == 4'b1101) t = k + 2 + int'(x[7:0]);
      if (x[15:11] == 5'b11100) t = k + 2 + int'(x[10:0]);
      if (t >= 0 && prog[t][15:11] == 5'b11111) prog[k] = mov_hi(8, 8);
      if (x[15:11] == 5'b11111) begin
        t = k + 1 + int'(x[10:0]);
        if (prog[t][15:11] == 5'b11111) begin prog[k] = bl2(0); prog[k-1] = bl1(0); end
      end
    end
    halt_pc = 2 * a;
    prog[a] = b(-2); a++;
    plen = a;
  endtask

  // ----------------------------------------------------------------- model
  logic [31:0] R [0:15];
  logic        N, Z, C, V;
  logic [31:0] M [int];

  function automatic logic [31:0] rdreg(int n);
    return (n == 15) ? R[15] + 4 : R[n];
  endfunction

  // x + y + cin, setting C and V from the wide sums
  function automatic logic [31:0] addc(logic [31:0] x, logic [31:0] y, logic cin,
                                       output logic co, output logic ov);
    longint unsigned u = longint'(x) + longint'(y) + longint'(cin);
    longint          s = longint'($signed(x)) + longint'($signed(y)) + longint'(cin);
    co = u[32];
    ov = (s > 64'sd2147483647) || (s < -64'sd2147483648);
    return u[31:0];
  endfunction

  function automatic void nz(logic [31:0] r);
    N = r[31]; Z = (r == 0);
  endfunction

  // ARM shift by a register amount; C changes only for a nonzero amount.
  function automatic logic [31:0] shreg(int kind, logic [31:0] v, int n);
    logic [31:0] r = v;
    if (n == 0) return v;
    case (kind)
      0: begin C = (n <= 32) ? v[32 - n] : 1'b0; r = (n < 32) ? v << n : 0; end
      1: begin C = (n <= 32) ? v[n - 1] : 1'b0;  r = (n < 32) ? v >> n : 0; end
      2: begin C = v[(n < 32) ? n - 1 : 31];     r = (n < 32) ? 32'($signed(v) >>> n) : {32{v[31]}}; end
      default: begin
        int k = n % 32;
        r = (k == 0) ? v : ((v >> k) | (v << (32 - k)));
        C = r[31];
      end
    endcase
    return r;
  endfunction

  function automatic logic [31:0] ld(logic [31:0] addr);
    int k = int'(addr[11:2]);
    return M.exists(k) ? M[k] : 32'hDEADBEEF;
  endfunction

  // Execute one instruction on the model.
  task automatic step();
    logic [15:0] i = prog[R[15][11:1]];
    logic [31:0] npc = R[15] + 2;
    logic [31:0] r, a, bv;
    logic        co, ov;
    int rd = int'(i[2:0]), rn = int'(i[5:3]), rm = int'(i[8:6]), rw = int'(i[10:8]);
    int imm5 = int'(i[10:6]), imm8 = int'(i[7:0]);
    casez (i)
      16'b000_00_???????????, 16'b000_01_???????????, 16'b000_10_???????????: begin
        int n = imm5;
        if (i[12:11] != 2'b00 && n == 0) n = 32;
        r = shreg(int'(i[12:11]), R[rn], n); nz(r); R[rd] = r;
      end
      16'b00011_??_?????????: begin
        bv = i[10] ? 32'(rm) : R[rm];
        r = i[9] ? addc(R[rn], ~bv, 1, co, ov) : addc(R[rn], bv, 0, co, ov);
        nz(r); C = co; V = ov; R[rd] = r;
      end
      16'b00100_???_????????: begin r = 32'(imm8); nz(r); R[rw] = r; end
      16'b00101_???_????????: begin r = addc(R[rw], ~32'(imm8), 1, co, ov); nz(r); C = co; V = ov; end
      16'b00110_???_????????: begin r = addc(R[rw], 32'(imm8), 0, co, ov); nz(r); C = co; V = ov; R[rw] = r; end
      16'b00111_???_????????: begin r = addc(R[rw], ~32'(imm8), 1, co, ov); nz(r); C = co; V = ov; R[rw] = r; end
      16'b010000_????_??????: begin
        a = R[rd]; bv = R[rn];
        case (i[9:6])
          4'h0: begin r = a & bv; nz(r); R[rd] = r; end
          4'h1: begin r = a ^ bv; nz(r); R[rd] = r; end
          4'h2: begin r = shreg(0, a, int'(bv[7:0])); nz(r); R[rd] = r; end
          4'h3: begin r = shreg(1, a, int'(bv[7:0])); nz(r); R[rd] = r; end
          4'h4: begin r = shreg(2, a, int'(bv[7:0])); nz(r); R[rd] = r; end
          4'h5: begin r = addc(a, bv, C, co, ov); nz(r); C = co; V = ov; R[rd] = r; end
          4'h6: begin r = addc(a, ~bv, C, co, ov); nz(r); C = co; V = ov; R[rd] = r; end
          4'h7: begin r = shreg(3, a, int'(bv[7:0])); nz(r); R[rd] = r; end
          4'h8: begin r = a & bv; nz(r); end
          4'h9: begin r = addc(0, ~bv, 1, co, ov); nz(r); C = co; V = ov; R[rd] = r; end
          4'hA: begin r = addc(a, ~bv, 1, co, ov); nz(r); C = co; V = ov; end
          4'hB: begin r = addc(a, bv, 0, co, ov); nz(r); C = co; V = ov; end
          4'hC: begin r = a | bv; nz(r); R[rd] = r; end
          4'hD: begin r = a * bv; nz(r); R[rd] = r; end
          4'hE: begin r = a & ~bv; nz(r); R[rd] = r; end
          default: begin r = ~bv; nz(r); R[rd] = r; end
        endcase
      end
      16'b010001_??_????????: begin
        int dn = int'({i[7], i[2:0]}), ms = int'(i[6:3]);
        case (i[9:8])
          2'd0: R[dn] = rdreg(dn) + rdreg(ms);
          2'd1: begin r = addc(rdreg(dn), ~rdreg(ms), 1, co, ov); nz(r); C = co; V = ov; end
          default: R[dn] = rdreg(ms);
        endcase
      end
      16'b01010_00_?????????: M[int'(((R[rn] + R[rm]) >> 2) % 1024)] = R[rd];
      16'b01011_00_?????????: R[rd] = ld(R[rn] + R[rm]);
      16'b01100_???????????:  M[int'(((R[rn] + 32'(4 * imm5)) >> 2) % 1024)] = R[rd];
      16'b01101_???????????:  R[rd] = ld(R[rn] + 32'(4 * imm5));
      16'b10010_???_????????: M[int'(((R[13] + 32'(4 * imm8)) >> 2) % 1024)] = R[rw];
      16'b10011_???_????????: R[rw] = ld(R[13] + 32'(4 * imm8));
      16'b10100_???_????????: R[rw] = ((R[15] + 4) & ~32'd3) + 32'(4 * imm8);
      16'b10101_???_????????: R[rw] = R[13] + 32'(4 * imm8);
      16'b1101_????_????????: begin
        logic t;
        case (i[11:8])
          0: t = Z;  1: t = !Z;  2: t = C;  3: t = !C;  4: t = N;  5: t = !N;
          6: t = V;  7: t = !V;  8: t = C && !Z;  9: t = !C || Z;
          10: t = N == V;  11: t = N != V;  12: t = !Z && N == V;  default: t = Z || N != V;
        endcase
        if (t) npc = R[15] + 4 + 32'(2 * $signed(i[7:0]));
      end
      16'b11100_???????????: npc = R[15] + 4 + 32'(2 * $signed(i[10:0]));
      16'b11110_???????????: R[14] = R[15] + 4 + 32'(4096 * $signed(i[10:0]));
      16'b11111_???????????: begin npc = R[14] + 32'(2 * int'(i[10:0])); R[14] = R[15] + 2; end
      default: begin checks++; failures++; $display("FAIL model met unexpected %h", i); end
    endcase
    R[15] = npc;
  endtask

  // ------------------------------------------------------------------ run
  int n_taken = 0, n_not = 0, n_ld = 0, n_st = 0, n_bl = 0;

  initial begin
    for (int p = 0; p < NPROG; p++) begin
      gen_program();
      rst = 1'b1;
      for (int k = 0; k < plen; k++) begin
        @(negedge clk);
        imem_we = 1'b1; imem_waddr = 32'(2 * k); imem_wdata = prog[k];
      end
      @(negedge clk);
      imem_we = 1'b0;
      @(negedge clk);
      for (int k = 0; k < 15; k++) R[k] = 0;
      R[15] = 0; {N, Z, C, V} = 4'b0000;
      M.delete();
      rst = 1'b0;
      while (R[15] != 32'(halt_pc)) begin
        logic [31:0] pc0;
        logic [15:0] ci;
        pc0 = R[15];
        ci = prog[R[15][11:1]];
        checks++;
        if (instr !== ci || pc !== R[15]) begin
          failures++;
          $display("FAIL prog %0d fetch: pc %h instr %h, model pc %h instr %h", p, pc, instr, R[15], ci);
        end
        if (ci[15:11] inside {5'b01011, 5'b01101, 5'b10011}) n_ld++;
        if (mem_wr) n_st++;
        if (ci[15:11] == 5'b11111) n_bl++;
        step();
        if (ci[15:12] == 4'b1101) begin
          if (R[15] == pc0 + 2) n_not++; else n_taken++;
        end
        @(negedge clk);
        checks++;
        if (pc !== R[15] || flags !== {N, Z, C, V}) begin
          failures++;
          $display("FAIL prog %0d after %h (%h): pc %h flags %b, model pc %h flags %b",
                   p, pc0, ci, pc, flags, R[15], {N, Z, C, V});
        end
        for (int k = 0; k < 15; k++) begin
          checks++;
          if (dut.u_regfile.regs[k] !== R[k]) begin
            failures++;
            $display("FAIL prog %0d after %h (%h): r%0d = %h, model %h",
                     p, pc0, ci, k, dut.u_regfile.regs[k], R[k]);
          end
        end
        if (failures > 20) break;
      end
      if (failures > 20) break;
    end
    $display("conditional branches taken %0d, not taken %0d, loads %0d, stores %0d, bl %0d",
             n_taken, n_not, n_ld, n_st, n_bl);
    checks++;
    if (n_taken == 0 || n_not == 0 || n_ld == 0 || n_st == 0 || n_bl == 0) begin
      failures++; $display("FAIL some instruction class never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPROG * (NINSTR + 2200)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
