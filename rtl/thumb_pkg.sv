// thumb_pkg: types and constants shared by the single-cycle Thumb datapath.
//
// The datapath is steered by a bundle of "decoded" control signals, one set per
// instruction, looked up from the opcode by the decoder.  Each control signal
// takes a small number of named values (register-selection rules, operand
// rules, shift rules, ALU rules, write rules).  The names follow the decoding
// tables of the design; the bit patterns chosen for them are this design's own
// and carry no meaning beyond being distinct.
package thumb_pkg;

  // Architectural register numbers with fixed roles.
  localparam logic [3:0] REG_SP = 4'd13;
  localparam logic [3:0] REG_LR = 4'd14;
  localparam logic [3:0] REG_PC = 4'd15;

  // Rule for choosing a register number (cRegSelA/B/C).
  //   RS_X  instr[2:0]            RS_Y  instr[5:3]
  //   RS_Z  instr[8:6]            RS_W  instr[10:8]
  //   RS_XX {instr[7],instr[2:0]} RS_YY instr[6:3]
  //   RS_SP/RS_LR/RS_PC fixed     RS_NONE don't care (reads r0)
  typedef enum logic [3:0] {
    RS_NONE, RS_X, RS_Y, RS_Z, RS_W, RS_XX, RS_YY, RS_SP, RS_LR, RS_PC
  } regsel_e;

  // Rule for the shifter input (cRand2).  RImm3 picks rb or imm3 by instr[10].
  typedef enum logic [3:0] {
    RAND_REGB, RAND_IMM3, RAND_RIMM3, RAND_IMM5, RAND_IMM7,
    RAND_IMM8, RAND_SIMM8, RAND_IMM11, RAND_SIMM11
  } rand2_e;

  // Shifter operation (cShiftOp).
  typedef enum logic [1:0] { SH_LSL, SH_LSR, SH_ASR, SH_ROR } shiftop_e;

  // Rule for the shift amount (cShiftAmt).
  typedef enum logic [2:0] {
    AMT_SH0, AMT_SH1, AMT_SH2, AMT_SH12, AMT_IMM, AMT_REG
  } shiftamt_e;

  // ALU operation (cAluOp).  ALU_ADR adds to the first operand rounded down
  // to a multiple of 4 (PC-relative addressing).
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_EOR, ALU_ORR, ALU_BIC, ALU_MVN,
    ALU_MOV, ALU_ADC, ALU_SBC, ALU_NEG, ALU_MUL, ALU_ADR
  } aluop_e;

  // Rule for the ALU operation (cAluSel): either a fixed operation, or add /
  // subtract chosen by instruction bit 9 or bit 7.
  typedef enum logic [3:0] {
    AS_ADD, AS_SUB, AS_AND, AS_EOR, AS_ORR, AS_BIC, AS_MVN,
    AS_MOV, AS_ADC, AS_SBC, AS_NEG, AS_MUL, AS_ADR, AS_BIT9, AS_BIT7
  } alusel_e;

  // Three-way write rule (cWReg, cWLink): never, always, or conditional.
  // For cWReg the conditional value follows the condition test; for cWLink
  // it follows instr[7] (bx / blx).
  typedef enum logic [1:0] { W_N, W_Y, W_C } wrule_e;

  // Condition flags, N Z C V.
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // The decoded control signals of one instruction.
  typedef struct packed {
    regsel_e   sel_a;     // cRegSelA
    regsel_e   sel_b;     // cRegSelB
    regsel_e   sel_c;     // cRegSelC
    rand2_e    rand2;     // cRand2
    shiftop_e  shift_op;  // cShiftOp
    shiftamt_e shift_amt; // cShiftAmt
    alusel_e   alu_sel;   // cAluSel
    logic      mem_rd;    // cMemRd
    logic      mem_wr;    // cMemWr
    logic      wflags;    // cWFlags
    wrule_e    wreg;      // cWReg
    wrule_e    wlink;     // cWLink
    logic      undef;     // opcode not implemented: executes as a no-op
  } ctrl_t;

  // Settings under which an instruction changes nothing but the PC.
  localparam ctrl_t CTRL_NOP = '{
    sel_a: RS_NONE, sel_b: RS_NONE, sel_c: RS_NONE, rand2: RAND_REGB,
    shift_op: SH_LSL, shift_amt: AMT_SH0, alu_sel: AS_MOV,
    mem_rd: 1'b0, mem_wr: 1'b0, wflags: 1'b0, wreg: W_N, wlink: W_N,
    undef: 1'b0
  };

endpackage
