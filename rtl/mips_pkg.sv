// mips_pkg: opcodes, function codes, control encodings, exception vectors
// and the decoded-control bundle shared by the miniMIPS pipeline.
//
// The select encodings follow the input numbering of the datapath
// multiplexers: PCSEL 0 = PC+4, 1 = branch target, 2 = register jump target,
// 3 = {PC<31:28>, J<25:0>, 00}, 4..6 = the three fixed vectors; WASEL
// 0 = Rd, 1 = Rt, 2 = register 31, 3 = register 27; WDSEL 0 = PC+4 (link),
// 1 = ALU result, 2 = memory data; ASEL 0 = register, 1 = shamt, 2 = 16;
// BSEL 0 = register, 1 = extended immediate. Which vector serves reset,
// illegal instruction and interrupt, and the ALUFN codes, are this
// design's own choice.
package mips_pkg;

  localparam logic [31:0] NOP_INSTR   = 32'h0000_0000;  // sll $0,$0,0
  localparam logic [31:0] RESET_VEC   = 32'h8000_0000;
  localparam logic [31:0] ILLOP_VEC   = 32'h8000_0040;
  localparam logic [31:0] IRQ_VEC     = 32'h8000_0080;
  localparam logic [4:0]  REG_LINK    = 5'd31;
  localparam logic [4:0]  REG_XP      = 5'd27;

  // Primary opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0a;
  localparam logic [5:0] OP_SLTIU = 6'h0b;
  localparam logic [5:0] OP_ANDI  = 6'h0c;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_XORI  = 6'h0e;
  localparam logic [5:0] OP_LUI   = 6'h0f;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // R-type function codes (instruction bits 5:0)
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_JALR = 6'h09;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2a;
  localparam logic [5:0] FN_SLTU = 6'h2b;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA
  } alufn_e;

  typedef enum logic [2:0] {
    PCSEL_PC4   = 3'd0,
    PCSEL_BT    = 3'd1,
    PCSEL_JT    = 3'd2,
    PCSEL_JA    = 3'd3,
    PCSEL_IRQ   = 3'd4,
    PCSEL_ILLOP = 3'd5,
    PCSEL_RESET = 3'd6
  } pcsel_e;

  typedef enum logic [1:0] {WASEL_RD, WASEL_RT, WASEL_31, WASEL_27} wasel_e;
  typedef enum logic [1:0] {WDSEL_PC4, WDSEL_ALU, WDSEL_MEM}        wdsel_e;
  typedef enum logic [1:0] {ASEL_REG, ASEL_SHAMT, ASEL_16}          asel_e;
  typedef enum logic       {BSEL_REG, BSEL_IMM}                     bsel_e;
  // Operand source chosen by the bypass logic
  typedef enum logic [1:0] {BYP_RF, BYP_ALU, BYP_WB}                byp_e;

  typedef struct packed {
    pcsel_e pcsel;     // next-PC select (valid in the RF stage)
    wasel_e wasel;
    wdsel_e wdsel;
    asel_e  asel;
    bsel_e  bsel;
    logic   sext;      // 1: sign-extend Imm, 0: zero-extend
    alufn_e alufn;
    logic   werf;      // write the register file in WB
    logic   wr;        // write data memory in WB
    logic   is_cti;    // branch or jump: the next instruction is its delay slot
    logic   redirect;  // PC leaves the sequential path (taken branch, jump, trap)
    logic   link;      // jal/jalr: link value skips the delay slot
    logic   illop;     // illegal instruction trap
  } ctrl_t;

endpackage
