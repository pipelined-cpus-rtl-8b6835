// tb_control_logic: decodes one instruction of every supported kind, a few
// illegal encodings and an interrupt, and compares the control bundle and
// source-use flags with the values expected for that instruction.
module tb_control_logic;
  import mips_pkg::*;
  import mips_iss_pkg::enc_r;
  import mips_iss_pkg::enc_i;
  logic [31:0] instr;
  logic        bz, take_irq, reads_rs, reads_rt;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control_logic dut (.instr, .bz, .take_irq, .ctrl, .reads_rs, .reads_rt);

  // Expected fields, in order: pcsel wasel wdsel asel bsel sext alufn werf wr rs rt cti redirect link illop
  task automatic expect_ctl(string name, logic [31:0] ins, logic b, logic irqv,
                            pcsel_e pcs, wasel_e was, wdsel_e wds, asel_e as, bsel_e bs,
                            logic sx, alufn_e fn, logic werf, logic wr, logic rrs, logic rrt,
                            logic cti, logic redir, logic lnk, logic ill);
    instr = ins; bz = b; take_irq = irqv;
    #1;
    checks++;
    if (ctrl.pcsel !== pcs || ctrl.werf !== werf || ctrl.wr !== wr || reads_rs !== rrs ||
        reads_rt !== rrt || ctrl.is_cti !== cti || ctrl.redirect !== redir ||
        ctrl.link !== lnk || ctrl.illop !== ill ||
        (werf && (ctrl.wasel !== was || ctrl.wdsel !== wds)) ||
        ((werf || wr) && wds == WDSEL_ALU && (ctrl.asel !== as || ctrl.bsel !== bs || ctrl.alufn !== fn)) ||
        ((werf || wr) && bs == BSEL_IMM && ctrl.sext !== sx)) begin
      failures++;
      $display("FAIL %s: %p rs=%b rt=%b", name, ctrl, reads_rs, reads_rt);
    end
  endtask

  initial begin
    //          name      instr                              bz irq pcsel        wasel     wdsel      asel        bsel      sx fn        we wr rs rt ct rd lk il
    expect_ctl("add",  enc_r(FN_ADD, 3, 1, 2),              0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  1, 0, 1, 1, 0, 0, 0, 0);
    expect_ctl("sub",  enc_r(FN_SUB, 3, 1, 2),              0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_SUB,  1, 0, 1, 1, 0, 0, 0, 0);
    expect_ctl("nor",  enc_r(FN_NOR, 3, 1, 2),              0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_NOR,  1, 0, 1, 1, 0, 0, 0, 0);
    expect_ctl("sltu", enc_r(FN_SLTU, 3, 1, 2),             0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_SLTU, 1, 0, 1, 1, 0, 0, 0, 0);
    expect_ctl("sll",  enc_r(FN_SLL, 9, 0, 8, 2),           0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_SHAMT, BSEL_REG, 1, ALU_SLL,  1, 0, 0, 1, 0, 0, 0, 0);
    expect_ctl("sra",  enc_r(FN_SRA, 9, 0, 8, 2),           0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_SHAMT, BSEL_REG, 1, ALU_SRA,  1, 0, 0, 1, 0, 0, 0, 0);
    expect_ctl("srlv", enc_r(FN_SRLV, 9, 4, 8),             0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_SRL,  1, 0, 1, 1, 0, 0, 0, 0);
    expect_ctl("addi", enc_i(OP_ADDI, 8, 8, 16'hffff),      0, 0, PCSEL_PC4,   WASEL_RT, WDSEL_ALU, ASEL_REG,   BSEL_IMM, 1, ALU_ADD,  1, 0, 1, 0, 0, 0, 0, 0);
    expect_ctl("sltiu",enc_i(OP_SLTIU, 8, 11, 16'h1),       0, 0, PCSEL_PC4,   WASEL_RT, WDSEL_ALU, ASEL_REG,   BSEL_IMM, 1, ALU_SLTU, 1, 0, 1, 0, 0, 0, 0, 0);
    expect_ctl("andi", enc_i(OP_ANDI, 8, 10, 16'hf),        0, 0, PCSEL_PC4,   WASEL_RT, WDSEL_ALU, ASEL_REG,   BSEL_IMM, 0, ALU_AND,  1, 0, 1, 0, 0, 0, 0, 0);
    expect_ctl("xori", enc_i(OP_XORI, 8, 10, 16'hf),        0, 0, PCSEL_PC4,   WASEL_RT, WDSEL_ALU, ASEL_REG,   BSEL_IMM, 0, ALU_XOR,  1, 0, 1, 0, 0, 0, 0, 0);
    expect_ctl("lui",  enc_i(OP_LUI, 0, 10, 16'h1234),      0, 0, PCSEL_PC4,   WASEL_RT, WDSEL_ALU, ASEL_16,    BSEL_IMM, 0, ALU_SLL,  1, 0, 0, 0, 0, 0, 0, 0);
    expect_ctl("lw",   enc_i(OP_LW, 4, 3, 16'd30),          0, 0, PCSEL_PC4,   WASEL_RT, WDSEL_MEM, ASEL_REG,   BSEL_IMM, 1, ALU_ADD,  1, 0, 1, 0, 0, 0, 0, 0);
    expect_ctl("sw",   enc_i(OP_SW, 4, 2, 16'd20),          0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_IMM, 1, ALU_ADD,  0, 1, 1, 1, 0, 0, 0, 0);
    expect_ctl("beq t",enc_i(OP_BEQ, 1, 2, 16'd40),         1, 0, PCSEL_BT,    WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  0, 0, 1, 1, 1, 1, 0, 0);
    expect_ctl("beq n",enc_i(OP_BEQ, 1, 2, 16'd40),         0, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  0, 0, 1, 1, 1, 0, 0, 0);
    expect_ctl("bne t",enc_i(OP_BNE, 10, 0, 16'hfffe),      0, 0, PCSEL_BT,    WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  0, 0, 1, 1, 1, 1, 0, 0);
    expect_ctl("bne n",enc_i(OP_BNE, 10, 0, 16'hfffe),      1, 0, PCSEL_PC4,   WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  0, 0, 1, 1, 1, 0, 0, 0);
    expect_ctl("j",    {OP_J, 26'h1234},                    0, 0, PCSEL_JA,    WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  0, 0, 0, 0, 1, 1, 0, 0);
    expect_ctl("jal",  {OP_JAL, 26'h1234},                  0, 0, PCSEL_JA,    WASEL_31, WDSEL_PC4, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  1, 0, 0, 0, 1, 1, 1, 0);
    expect_ctl("jr",   enc_r(FN_JR, 0, 31, 0),              0, 0, PCSEL_JT,    WASEL_RD, WDSEL_ALU, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  0, 0, 1, 0, 1, 1, 0, 0);
    expect_ctl("jalr", enc_r(FN_JALR, 31, 5, 0),            0, 0, PCSEL_JT,    WASEL_RD, WDSEL_PC4, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  1, 0, 1, 0, 1, 1, 1, 0);
    expect_ctl("ill op",{6'h3f, 26'h0},                     0, 0, PCSEL_ILLOP, WASEL_27, WDSEL_PC4, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  1, 0, 0, 0, 0, 1, 0, 1);
    expect_ctl("ill fn",enc_r(6'h3f, 1, 2, 3),              0, 0, PCSEL_ILLOP, WASEL_27, WDSEL_PC4, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  1, 0, 0, 0, 0, 1, 0, 1);
    expect_ctl("irq",  enc_i(OP_SW, 4, 2, 16'd20),          0, 1, PCSEL_IRQ,   WASEL_27, WDSEL_PC4, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  1, 0, 0, 0, 0, 1, 0, 0);
    expect_ctl("irq b",enc_i(OP_BEQ, 1, 2, 16'd40),         1, 1, PCSEL_IRQ,   WASEL_27, WDSEL_PC4, ASEL_REG,   BSEL_REG, 1, ALU_ADD,  1, 0, 0, 0, 0, 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
