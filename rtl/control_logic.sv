// control_logic: instruction decoder and branch decision of the RF stage.
//
// Combinational. Decodes the instruction in the RF stage into the datapath
// controls of mips_pkg::ctrl_t (PCSEL, WASEL, WDSEL, ASEL, BSEL, SEXT,
// ALUFN, WERF, Wr) plus the facts the hazard and bypass logic need (which
// sources are read, whether it is a control transfer). The source-use
// flags reads_rs/reads_rt depend on the instruction only (never on bz), so
// they are decoded in a block of their own. beq/bne use the
// comparator output bz, so the branch is decided in the RF stage. An
// instruction outside the supported subset becomes a trap: PC to
// 0x80000040 and PC+4 into register 27, so that software can emulate it.
// take_irq replaces the instruction by an interrupt: PC to 0x80000080 and
// the PC+4 of the replaced instruction into register 27 (it has not run;
// the handler resumes at register 27 minus 4). The control signal names are
// the datapath's; the instruction subset, the trap register and which
// vector serves which event are this design's choice.
module control_logic
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        bz,
  input  logic        take_irq,
  output ctrl_t       ctrl,
  output logic        reads_rs,
  output logic        reads_rt
);

  logic [5:0] op, fn;

  assign op = instr[31:26];
  assign fn = instr[5:0];

  always_comb begin
    ctrl          = '0;
    ctrl.pcsel    = PCSEL_PC4;
    ctrl.wasel    = WASEL_RD;
    ctrl.wdsel    = WDSEL_ALU;
    ctrl.asel     = ASEL_REG;
    ctrl.bsel     = BSEL_REG;
    ctrl.sext     = 1'b1;
    ctrl.alufn    = ALU_ADD;

    unique case (op)
      OP_RTYPE: begin
        ctrl.werf     = 1'b1;
        unique case (fn)
          FN_SLL:  begin ctrl.alufn = ALU_SLL; ctrl.asel = ASEL_SHAMT; end
          FN_SRL:  begin ctrl.alufn = ALU_SRL; ctrl.asel = ASEL_SHAMT; end
          FN_SRA:  begin ctrl.alufn = ALU_SRA; ctrl.asel = ASEL_SHAMT; end
          FN_SLLV: ctrl.alufn = ALU_SLL;
          FN_SRLV: ctrl.alufn = ALU_SRL;
          FN_SRAV: ctrl.alufn = ALU_SRA;
          FN_ADD, FN_ADDU: ctrl.alufn = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alufn = ALU_SUB;
          FN_AND:  ctrl.alufn = ALU_AND;
          FN_OR:   ctrl.alufn = ALU_OR;
          FN_XOR:  ctrl.alufn = ALU_XOR;
          FN_NOR:  ctrl.alufn = ALU_NOR;
          FN_SLT:  ctrl.alufn = ALU_SLT;
          FN_SLTU: ctrl.alufn = ALU_SLTU;
          FN_JR: begin
            ctrl.werf     = 1'b0;
            ctrl.pcsel    = PCSEL_JT;
            ctrl.is_cti   = 1'b1;
            ctrl.redirect = 1'b1;
          end
          FN_JALR: begin
            ctrl.wdsel    = WDSEL_PC4;
            ctrl.pcsel    = PCSEL_JT;
            ctrl.is_cti   = 1'b1;
            ctrl.redirect = 1'b1;
            ctrl.link     = 1'b1;
          end
          default: ctrl.illop = 1'b1;
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI: begin
        ctrl.werf     = 1'b1;
        ctrl.wasel    = WASEL_RT;
        ctrl.bsel     = BSEL_IMM;
        unique case (op)
          OP_SLTI:  ctrl.alufn = ALU_SLT;
          OP_SLTIU: ctrl.alufn = ALU_SLTU;
          OP_ANDI:  begin ctrl.alufn = ALU_AND; ctrl.sext = 1'b0; end
          OP_ORI:   begin ctrl.alufn = ALU_OR;  ctrl.sext = 1'b0; end
          OP_XORI:  begin ctrl.alufn = ALU_XOR; ctrl.sext = 1'b0; end
          default:  ctrl.alufn = ALU_ADD;
        endcase
      end
      OP_LUI: begin
        ctrl.werf  = 1'b1;
        ctrl.wasel = WASEL_RT;
        ctrl.bsel  = BSEL_IMM;
        ctrl.sext  = 1'b0;
        ctrl.asel  = ASEL_16;
        ctrl.alufn = ALU_SLL;
      end
      OP_LW: begin
        ctrl.werf     = 1'b1;
        ctrl.wasel    = WASEL_RT;
        ctrl.wdsel    = WDSEL_MEM;
        ctrl.bsel     = BSEL_IMM;
      end
      OP_SW: begin
        ctrl.wr       = 1'b1;
        ctrl.bsel     = BSEL_IMM;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.is_cti   = 1'b1;
        if ((op == OP_BEQ) == bz) begin
          ctrl.pcsel    = PCSEL_BT;
          ctrl.redirect = 1'b1;
        end
      end
      OP_J, OP_JAL: begin
        ctrl.pcsel    = PCSEL_JA;
        ctrl.is_cti   = 1'b1;
        ctrl.redirect = 1'b1;
        if (op == OP_JAL) begin
          ctrl.werf  = 1'b1;
          ctrl.wasel = WASEL_31;
          ctrl.wdsel = WDSEL_PC4;
          ctrl.link  = 1'b1;
        end
      end
      default: ctrl.illop = 1'b1;
    endcase

    // Traps: the instruction is replaced by a write of PC+4 to register 27
    // and a jump to the trap vector.
    if (ctrl.illop || take_irq) begin
      ctrl          = '0;
      ctrl.illop    = !take_irq;
      ctrl.pcsel    = take_irq ? PCSEL_IRQ : PCSEL_ILLOP;
      ctrl.wasel    = WASEL_27;
      ctrl.wdsel    = WDSEL_PC4;
      ctrl.asel     = ASEL_REG;
      ctrl.bsel     = BSEL_REG;
      ctrl.sext     = 1'b1;
      ctrl.alufn    = ALU_ADD;
      ctrl.werf     = 1'b1;
      ctrl.redirect = 1'b1;
    end
  end

  // Which register fields the instruction reads (for bypass and stall).
  always_comb begin
    reads_rs = 1'b0;
    reads_rt = 1'b0;
    unique case (op)
      OP_RTYPE: begin
        unique case (fn)
          FN_SLL, FN_SRL, FN_SRA: reads_rt = 1'b1;
          FN_SLLV, FN_SRLV, FN_SRAV, FN_ADD, FN_ADDU, FN_SUB, FN_SUBU,
          FN_AND, FN_OR, FN_XOR, FN_NOR, FN_SLT, FN_SLTU: begin
            reads_rs = 1'b1;
            reads_rt = 1'b1;
          end
          FN_JR, FN_JALR: reads_rs = 1'b1;
          default: ;
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LW:
        reads_rs = 1'b1;
      OP_SW, OP_BEQ, OP_BNE: begin
        reads_rs = 1'b1;
        reads_rt = 1'b1;
      end
      default: ;
    endcase
    if (take_irq) begin
      reads_rs = 1'b0;
      reads_rt = 1'b0;
    end
  end

endmodule
