// minimips4: 4-stage pipelined miniMIPS processor.
//
// The single-cycle miniMIPS datapath is cut into four stages so that the
// instruction memory, the register read, the ALU and the data memory each
// get most of a clock period:
//   IF  fetch at PC; next PC chosen by PCSEL.
//   RF  decode, register read, bypass muxes, immediate extension, operand
//       select (ASEL/BSEL), equality comparator and branch/jump decision.
//   ALU ALU operation.
//   WB  data memory access at the ALU result, write-data select (WDSEL) and
//       register file write.
// Pipeline registers: IF/RF holds IR and PC+4; RF/ALU holds the A and B
// operands, the store data, the write address and the decoded controls;
// ALU/WB holds the result Y, the store data, the write address and the
// controls. The register file is read combinationally in RF and written at
// the end of WB.
//
// Hazards:
//  * Branches and jumps are decided in RF, so exactly one instruction (the
//    one being fetched) follows them. ANNUL_DELAY_SLOT = 0 executes it (a
//    MIPS-style delay slot; jal/jalr then link to PC+8); ANNUL_DELAY_SLOT = 1
//    replaces it by a NOP when the branch is taken (jal/jalr link to PC+4).
//  * Data dependences are resolved by two bypass paths into the RF stage:
//    from the ALU-stage result and from the WB-stage write data. A load
//    followed at once by a user of its result stalls IF and RF for one
//    cycle and sends a bubble into the ALU stage.
//  * An instruction outside the subset traps to 0x80000040, an accepted
//    interrupt (irq, user mode only) to 0x80000080; both write PC+4 of the
//    affected instruction to register 27. Reset starts at 0x80000000.
//
// Interface: clk, synchronous active-high rst, level irq, and a load port
// for the instruction memory (imem_we/imem_waddr/imem_wdata). The register
// write (wb_*) and memory write (mem_*) of each instruction appear in its
// WB cycle; stall, annul, irq_ack and byp_a/byp_b report the hazard
// mechanisms in the cycle they act. Throughput is one instruction per clock
// except for load stalls, traps and annulled slots; latency is 4 clocks.
//
// The stage split, the PCSEL/WASEL/WDSEL/ASEL/BSEL muxes, the early
// comparator, the annulment mux and the bypass rules follow the design
// described for this pipeline. Choices of this design: decoding once in RF
// and piping the controls; forming the write address in RF; feeding the
// comparator and the jump register from the bypassed operands; bypassing a
// jal/jalr link value from the ALU stage; the load stall; the memory sizes
// and the exception vectors' roles.
module minimips4
  import mips_pkg::*;
#(
  parameter bit          ANNUL_DELAY_SLOT = 1'b0,
  parameter int unsigned IMEM_WORDS       = 1024,
  parameter int unsigned DMEM_WORDS       = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        irq,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic        wb_we,
  output logic [4:0]  wb_wa,
  output logic [31:0] wb_wd,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        stall,
  output logic        annul,
  output logic        irq_ack,
  output byp_e        byp_a,
  output byp_e        byp_b
);

  // ------------------------------------------------------------------ IF
  logic [31:0] pc_plus4, instr_if;

  // ------------------------------------------------------------------ RF
  logic [31:0] ir_rf, pc4_rf;
  logic        valid_rf, ds_rf;
  ctrl_t       ctrl_rf;
  logic [31:0] rd1, rd2, opa_rf, opb_rf, imm_ext, a_rf, b_rf, link_rf;
  logic        bz, take_irq, reads_rs, reads_rt;
  logic [4:0]  wa_rf;

  // ----------------------------------------------------------------- ALU
  ctrl_t       ctrl_alu;
  logic [31:0] a_alu, b_alu, sd_alu, link_alu, y_alu, fwd_alu;
  logic [4:0]  wa_alu;
  // The ALU flags are not used by this pipeline: branches are decided
  // by the RF-stage comparator, and no instruction of the subset tests
  // N, V, C or Z.
  logic        flag_n, flag_v, flag_c, flag_z;

  // ------------------------------------------------------------------ WB
  ctrl_t       ctrl_wb;
  logic [31:0] y_wb, sd_wb, link_wb, mrd_wb, wd_wb;
  logic [4:0]  wa_wb;

  // ============================== IF stage ==============================
  pc_unit u_pc (
    .clk      (clk),
    .rst      (rst),
    .hold     (stall),
    .pcsel    (ctrl_rf.pcsel),
    .pc4_rf   (pc4_rf),
    .imm_ext  (imm_ext),
    .jt       (opa_rf),
    .jaddr    (ir_rf[25:0]),
    .pc       (pc),
    .pc_plus4 (pc_plus4)
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .addr  (pc),
    .rdata (instr_if),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  // IF/RF register, with the annulment mux (NOP) in front of IR.
  always_ff @(posedge clk) begin
    if (rst) begin
      ir_rf    <= NOP_INSTR;
      pc4_rf   <= RESET_VEC;
      valid_rf <= 1'b0;
      ds_rf    <= 1'b0;
    end else if (!stall) begin
      ir_rf    <= annul ? NOP_INSTR : instr_if;
      pc4_rf   <= pc_plus4;
      valid_rf <= !annul;
      ds_rf    <= !annul && ctrl_rf.is_cti;
    end
  end

  // ============================== RF stage ==============================
  regfile u_rf (
    .clk (clk),
    .ra1 (ir_rf[25:21]),
    .ra2 (ir_rf[20:16]),
    .rd1 (rd1),
    .rd2 (rd2),
    .wa  (wa_wb),
    .wd  (wd_wb),
    .we  (ctrl_wb.werf)
  );

  hazard_unit #(.ANNUL_DELAY_SLOT(ANNUL_DELAY_SLOT)) u_hz (
    .reads_rs (reads_rs),
    .reads_rt (reads_rt),
    .rs       (ir_rf[25:21]),
    .rt       (ir_rf[20:16]),
    .alu_load (ctrl_alu.werf && ctrl_alu.wdsel == WDSEL_MEM),
    .alu_wa   (wa_alu),
    .redirect (ctrl_rf.redirect),
    .is_cti   (ctrl_rf.is_cti),
    .irq      (irq),
    .rf_valid (valid_rf),
    .rf_in_ds (ds_rf),
    .rf_user  (!pc4_rf[31]),
    .stall    (stall),
    .annul    (annul),
    .take_irq (take_irq)
  );

  control_logic u_ctl (
    .instr    (ir_rf),
    .bz       (bz),
    .take_irq (take_irq),
    .ctrl     (ctrl_rf),
    .reads_rs (reads_rs),
    .reads_rt (reads_rt)
  );

  bypass_unit u_byp (
    .rs       (ir_rf[25:21]),
    .rt       (ir_rf[20:16]),
    .reads_rs (reads_rs),
    .reads_rt (reads_rt),
    .alu_we   (ctrl_alu.werf && ctrl_alu.wdsel != WDSEL_MEM),
    .alu_wa   (wa_alu),
    .wb_we    (ctrl_wb.werf),
    .wb_wa    (wa_wb),
    .sel_a    (byp_a),
    .sel_b    (byp_b)
  );

  always_comb begin
    unique case (byp_a)
      BYP_ALU: opa_rf = fwd_alu;
      BYP_WB:  opa_rf = wd_wb;
      default: opa_rf = rd1;
    endcase
    unique case (byp_b)
      BYP_ALU: opb_rf = fwd_alu;
      BYP_WB:  opb_rf = wd_wb;
      default: opb_rf = rd2;
    endcase
  end

  eq_comparator #(.WIDTH(32)) u_eq (.a(opa_rf), .b(opb_rf), .eq(bz));

  sext u_sext (.imm(ir_rf[15:0]), .sign(ctrl_rf.sext), .y(imm_ext));

  always_comb begin
    unique case (ctrl_rf.asel)
      ASEL_SHAMT: a_rf = {27'd0, ir_rf[10:6]};
      ASEL_16:    a_rf = 32'd16;
      default:    a_rf = opa_rf;
    endcase
    b_rf = (ctrl_rf.bsel == BSEL_IMM) ? imm_ext : opb_rf;
    unique case (ctrl_rf.wasel)
      WASEL_RT: wa_rf = ir_rf[20:16];
      WASEL_31: wa_rf = REG_LINK;
      WASEL_27: wa_rf = REG_XP;
      default:  wa_rf = ir_rf[15:11];
    endcase
    // With a delay slot the link skips it; with annulment it is PC+4.
    link_rf = (ctrl_rf.link && !ANNUL_DELAY_SLOT) ? pc4_rf + 32'd4 : pc4_rf;
  end

  assign irq_ack = take_irq;

  // RF/ALU register; a stall sends a bubble (all controls 0).
  always_ff @(posedge clk) begin
    if (rst || stall) begin
      ctrl_alu <= '0;
      wa_alu   <= '0;
    end else begin
      ctrl_alu <= ctrl_rf;
      wa_alu   <= wa_rf;
    end
    a_alu    <= a_rf;
    b_alu    <= b_rf;
    sd_alu   <= opb_rf;
    link_alu <= link_rf;
  end

  // ============================== ALU stage =============================
  alu #(.WIDTH(32)) u_alu (
    .a     (a_alu),
    .b     (b_alu),
    .alufn (ctrl_alu.alufn),
    .y     (y_alu),
    .n     (flag_n),
    .v     (flag_v),
    .c     (flag_c),
    .z     (flag_z)
  );

  // Value offered to the ALU bypass path.
  assign fwd_alu = (ctrl_alu.wdsel == WDSEL_PC4) ? link_alu : y_alu;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_wb <= '0;
      wa_wb   <= '0;
    end else begin
      ctrl_wb <= ctrl_alu;
      wa_wb   <= wa_alu;
    end
    y_wb    <= y_alu;
    sd_wb   <= sd_alu;
    link_wb <= link_alu;
  end

  // ============================== WB stage ==============================
  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk   (clk),
    .addr  (y_wb),
    .wdata (sd_wb),
    .we    (ctrl_wb.wr),
    .rdata (mrd_wb)
  );

  always_comb begin
    unique case (ctrl_wb.wdsel)
      WDSEL_PC4: wd_wb = link_wb;
      WDSEL_MEM: wd_wb = mrd_wb;
      default:   wd_wb = y_wb;
    endcase
  end

  assign wb_we     = ctrl_wb.werf;
  assign wb_wa     = wa_wb;
  assign wb_wd     = wd_wb;
  assign mem_we    = ctrl_wb.wr;
  assign mem_addr  = y_wb;
  assign mem_wdata = sd_wb;

endmodule
