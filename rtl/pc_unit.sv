// pc_unit: program counter and next-PC selection of the miniMIPS pipeline.
//
// Holds the fetch PC and computes PC+4. The next PC is chosen by PCSEL from
// seven sources: 0 PC+4, 1 the branch target BT = (PC+4 of the RF-stage
// branch) + 4 x sign-extended offset, 2 the register jump target JT (low two
// bits dropped), 3 the jump address {PC<31:28>, J<25:0>, 00}, 4 0x80000080,
// 5 0x80000040, 6 0x80000000. Branch and jump targets are formed from the
// PC+4 of the instruction in the RF stage, where the branch decision is
// made. Timing: next PC is taken on the rising edge unless hold (a stall)
// is 1; a synchronous rst loads 0x80000000. The seven-input mux and the
// x4/+ target adder follow the datapath; the jump address uses the four
// upper bits of the PC so that it is a full 32-bit address, which is this
// design's reading.
module pc_unit
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        hold,
  input  pcsel_e      pcsel,
  input  logic [31:0] pc4_rf,
  input  logic [31:0] imm_ext,
  input  logic [31:0] jt,
  input  logic [25:0] jaddr,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);

  logic [31:0] pc_next, bt;

  assign pc_plus4 = pc + 32'd4;
  assign bt       = pc4_rf + {imm_ext[29:0], 2'b00};

  always_comb begin
    unique case (pcsel)
      PCSEL_PC4:   pc_next = pc_plus4;
      PCSEL_BT:    pc_next = bt;
      PCSEL_JT:    pc_next = {jt[31:2], 2'b00};
      PCSEL_JA:    pc_next = {pc4_rf[31:28], jaddr, 2'b00};
      PCSEL_IRQ:   pc_next = IRQ_VEC;
      PCSEL_ILLOP: pc_next = ILLOP_VEC;
      PCSEL_RESET: pc_next = RESET_VEC;
      default:     pc_next = RESET_VEC;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)        pc <= RESET_VEC;
    else if (!hold) pc <= pc_next;
  end

endmodule
