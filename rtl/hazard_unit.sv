// hazard_unit: stall, annulment and interrupt acceptance for the pipeline.
//
// Combinational.
//  * stall: the RF-stage instruction reads a register that a load in the
//    ALU stage will write. The load's data exists only in WB, after the
//    memory read, so the PC and the IF/RF register hold for one cycle and a
//    bubble (no register or memory write) enters the ALU stage; the WB
//    bypass then delivers the loaded word.
//  * annul: the instruction being fetched is replaced by a NOP on its way
//    into the RF stage. This happens after a trap or interrupt, and, when
//    ANNUL_DELAY_SLOT = 1, after every taken branch or jump (the hardware
//    annulment scheme). With ANNUL_DELAY_SLOT = 0 the instruction after a
//    branch or jump always executes (one architectural delay slot).
//  * take_irq: an interrupt request is accepted on the RF-stage instruction
//    if that slot holds a real instruction (rf_valid), is not a delay slot
//    (rf_in_ds) and runs in user mode (PC bit 31 clear; the vectors at
//    0x8000xxxx are supervisor code, so handlers are not interrupted).
// Stalling for loads and annulling with NOPs follow the pipeline's hazard
// remedies; the user-mode and delay-slot conditions on interrupts are this
// design's choice.
module hazard_unit #(
  parameter bit ANNUL_DELAY_SLOT = 1'b0
) (
  input  logic       reads_rs,
  input  logic       reads_rt,
  input  logic [4:0] rs,
  input  logic [4:0] rt,
  input  logic       alu_load,
  input  logic [4:0] alu_wa,
  input  logic       redirect,
  input  logic       is_cti,
  input  logic       irq,
  input  logic       rf_valid,
  input  logic       rf_in_ds,
  input  logic       rf_user,
  output logic       stall,
  output logic       annul,
  output logic       take_irq
);

  assign take_irq = irq && rf_valid && !rf_in_ds && rf_user;

  assign stall = alu_load && alu_wa != 5'd0 &&
                 ((reads_rs && rs == alu_wa) || (reads_rt && rt == alu_wa));

  assign annul = !stall && redirect && (ANNUL_DELAY_SLOT || !is_cti);

endmodule
