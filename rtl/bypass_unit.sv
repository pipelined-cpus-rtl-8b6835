// bypass_unit: operand source selection for the RF stage (forwarding).
//
// Combinational. For each source operand of the instruction in the RF
// stage it picks one of three values: the register file read (BYP_RF), the
// result of the instruction now in the ALU stage (BYP_ALU), or the write
// data of the instruction now in the WB stage (BYP_WB). The ALU path is
// chosen when the operand is used, its register is not 0, and the ALU-stage
// instruction will write that register with a value already known in the
// ALU stage (alu_we; a load's value is not, the hazard unit stalls for it).
// The WB path is chosen when the operand is used, its register is not 0,
// the ALU path is not, and the WB-stage instruction writes (WERF) that
// register (WA). The younger instruction in the ALU stage wins over WB.
// These are the selection rules of the two bypass paths; comparing with the
// ALU-stage write address, already resolved from Rd or Rt by WASEL, is
// equivalent to the separate R-type/I-type tests.
module bypass_unit
  import mips_pkg::*;
(
  input  logic [4:0] rs,
  input  logic [4:0] rt,
  input  logic       reads_rs,
  input  logic       reads_rt,
  input  logic       alu_we,
  input  logic [4:0] alu_wa,
  input  logic       wb_we,
  input  logic [4:0] wb_wa,
  output byp_e       sel_a,
  output byp_e       sel_b
);

  function automatic byp_e select(input logic used, input logic [4:0] r);
    if (used && r != 5'd0 && alu_we && alu_wa == r) return BYP_ALU;
    if (used && r != 5'd0 && wb_we && wb_wa == r)   return BYP_WB;
    return BYP_RF;
  endfunction

  assign sel_a = select(reads_rs, rs);
  assign sel_b = select(reads_rt, rt);

endmodule
