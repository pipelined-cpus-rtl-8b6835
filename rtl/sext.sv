// sext: immediate extender (the SEXT box of the datapath).
//
// Combinational. Widens the 16-bit immediate field Imm<15:0> to 32 bits.
// With sign = 1 bit 15 is copied into the upper half (arithmetic and
// memory offsets, branch displacements); with sign = 0 the upper half is
// zero (andi, ori, xori, lui). The control input is the datapath's SEXT
// signal; which instructions use which mode is the decoder's choice.
module sext (
  input  logic [15:0] imm,
  input  logic        sign,
  output logic [31:0] y
);

  assign y = {{16{sign & imm[15]}}, imm};

endmodule
