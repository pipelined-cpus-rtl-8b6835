// alu: the miniMIPS ALU.
//
// Combinational. ALUFN (mips_pkg::alufn_e) selects add, subtract, AND, OR,
// XOR, NOR, signed and unsigned set-less-than, and logical left/right and
// arithmetic right shifts. Shifts move operand B by the amount in A[4:0],
// which is how the datapath feeds them (ASEL picks shamt, a register, or
// the constant 16 for lui). The flags N, V, C and Z come from the
// adder/subtractor: N its sign, V signed overflow, C carry out (for a
// subtraction, 1 means no borrow) and Z a zero sum. The operation set and
// flag definitions are this design's choice; the datapath only names the
// ALU, its ALUFN control and its four flag outputs.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alufn_e           alufn,
  output logic [WIDTH-1:0] y,
  output logic             n,
  output logic             v,
  output logic             c,
  output logic             z
);

  localparam int unsigned SW = $clog2(WIDTH);

  logic             sub;
  logic [WIDTH-1:0] b_in;
  logic [WIDTH:0]   sum;
  logic [SW-1:0]    shamt;

  assign sub   = (alufn == ALU_SUB) || (alufn == ALU_SLT) || (alufn == ALU_SLTU);
  assign b_in  = sub ? ~b : b;
  assign sum   = {1'b0, a} + {1'b0, b_in} + {{WIDTH{1'b0}}, sub};
  assign shamt = a[SW-1:0];

  assign n = sum[WIDTH-1];
  assign c = sum[WIDTH];
  assign v = (a[WIDTH-1] == b_in[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
  assign z = (sum[WIDTH-1:0] == '0);

  always_comb begin
    unique case (alufn)
      ALU_ADD, ALU_SUB: y = sum[WIDTH-1:0];
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_XOR:          y = a ^ b;
      ALU_NOR:          y = ~(a | b);
      ALU_SLT:          y = {{(WIDTH-1){1'b0}}, n ^ v};
      ALU_SLTU:         y = {{(WIDTH-1){1'b0}}, ~c};
      ALU_SLL:          y = b << shamt;
      ALU_SRL:          y = b >> shamt;
      ALU_SRA:          y = WIDTH'($signed(b) >>> shamt);
      default:          y = '0;
    endcase
  end

endmodule
