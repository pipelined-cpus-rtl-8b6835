// eq_comparator: the equality comparator of the early branch decision.
//
// Combinational. Each bit pair is compared with an exclusive-OR and the
// WIDTH difference bits are combined so that eq (the BZ signal) is 1 only
// when no bit differs. Placing it right behind the register file read lets
// beq/bne decide in the RF stage, leaving one branch delay slot instead of
// two. Width and structure follow the datapath drawing.
module eq_comparator #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);

  logic [WIDTH-1:0] diff;

  assign diff = a ^ b;
  assign eq   = ~|diff;

endmodule
