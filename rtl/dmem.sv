// dmem: data memory, WORDS 32-bit words, word accesses only (lw, sw).
//
// Combinational read of the word at addr[AW+1:2]; write of wdata on the
// rising clock edge when we (the datapath's Wr) is 1. Upper address bits
// and the two byte-offset bits are ignored. In the 4-stage pipeline the
// memory is accessed in the WB stage, so a read completes within that
// stage and the loaded word goes straight to the register write mux. Size
// and read timing are this design's choice.
module dmem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        we,
  output logic [31:0] rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
