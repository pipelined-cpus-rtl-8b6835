// imem: instruction memory, WORDS 32-bit words.
//
// Read port: combinational, word-addressed by addr[AW+1:2]; upper address
// bits are ignored, so the memory appears at every multiple of its size
// (the reset vector 0x80000000 and address 0 reach word 0). Load port: a
// clocked write (we, waddr, wdata) by which the program is placed before or
// during reset. The memory is named in the datapath but its size, read
// timing and load port are this design's choice: a combinational read lets
// a fetch complete within the IF stage.
module imem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
