// regfile: the miniMIPS register file, NREGS words of WIDTH bits.
//
// Two combinational read ports (RA1/RD1, RA2/RD2) serve the RF stage; one
// write port (WA/WD/WE) is written on the rising clock edge by the WB
// stage, so the file behaves as a combinational read device at the top of
// the pipe and a clocked write device at its end. Register 0 always reads
// as zero and writes to it are dropped. A read of the register being
// written in the same cycle returns the old value; the pipeline's WB bypass
// supplies the new one. The two-port organisation follows the datapath;
// the read-during-write behaviour and the absence of reset are this
// design's choices (software must write a register before reading it).
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic [AW-1:0]    ra1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd,
  input  logic             we
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && wa != '0) regs[wa] <= wd;
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
