// tb_imem: load random words through the write port, then read them back
// through the combinational read port, including through the alias at
// 0x80000000 and with byte-offset bits set.
module tb_imem;
  logic        clk = 1'b0;
  logic [31:0] addr, rdata, waddr, wdata;
  logic        we;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  imem #(.WORDS(256)) dut (.clk, .addr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    we = 1'b0; addr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 32'(i * 4); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      int w;
      w = $urandom_range(0, 255);
      addr = {1'($urandom), 21'd0, 8'(w), 2'($urandom)};
      #1;
      checks++;
      if (rdata !== model[w]) begin failures++; $display("FAIL word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
