// tb_dmem: random mixes of writes and reads against an array model; a write
// takes effect at the clock edge and a read is combinational.
module tb_dmem;
  logic        clk = 1'b0;
  logic [31:0] addr, wdata, rdata;
  logic        we;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  dmem #(.WORDS(256)) dut (.clk, .addr, .wdata, .we, .rdata);

  always #5 clk = ~clk;

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; addr = 32'(i * 4); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      int w;
      @(negedge clk);
      w = $urandom_range(0, 255);
      we = 1'($urandom); addr = 32'(w * 4); wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[w]) begin failures++; $display("FAIL read word %0d", w); end
      @(posedge clk);
      if (we) model[w] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
