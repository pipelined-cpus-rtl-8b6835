// tb_regfile: random writes and reads of the register file against an
// array model. Checks both combinational read ports, that register 0 reads
// zero whatever is written to it, and that a read of the register being
// written in the same cycle returns the old value.
module tb_regfile;
  logic        clk = 1'b0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .ra1, .ra2, .rd1, .rd2, .wa, .wd, .we);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    // Write every register once.
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1'b1; wa = 5'(r); wd = $urandom;
      model[r] = (r == 0) ? 32'd0 : wd;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      if ($urandom_range(0, 3) == 0) ra1 = wa;     // read during write
      #1;
      check(rd1 == model[ra1], $sformatf("rd1 $%0d = %h, want %h", ra1, rd1, model[ra1]));
      check(rd2 == model[ra2], $sformatf("rd2 $%0d = %h, want %h", ra2, rd2, model[ra2]));
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    @(negedge clk);
    we = 1'b0; ra1 = 0; ra2 = 0;
    #1 check(rd1 == 0 && rd2 == 0, "register 0 reads zero");
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
