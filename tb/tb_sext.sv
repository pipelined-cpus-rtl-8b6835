// tb_sext: sign and zero extension of random and boundary immediates.
module tb_sext;
  logic [15:0] imm;
  logic        sign;
  logic [31:0] y;
  int checks = 0, failures = 0;

  sext dut (.imm, .sign, .y);

  task automatic one(logic [15:0] v, logic s);
    logic [31:0] want;
    imm = v; sign = s;
    want = s ? 32'($signed(v)) : {16'h0, v};
    #1;
    checks++;
    if (y !== want) begin failures++; $display("FAIL %h sign=%b -> %h", v, s, y); end
  endtask

  initial begin
    one(16'h0000, 1); one(16'h7fff, 1); one(16'h8000, 1); one(16'hffff, 1);
    one(16'h8000, 0); one(16'hffff, 0);
    for (int i = 0; i < 500; i++) one(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
