// tb_bypass_unit: random operand/destination combinations, biased towards
// matches, against the selection rule: ALU-stage result if that stage
// writes the register (not 0) the operand uses, else WB-stage data if WB
// writes it, else the register file.
module tb_bypass_unit;
  import mips_pkg::*;
  logic [4:0] rs, rt, alu_wa, wb_wa;
  logic       reads_rs, reads_rt, alu_we, wb_we;
  byp_e       sel_a, sel_b;
  int checks = 0, failures = 0;

  bypass_unit dut (.rs, .rt, .reads_rs, .reads_rt, .alu_we, .alu_wa, .wb_we, .wb_wa, .sel_a, .sel_b);

  function automatic byp_e want(logic used, logic [4:0] r);
    if (!used || r == 0) return BYP_RF;
    if (alu_we && alu_wa == r) return BYP_ALU;
    if (wb_we && wb_wa == r) return BYP_WB;
    return BYP_RF;
  endfunction

  initial begin
    automatic int hit_alu = 0, hit_wb = 0;
    for (int i = 0; i < 4000; i++) begin
      rs = 5'($urandom_range(0, 3)); rt = 5'($urandom_range(0, 3));
      alu_wa = 5'($urandom_range(0, 3)); wb_wa = 5'($urandom_range(0, 3));
      reads_rs = 1'($urandom); reads_rt = 1'($urandom);
      alu_we = 1'($urandom); wb_we = 1'($urandom);
      #1;
      checks++;
      if (sel_a !== want(reads_rs, rs) || sel_b !== want(reads_rt, rt)) begin
        failures++;
        $display("FAIL rs=%0d rt=%0d alu=%b/%0d wb=%b/%0d -> %s %s", rs, rt, alu_we, alu_wa,
                 wb_we, wb_wa, sel_a.name(), sel_b.name());
      end
      if (sel_a == BYP_ALU) hit_alu++;
      if (sel_a == BYP_WB) hit_wb++;
    end
    checks++;
    if (hit_alu == 0 || hit_wb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
