// tb_hazard_unit: random inputs against the stall, annul and interrupt
// rules, in both branch modes (delay slot and hardware annulment).
module tb_hazard_unit;
  logic [4:0] rs, rt, alu_wa;
  logic       reads_rs, reads_rt, alu_load, redirect, is_cti, irq, rf_valid, rf_in_ds, rf_user;
  logic       stall0, annul0, irq0, stall1, annul1, irq1;
  int checks = 0, failures = 0;

  hazard_unit #(.ANNUL_DELAY_SLOT(1'b0)) dut0 (
    .reads_rs, .reads_rt, .rs, .rt, .alu_load, .alu_wa, .redirect, .is_cti, .irq,
    .rf_valid, .rf_in_ds, .rf_user, .stall(stall0), .annul(annul0), .take_irq(irq0));
  hazard_unit #(.ANNUL_DELAY_SLOT(1'b1)) dut1 (
    .reads_rs, .reads_rt, .rs, .rt, .alu_load, .alu_wa, .redirect, .is_cti, .irq,
    .rf_valid, .rf_in_ds, .rf_user, .stall(stall1), .annul(annul1), .take_irq(irq1));

  initial begin
    automatic int n_stall = 0;
    for (int i = 0; i < 4000; i++) begin
      logic ws, wa0, wa1, wi;
      rs = 5'($urandom_range(0, 3)); rt = 5'($urandom_range(0, 3)); alu_wa = 5'($urandom_range(0, 3));
      {reads_rs, reads_rt, alu_load, redirect, is_cti, irq, rf_valid, rf_in_ds, rf_user} = 9'($urandom);
      ws  = alu_load && alu_wa != 0 && ((reads_rs && rs == alu_wa) || (reads_rt && rt == alu_wa));
      wa0 = !ws && redirect && !is_cti;
      wa1 = !ws && redirect;
      wi  = irq && rf_valid && !rf_in_ds && rf_user;
      #1;
      checks++;
      if (stall0 !== ws || stall1 !== ws || annul0 !== wa0 || annul1 !== wa1 ||
          irq0 !== wi || irq1 !== wi) begin
        failures++;
        $display("FAIL case %0d: stall %b/%b annul %b/%b irq %b", i, stall0, ws, annul0, wa0, irq0);
      end
      if (ws) n_stall++;
    end
    checks++;
    if (n_stall == 0) failures++;
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
