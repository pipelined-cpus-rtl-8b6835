// tb_minimips4: end-to-end test of the 4-stage miniMIPS at its default
// parameters (delay-slot mode, 1024-word memories).
//
// Runs NPROG random programs from mips_iss_pkg. Each program is loaded
// through the instruction-memory port during reset. Every register write
// and memory write the pipeline makes in WB is compared, in order, with the
// next write of the instruction-level model. Interrupts are raised at random
// times; the model takes each one at the same dynamic instruction at which
// the pipeline accepted it, and checks that this was a legal point (user
// mode, not a delay slot). After each program the register file and data
// words are compared. Timing checks: the first instruction after reset
// writes back in the 4th cycle (4-stage latency), and the 47-instruction
// prologue, which has no load-use pairs or branches, retires one
// instruction per clock. The testbench counts load stalls, annulled fetches,
// ALU and WB bypasses, taken branches/jumps, illegal-instruction traps and
// interrupts, and fails if any of them never happened.
module tb_minimips4;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  localparam bit ANNUL = 1'b0;
  localparam int NPROG = 4;
  localparam int NLEN  = 560;

  logic        clk = 1'b0;
  logic        rst, irq, imem_we;
  logic [31:0] imem_waddr, imem_wdata, pc;
  logic        wb_we, mem_we, stall, annul, irq_ack;
  logic [4:0]  wb_wa;
  logic [31:0] wb_wd, mem_addr, mem_wdata;
  byp_e        byp_a, byp_b;

  minimips4 dut (
    .clk, .rst, .irq, .imem_we, .imem_waddr, .imem_wdata, .pc,
    .wb_we, .wb_wa, .wb_wd, .mem_we, .mem_addr, .mem_wdata,
    .stall, .annul, .irq_ack, .byp_a, .byp_b
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_annul = 0, n_byp_alu = 0, n_byp_wb = 0, n_irq = 0;
  int n_illop = 0, n_taken = 0, n_events = 0, n_prog_done = 0;

  Iss          iss;
  logic [31:0] prog [IWORDS];
  logic [31:0] end_addr;
  bit          running;
  int          cyc, dyn, ev_idx;
  int          ev_cyc [64];
  int          irq_at [$];
  bit          irq_acked;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Step the model to its next architectural write.
  function automatic ev_t model_next();
    ev_t e;
    for (int i = 0; i < 64; i++) begin
      bit take = (irq_at.size() > 0 && irq_at[0] == iss.executed + 1);
      if (take) void'(irq_at.pop_front());
      e = iss.step(take);
      if (e.rwr || e.mwr) return e;
    end
    e = '{default:0};
    return e;
  endfunction

  logic irq_next = 1'b0;
  always @(posedge clk) irq <= irq_next;

  // Per-cycle monitor, sampled mid-cycle.
  always @(negedge clk) begin
    if (running) begin
      cyc++;
      if (stall) n_stall++;
      if (annul) n_annul++;
      if (byp_a == BYP_ALU || byp_b == BYP_ALU) n_byp_alu++;
      if (byp_a == BYP_WB  || byp_b == BYP_WB)  n_byp_wb++;
      if (dut.valid_rf && !stall) begin
        dyn++;
        if (irq_ack) begin
          irq_at.push_back(dyn);
          n_irq++;
        end
      end
      if ((wb_we && wb_wa != 5'd0) || mem_we) begin
        ev_t e;
        if (ev_idx < 64) ev_cyc[ev_idx] = cyc;
        ev_idx++;
        n_events++;
        e = model_next();
        if (mem_we) begin
          check(e.mwr && e.addr[11:2] == mem_addr[11:2] && e.wd == mem_wdata,
                $sformatf("mem write %h<=%h, model %0d %h<=%h", mem_addr, mem_wdata,
                          e.mwr, e.addr, e.wd));
        end else begin
          check(e.rwr && e.wa == wb_wa && e.wd == wb_wd,
                $sformatf("reg write $%0d<=%h, model %0d $%0d<=%h", wb_wa, wb_wd,
                          e.rwr, e.wa, e.wd));
        end
      end
      // Interrupt stimulus: hold irq until one cycle after it was taken.
      // (irq_next is applied at the next rising edge.)
      if (irq_acked) begin
        irq_next = 1'b0;
        irq_acked = 1'b0;
      end else if (irq && irq_ack) begin
        irq_acked = 1'b1;
      end else if (!irq && ev_idx > 60 && pc < end_addr - 32'd64 && !pc[31] &&
                   $urandom_range(0, 119) == 0) begin
        irq_next = 1'b1;
      end
    end
  end

  initial begin
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    running = 1'b0;
    for (int pnum = 0; pnum < NPROG; pnum++) begin
      iss = new(ANNUL);
      end_addr = gen_program(prog, NLEN);
      foreach (prog[i]) iss.imem[i] = prog[i];
      rst = 1'b1;
      for (int i = 0; i < IWORDS; i++) begin
        @(negedge clk);
        imem_we = 1'b1; imem_waddr = 32'(i * 4); imem_wdata = prog[i];
      end
      @(negedge clk);
      imem_we = 1'b0;
      irq_at.delete();
      cyc = -1; dyn = 0; ev_idx = 0; irq_acked = 1'b0; irq_next = 1'b0;
      rst = 1'b0;
      running = 1'b1;
      // Run until the end loop is reached and the pipeline has drained.
      wait (pc == end_addr);
      irq_next = 1'b0;
      repeat (12) @(negedge clk);
      running = 1'b0;
      // The model must have no writes left before the end loop.
      for (int i = 0; i < 8 && iss.pc != end_addr; i++) begin
        ev_t e;
        e = iss.step(1'b0);
        check(!(e.rwr || e.mwr), "pipeline missed a write before the end loop");
      end
      check(iss.pc == end_addr, "model reached the end loop");
      for (int r = 1; r < 32; r++)
        check(dut.u_rf.regs[r] == iss.regs[r], $sformatf("final $%0d", r));
      for (int w = 0; w < 16; w++)
        check(dut.u_dmem.mem[w] == iss.dmem[w], $sformatf("final mem word %0d", w));
      // Latency: the reset instruction writes back in the 4th cycle.
      check(ev_cyc[0] == 3, $sformatf("first write-back in cycle %0d", ev_cyc[0]));
      // Throughput: the prologue retires one instruction per clock.
      check(ev_cyc[47] - ev_cyc[1] == 46, "prologue at one instruction per clock");
      check(iss.irq_bad == 0, "interrupt accepted at a legal point");
      n_illop += iss.n_illop;
      n_taken += iss.n_taken;
      n_prog_done++;
    end
    $display("programs=%0d writes=%0d stalls=%0d annulled=%0d alu_bypass=%0d wb_bypass=%0d taken=%0d illop=%0d irq=%0d",
             n_prog_done, n_events, n_stall, n_annul, n_byp_alu, n_byp_wb, n_taken, n_illop, n_irq);
    check(n_stall > 0,   "load-use stall exercised");
    check(n_annul > 0,   "annulment exercised");
    check(n_byp_alu > 0, "ALU bypass exercised");
    check(n_byp_wb > 0,  "WB bypass exercised");
    check(n_taken > 0,   "taken branch/jump exercised");
    check(n_illop > 0,   "illegal-instruction trap exercised");
    check(n_irq > 0,     "interrupt exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
