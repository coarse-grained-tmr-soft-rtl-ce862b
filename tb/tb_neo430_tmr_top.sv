// tb_neo430_tmr_top: end-to-end test of the TMR NEO430 system with three fixed
// and 24 random upsets, at the design's default parameters.
//
// The testbench loads a program into the program memory. Its startup code
// first reads digital input 15 (sync enable) and sleeps if it is set: this is
// what a copy restarted after reconfiguration runs on its own. The program
// counts in R4, adds the count into a running sum in data memory through a subroutine
// (CALL/PUSH/POP/RET use the stack), writes the count to the digital outputs and
// polls digital input 15 (sync enable). On a request it raises output 15 (ready)
// and sleeps; its interrupt routine clears CPUOFF in the stacked SR and counts
// wake-ups. Upsets are injected into R4 of copy 1, SP of copy 2 and PC of copy 0.
//
// Then 24 upsets follow in random copies, registers (PC, SP, R4, R5, R6, MAR,
// IR, SRC, DST) and bits, from a fixed-seed generator. An upset that the
// program overwrites before it reaches the bus is masked: it must leave the
// three copies identical and start no repair. Every other one must be repaired
// like the first three.
//
// Checks: every change of the count output is +1 and the running sum in DMEM
// equals n(n+1)/2 at that moment (state continuity through every repair); each
// upset is detected with the right PRM index; the reconfigured copy is the one
// reset; 20 registers are copied per synchronization and the wake-up interrupt
// follows 21 cycles after the CPUs are asleep with ready set; all 20 registers
// are equal in the three copies after the wake-up; no mismatch is seen
// after a repair; the wake-up counter equals the number of repairs. The restarted copy must run its startup code alone and fall asleep at the
// end of it (PC = first address after the check) before its registers are
// overwritten. Every mechanism (detection, reconfiguration, sync request,
// restart and self-sleep, ready, sleep, register copy, wake-up IRQ, resumed
// lock step) must occur.
module tb_neo430_tmr_top;
  import neo430_pkg::*;
  import neo430_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        imem_ld_we;
  logic [10:0] imem_ld_addr;
  logic [15:0] imem_ld_wdata;
  logic [14:0] test_in;
  logic [15:0] test_out;
  logic        seu_we;
  logic [1:0]  seu_cpu;
  logic [4:0]  seu_addr;
  logic [15:0] seu_mask;
  logic [2:0]  prm_err_vec, prm_reset, cpu_sleep;
  logic        sync_enable, sync_ready, sync_irq, sync_err, recovery_busy;
  logic [7:0]  repairs;

  neo430_tmr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- program ----------------
  logic [15:0] prog [256];
  int pc_a;
  int L_start, L_loop, L_wait, L_sub, L_isr;

  task automatic emit(input logic [15:0] w);
    prog[pc_a/2] = w;
    pc_a += 2;
  endtask

  task automatic assemble();
    pc_a = 0;
    emit(f1(BIT, PC, 1, 0, M_INC, SR)); emit(16'h8000); emit(GPIO_IN_ADDR); // BIT #0x8000, &GPIO_IN
    emit(jmp(JEQ, 16'(pc_a), 16'(L_start)));                       // no request: normal start
    emit(f1(BIS, PC, 0, 0, M_INC, SR)); emit(16'h0018);            // restarted copy: sleep
    L_start = pc_a;
    emit(f1(MOV, PC, 0, 0, M_INC, SP)); emit(16'hC800);          // MOV #0xC800, SP
    emit(f1(MOV, PC, 1, 0, M_INC, SR)); emit(16'(L_isr)); emit(16'hC000); // MOV #isr, &0xC000
    emit(f1(MOV, CG, 0, 0, M_REG, 4'd4));                          // MOV #0, R4
    emit(f1(MOV, CG, 1, 0, M_REG, SR)); emit(16'hC100);           // MOV #0, &0xC100
    emit(f1(MOV, CG, 1, 0, M_REG, SR)); emit(16'hC102);           // MOV #0, &0xC102
    emit(f1(BIS, SR, 0, 0, M_INC, SR));                            // BIS #8, SR (GIE)
    L_loop = pc_a;
    emit(f1(ADD, CG, 0, 0, M_IDX, 4'd4));                          // ADD #1, R4
    emit(f2(CALL, 0, M_INC, PC)); emit(16'(L_sub));                // CALL #sub
    emit(f1(MOV, 4'd4, 0, 0, M_REG, 4'd5));                        // MOV R4, R5
    emit(f1(AND, PC, 0, 0, M_INC, 4'd5)); emit(16'h7FFF);          // AND #0x7FFF, R5
    emit(f1(MOV, 4'd5, 1, 0, M_REG, SR)); emit(GPIO_OUT_ADDR);     // MOV R5, &GPIO_OUT
    emit(f1(BIT, PC, 1, 0, M_INC, SR)); emit(16'h8000); emit(GPIO_IN_ADDR); // BIT #0x8000, &GPIO_IN
    emit(jmp(JEQ, 16'(pc_a), 16'(L_loop)));                        // JEQ loop
    emit(f1(BIS, PC, 1, 0, M_INC, SR)); emit(16'h8000); emit(GPIO_OUT_ADDR); // ready
    emit(f1(BIS, PC, 0, 0, M_INC, SR)); emit(16'h0018);            // GIE|CPUOFF: sleep
    emit(f1(BIC, PC, 1, 0, M_INC, SR)); emit(16'h8000); emit(GPIO_OUT_ADDR); // clear ready
    L_wait = pc_a;
    emit(f1(BIT, PC, 1, 0, M_INC, SR)); emit(16'h8000); emit(GPIO_IN_ADDR);
    emit(jmp(JNE, 16'(pc_a), 16'(L_wait)));                        // wait for request to end
    emit(jmp(JMP, 16'(pc_a), 16'(L_loop)));
    L_sub = pc_a;
    emit(f2(PUSH, 0, M_REG, 4'd6));                                // PUSH R6
    emit(f1(MOV, 4'd4, 0, 0, M_REG, 4'd6));                        // MOV R4, R6
    emit(f1(ADD, 4'd6, 1, 0, M_REG, SR)); emit(16'hC100);         // ADD R6, &0xC100
    emit(f1(MOV, SP, 0, 0, M_INC, 4'd6));                          // POP R6
    emit(f1(MOV, SP, 0, 0, M_INC, PC));                            // RET
    L_isr = pc_a;
    emit(f1(BIC, PC, 1, 0, M_INC, SP)); emit(16'h0010); emit(16'h0000); // BIC #CPUOFF, 0(SP)
    emit(f1(ADD, CG, 1, 0, M_IDX, SR)); emit(16'hC102);           // ADD #1, &0xC102
    emit(f2(RETI, 0, M_REG, PC));                                  // RETI
  endtask

  // ---------------- monitors ----------------
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_detect = 0, n_reconf = 0, n_syncreq = 0, n_ready = 0, n_sleep = 0;
  int n_copy = 0, n_irq = 0, n_resume = 0, n_out = 0, n_self = 0;
  bit self_seen = 1'b0;
  logic        prev_irq = 1'b0, prev_busy = 1'b0, prev_en = 1'b0, prev_rdy = 1'b0, prev_rst = 1'b0;
  logic [14:0] last_cnt = '0;
  int          t_ready_sleep = -1;
  logic [1:0]  expect_idx = 2'd0;
  bit          expect_fault = 1'b0;
  bit          quiet = 1'b0;   // no recovery running: no mismatch allowed

  function automatic logic [15:0] dmem_word(input logic [15:0] a);
    return dut.u_dmem.mem[10'((a - DMEM_BASE) >> 1)];
  endfunction

  task automatic check_equal(input string when);
    for (int k = 0; k < 16; k++) begin
      check(dut.g_prm[0].u_cpu.u_rf.regs[k] == dut.g_prm[1].u_cpu.u_rf.regs[k] &&
            dut.g_prm[1].u_cpu.u_rf.regs[k] == dut.g_prm[2].u_cpu.u_rf.regs[k],
            $sformatf("R%0d differs between copies %s", k, when));
    end
    check(dut.g_prm[0].u_cpu.ir == dut.g_prm[1].u_cpu.ir && dut.g_prm[1].u_cpu.ir == dut.g_prm[2].u_cpu.ir, {"IR differs ", when});
    check(dut.g_prm[0].u_cpu.mar == dut.g_prm[1].u_cpu.mar && dut.g_prm[1].u_cpu.mar == dut.g_prm[2].u_cpu.mar, {"MAR differs ", when});
    check(dut.g_prm[0].u_cpu.src_q == dut.g_prm[1].u_cpu.src_q && dut.g_prm[1].u_cpu.src_q == dut.g_prm[2].u_cpu.src_q, {"SRC differs ", when});
    check(dut.g_prm[0].u_cpu.dst_q == dut.g_prm[1].u_cpu.dst_q && dut.g_prm[1].u_cpu.dst_q == dut.g_prm[2].u_cpu.dst_q, {"DST differs ", when});
  endtask

  function automatic logic [15:0] pc_of(input logic [1:0] i);
    case (i)
      2'd0:    return dut.g_prm[0].u_cpu.u_rf.regs[0];
      2'd1:    return dut.g_prm[1].u_cpu.u_rf.regs[0];
      default: return dut.g_prm[2].u_cpu.u_rf.regs[0];
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    // upset detection with the right index
    if (!prev_busy && recovery_busy) begin
      n_detect++;
      check(expect_fault, "recovery started without an injected upset");
      check(dut.u_gpdrc.idx == expect_idx, $sformatf("faulty PRM %0d, expected %0d", dut.u_gpdrc.idx, expect_idx));
    end
    if (prm_reset != 3'b000 && !prev_rst) begin
      n_reconf++;
      check(prm_reset == (3'b001 << expect_idx), "wrong PRM reconfigured");
    end
    prev_rst <= (prm_reset != 3'b000);
    if (sync_enable && !prev_en) n_syncreq++;
    prev_en <= sync_enable;
    if (sync_ready && !prev_rdy) n_ready++;
    prev_rdy <= sync_ready;
    if (sync_enable && sync_ready && cpu_sleep == 3'b111 && t_ready_sleep < 0 &&
        dut.u_sync.state == dut.u_sync.S_WAIT) begin
      n_sleep++;
      t_ready_sleep = int'(cyc);
    end
    // the restarted copy runs alone and sleeps at the end of its startup check
    if (dut.solo != 3'b000) begin
      check(dut.solo == (3'b001 << expect_idx), "wrong copy runs alone");
      if ((cpu_sleep & dut.solo) != 3'b000 && !self_seen) begin
        n_self++;
        self_seen = 1'b1;
        check(pc_of(expect_idx) == 16'(L_start),
              $sformatf("restarted copy asleep at PC %h, expected %h", pc_of(expect_idx), 16'(L_start)));
      end
    end
    if (dut.sc_we != 3'b000) begin
      check(self_seen, "registers copied before the restarted copy slept on its own");
      n_copy++;
      check(dut.sc_we == (3'b001 << expect_idx), "register copied into a working copy");
    end
    if (sync_irq) begin
      n_irq++;
      self_seen = 1'b0;
      check(int'(cyc) - t_ready_sleep == 21,
            $sformatf("wake-up IRQ %0d cycles after ready+sleep, expected 21", int'(cyc) - t_ready_sleep));
      t_ready_sleep = -1;
    end
    // right after the wake-up IRQ all three copies must hold identical state
    if (prev_irq) check_equal("after synchronization");
    prev_irq <= sync_irq;
    if (prev_busy && !recovery_busy) begin
      n_resume++;
      expect_fault = 1'b0;
      quiet = 1'b1;
    end
    prev_busy <= recovery_busy;
    if (quiet && prm_err_vec != 3'b000) begin
      check(1'b0, $sformatf("mismatch %b after repair at cycle %0d", prm_err_vec, cyc));
      quiet = 1'b0;
    end
    check(!sync_err, "working copies disagreed during synchronization");
  end

  // count output: +1 per change, and running sum consistent with it
  always @(posedge clk) if (rst_n) begin
    if (test_out[14:0] != last_cnt) begin
      logic [15:0] n, s;
      n = 16'(test_out[14:0]);
      s = 16'((32'(n) * (32'(n) + 1)) / 2);
      n_out++;
      check(test_out[14:0] == last_cnt + 15'd1, $sformatf("count %0d after %0d", test_out[14:0], last_cnt));
      check(dmem_word(16'hC100) == s, $sformatf("sum %0d for count %0d, expected %0d", dmem_word(16'hC100), n, s));
      last_cnt <= test_out[14:0];
    end
  end

  // ---------------- stimulus ----------------
  task automatic inject(input logic [1:0] cpu, input logic [4:0] r, input logic [15:0] m);
    @(negedge clk);
    wait (!recovery_busy);
    repeat (137) @(negedge clk);
    expect_idx = cpu;
    expect_fault = 1'b1;
    quiet = 1'b0;
    seu_we = 1'b1; seu_cpu = cpu; seu_addr = r; seu_mask = m;
    @(negedge clk);
    seu_we = 1'b0;
    @(posedge clk);
    wait (!recovery_busy && !expect_fault);
  endtask

  // random upsets; one that is overwritten before it reaches the bus is masked
  int n_rand_fix = 0, n_rand_masked = 0;
  logic [31:0] rng = 32'h1F2E_3D4C;
  function automatic logic [31:0] next_rng();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  task automatic inject_random();
    logic [4:0] regs [9] = '{5'd0, 5'd1, 5'd4, 5'd5, 5'd6, SYNC_MAR, SYNC_IR, SYNC_SRC, SYNC_DST};
    logic [1:0] cpu;
    logic [4:0] r;
    logic [15:0] m;
    int gap, t;
    cpu = 2'(next_rng() % 3);
    r   = regs[next_rng() % 9];
    m   = 16'(1) << (next_rng() % 16);
    gap = int'(next_rng() % 97);
    @(negedge clk);
    wait (!recovery_busy);
    repeat (100 + gap) @(negedge clk);
    expect_idx = cpu;
    expect_fault = 1'b1;
    quiet = 1'b0;
    seu_we = 1'b1; seu_cpu = cpu; seu_addr = r; seu_mask = m;
    @(negedge clk);
    seu_we = 1'b0;
    t = 0;
    while (!recovery_busy && t < 2000) begin
      @(negedge clk);
      t++;
    end
    $display("upset: copy %0d register %0d mask %h: %s", cpu, r, m, recovery_busy ? "repaired" : "masked");
    if (recovery_busy) begin
      wait (!recovery_busy && !expect_fault);
      n_rand_fix++;
    end else begin
      n_rand_masked++;
      expect_fault = 1'b0;
      quiet = 1'b1;
      check_equal($sformatf("after masked upset of register %0d in copy %0d", r, cpu));
    end
  endtask

  initial begin
    rst_n = 1'b0; imem_ld_we = 1'b0; imem_ld_addr = '0; imem_ld_wdata = '0;
    test_in = 15'h1234; seu_we = 1'b0; seu_cpu = '0; seu_addr = '0; seu_mask = '0;
    foreach (prog[i]) prog[i] = 16'h4303;   // NOP (MOV #0, R3)
    assemble();
    assemble();                               // second pass resolves forward labels
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      imem_ld_we = 1'b1; imem_ld_addr = 11'(i); imem_ld_wdata = prog[i];
    end
    @(negedge clk);
    imem_ld_we = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    quiet = 1'b1;
    repeat (400) @(negedge clk);
    inject(2'd1, 5'd4, 16'h0040);   // R4 of copy 1
    repeat (300) @(negedge clk);
    inject(2'd2, 5'd1, 16'h0004);   // SP of copy 2
    repeat (300) @(negedge clk);
    inject(2'd0, 5'd0, 16'h0010);   // PC of copy 0
    repeat (500) @(negedge clk);
    for (int u = 0; u < 24; u++) inject_random();
    repeat (500) @(negedge clk);

    begin
      int nrep;
      nrep = 3 + n_rand_fix;
      check(n_rand_fix >= 12, $sformatf("only %0d of 24 random upsets needed a repair", n_rand_fix));
      check(int'(repairs) == nrep, $sformatf("repairs = %0d, expected %0d", repairs, nrep));
      check(int'(dmem_word(16'hC102)) == nrep, $sformatf("wake-ups = %0d, expected %0d", dmem_word(16'hC102), nrep));
      check(n_detect == nrep && n_reconf == nrep, "detections / reconfigurations");
      check(n_syncreq == nrep && n_ready == nrep && n_sleep == nrep, "sync request / ready / sleep");
      check(n_copy == nrep * SYNC_NREGS, $sformatf("%0d register copies, expected %0d", n_copy, nrep * SYNC_NREGS));
      check(n_irq == nrep && n_resume == nrep, "wake-up IRQs / resumes");
      check(n_self == nrep, $sformatf("restarted copy slept on its own %0d times, expected %0d", n_self, nrep));
      check(n_out > 200, $sformatf("only %0d count outputs", n_out));
    end
    $display("random upsets: %0d repaired, %0d masked, %0d cycles", n_rand_fix, n_rand_masked, cyc);
    $display("mechanisms: detect=%0d reconf=%0d syncreq=%0d selfsleep=%0d ready=%0d sleep=%0d copy=%0d irq=%0d resume=%0d outputs=%0d",
             n_detect, n_reconf, n_syncreq, n_self, n_ready, n_sleep, n_copy, n_irq, n_resume, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
