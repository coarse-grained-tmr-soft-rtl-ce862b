// tb_sync_ctrl: checks the synchronization controller against three
// behavioural register sets standing in for the CPU copies: the repaired copy
// runs solo (not held) until the copy starts, nothing happens before ready and
// sleep, the repaired copy is held only while it is written, all 20 registers are copied
// from a working copy into the repaired one and nowhere else, the wake-up IRQ
// comes 21 cycles after ready+sleep with the hold released, sync_done follows,
// and a disagreement of the working copies is reported. Four fixed runs are
// followed by 50 with random target, waiting time and disagreements.
module tb_sync_ctrl;
  import neo430_pkg::*;
  logic clk = 1'b0, rst_n, sync_enable, ready, irq, sync_done, sync_err;
  logic [1:0] target;
  logic [2:0] cpu_sleep, solo, hold, sync_we;
  logic [4:0] sync_addr;
  logic [15:0] sync_wdata;
  logic [15:0] cpu_rdata [3];
  logic [15:0] regs [3][SYNC_NREGS];
  int checks = 0, failures = 0;

  sync_ctrl dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < 3; i++)
      cpu_rdata[i] = (sync_addr < 5'(SYNC_NREGS)) ? regs[i][sync_addr] : 16'h0;
  always @(posedge clk)
    for (int i = 0; i < 3; i++)
      if (sync_we[i]) regs[i][sync_addr] <= sync_wdata;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [1:0] tgt, input bit disagree, input int wait_rdy = 10);
    int lat;
    logic [15:0] good [SYNC_NREGS];
    int r0;
    r0 = (tgt == 0) ? 1 : 0;
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < SYNC_NREGS; k++)
        regs[i][k] = (i == int'(tgt)) ? 16'($urandom) : 16'(k * 257 + 3 * int'(tgt));
    if (disagree) regs[3 - int'(tgt) - r0][5] = 16'hFFFF;
    for (int k = 0; k < SYNC_NREGS; k++) good[k] = regs[r0][k];
    @(negedge clk); target = tgt; sync_enable = 1; cpu_sleep = 3'b000; ready = 0;
    #1 check(solo == 3'(1 << tgt) && hold == 3'b000, "repaired copy runs solo at once, not held");
    repeat (wait_rdy) @(negedge clk);
    check(sync_we == 0 && !irq, "nothing before ready and sleep");
    check(solo == 3'(1 << tgt) && hold == 3'b000, "solo kept while waiting");
    ready = 1; @(negedge clk);
    check(sync_we == 0, "no copy before all copies sleep");
    cpu_sleep = 3'b111;
    lat = 0;
    while (!irq && lat < 100) begin
      @(negedge clk); lat++;
      if (sync_we != 0) begin
        check(sync_we == 3'(1 << tgt), "writes only into the repaired copy");
        check(hold == 3'(1 << tgt) && solo == 3'b000, "written copy held, solo ended");
      end
    end
    check(lat == 21, $sformatf("IRQ %0d cycles after ready+sleep, expected 21", lat));
    check(hold == 3'b000 && solo == 3'b000, "hold released with the IRQ");
    for (int k = 0; k < SYNC_NREGS; k++)
      check(regs[tgt][k] == good[k], $sformatf("register %0d copied", k));
    check(regs[r0][0] == good[0], "working copy untouched");
    @(negedge clk);
    check(sync_done && !irq, "done after IRQ");
    check(sync_err == disagree, "sync_err reports disagreeing working copies");
    @(negedge clk);
    sync_enable = 0; ready = 0; cpu_sleep = 0;
    repeat (3) @(negedge clk);
    check(!sync_done && hold == 0 && solo == 0 && sync_we == 0, "back to idle");
  endtask

  initial begin
    rst_n = 0; sync_enable = 0; ready = 0; target = 0; cpu_sleep = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    run(2'd1, 0);
    run(2'd0, 0);
    run(2'd2, 0);
    run(2'd1, 1);
    for (int i = 0; i < 50; i++)
      run(2'($urandom_range(0, 2)), $urandom_range(0, 9) == 0, $urandom_range(1, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
