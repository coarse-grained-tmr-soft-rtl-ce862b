// tb_gpdrc_ctrl: checks the recovery sequencer: choice of the faulty PRM from
// the error vector, the length of the reconfiguration (reset) window, the
// hand-over to synchronization, that errors are ignored while a repair runs,
// and the repair counter; four fixed cases, then 100 repairs with random error
// vectors, random noise on the error vector and random synchronization times.
// Every cycle, at most one region may be in reset, and never while sync enable
// is high.
module tb_gpdrc_ctrl;
  localparam int unsigned RC = 20;
  logic clk = 1'b0, rst_n, sync_done, sync_enable, busy;
  logic [2:0] err_vec, prm_reset;
  logic [1:0] sync_target;
  logic [7:0] repairs;
  int checks = 0, failures = 0;

  gpdrc_ctrl #(.RECONF_CYCLES(RC)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    check(prm_reset == 3'b000 || prm_reset == 3'b001 || prm_reset == 3'b010 || prm_reset == 3'b100,
          $sformatf("prm_reset %b not one-hot", prm_reset));
    check(!(sync_enable && prm_reset != 3'b000), "sync enable during reconfiguration");
    check(busy || (!sync_enable && prm_reset == 3'b000), "busy does not cover the repair");
  end

  task automatic repair(input logic [2:0] ev, input logic [1:0] exp_idx, input int n,
                        input int sync_wait = 7);
    int lat, len;
    @(negedge clk); err_vec = ev;
    @(negedge clk); err_vec = '0;
    lat = 1;
    while (prm_reset == 3'b000 && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("reset starts %0d cycles after the error, expected 2", lat));
    check(prm_reset == 3'(1 << exp_idx), $sformatf("prm_reset %b for error vector %b", prm_reset, ev));
    check(busy && !sync_enable, "busy, no sync during reconfiguration");
    len = 0;
    while (prm_reset != 3'b000 && len < 1000) begin
      if (len == 3) err_vec = 3'b111;           // must be ignored
      @(negedge clk); len++;
    end
    err_vec = '0;
    check(len == RC, $sformatf("reconfiguration window %0d cycles, expected %0d", len, RC));
    check(sync_enable && sync_target == exp_idx, "sync enable with the repaired index");
    for (int i = 0; i < sync_wait; i++) begin
      err_vec = 3'($urandom);                   // copies disagree until synchronized
      @(negedge clk);
      check(sync_enable && prm_reset == 3'b000, "sync enable held until done");
    end
    err_vec = '0;
    sync_done = 1; @(negedge clk); sync_done = 0;
    check(!sync_enable && !busy, "idle after sync done");
    check(repairs == 8'(n), $sformatf("repairs = %0d, expected %0d", repairs, n));
    repeat (3) @(negedge clk);
    check(prm_reset == 3'b000 && !busy, "ignored error did not start a second repair");
  endtask

  initial begin
    rst_n = 0; err_vec = 0; sync_done = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!busy && !sync_enable && prm_reset == 0 && repairs == 0, "reset state");
    repair(3'b010, 2'd1, 1);
    repair(3'b100, 2'd2, 2);
    repair(3'b001, 2'd0, 3);
    repair(3'b110, 2'd1, 4);   // several flagged: lowest index
    for (int i = 0; i < 100; i++) begin
      logic [2:0] ev;
      ev = 3'($urandom_range(1, 7));
      repair(ev, ev[0] ? 2'd0 : ev[1] ? 2'd1 : 2'd2, 5 + i, $urandom_range(0, 20));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
