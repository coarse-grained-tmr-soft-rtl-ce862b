// tb_neo430_gpio: checks reset values, sampling of the input pins, word and
// byte writes to the output register, read-back of both registers and the
// one-cycle read latency.
module tb_neo430_gpio;
  logic clk = 1'b0, rst_n, re, we;
  logic [1:0] be, addr;
  logic [15:0] wdata, rdata, pin_in, pin_out, ref_out;
  int checks = 0, failures = 0;

  neo430_gpio dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; re = 0; we = 0; be = 0; addr = 0; wdata = 0; pin_in = 16'h1357;
    @(negedge clk); @(negedge clk); rst_n = 1;
    check(pin_out == 16'h0000, "output reset");
    ref_out = 0;
    for (int t = 0; t < 500; t++) begin
      pin_in = 16'($urandom);
      if (($urandom % 2) != 0) begin
        we = 1; addr = 2'd2; be = 2'($urandom); wdata = 16'($urandom);
        if (be[0]) ref_out[7:0] = wdata[7:0];
        if (be[1]) ref_out[15:8] = wdata[15:8];
        @(negedge clk); we = 0;
        check(pin_out == ref_out, "output pins after write");
      end else begin
        logic [15:0] p;
        p = pin_in;
        @(negedge clk);            // input register samples p
        re = 1; addr = (($urandom % 2) != 0) ? 2'd2 : 2'd0;
        pin_in = 16'($urandom);
        @(negedge clk); re = 0;
        check(rdata == (addr[1] ? ref_out : p), $sformatf("read offset %0d", addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
