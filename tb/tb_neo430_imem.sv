// tb_neo430_imem: fills the program memory through the load port with a
// pattern, then reads random addresses through the CPU port and checks the
// data and the one-cycle read latency (rdata holds until the next read), on
// both read ports at once with independent addresses.
module tb_neo430_imem;
  localparam int unsigned SIZE = 4096;
  logic clk = 1'b0, re, re_b, ld_we;
  logic [15:0] addr, rdata, addr_b, rdata_b, ld_wdata;
  logic [10:0] ld_addr;
  int checks = 0, failures = 0;

  neo430_imem #(.SIZE(SIZE)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] pat(input int i);
    return 16'(i * 40503 + 17);
  endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    re = 0; re_b = 0; addr_b = 0; ld_we = 0; addr = 0; ld_addr = 0; ld_wdata = 0;
    for (int i = 0; i < SIZE/2; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 11'(i); ld_wdata = pat(i);
    end
    @(negedge clk); ld_we = 0;
    for (int t = 0; t < 1000; t++) begin
      int w, wb;
      logic [15:0] prev_d, prev_b;
      w  = $urandom % (SIZE/2);
      wb = $urandom % (SIZE/2);
      prev_d = rdata;
      prev_b = rdata_b;
      addr = 16'(w * 2 + ($urandom % 2)); re = 1;
      addr_b = 16'(wb * 2 + ($urandom % 2)); re_b = 1;
      #1 check(rdata == prev_d && rdata_b == prev_b, "read data changed before the clock edge");
      @(negedge clk);
      check(rdata == pat(w), $sformatf("word %0d: %h, expected %h", w, rdata, pat(w)));
      check(rdata_b == pat(wb), $sformatf("port b word %0d: %h, expected %h", wb, rdata_b, pat(wb)));
      re = 0; addr = 16'($urandom);
      re_b = 0; addr_b = 16'($urandom);
      @(negedge clk);
      check(rdata == pat(w) && rdata_b == pat(wb), "read data not held without a read strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
