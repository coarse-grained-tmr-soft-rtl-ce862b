// tb_neo430_dmem: random word and byte-lane writes and reads against a
// reference array, checking the one-cycle read latency.
module tb_neo430_dmem;
  localparam int unsigned SIZE = 2048;
  logic clk = 1'b0, re, we;
  logic [1:0] be;
  logic [15:0] addr, wdata, rdata;
  logic [15:0] ref_m [SIZE/2];
  int checks = 0, failures = 0;

  neo430_dmem #(.SIZE(SIZE)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    re = 0; we = 0; be = 0; addr = 0; wdata = 0;
    for (int i = 0; i < SIZE/2; i++) begin
      @(negedge clk); we = 1; be = 2'b11; addr = 16'(2*i); wdata = 16'(i ^ 16'h5A5A); ref_m[i] = 16'(i ^ 16'h5A5A);
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      int w;
      w = $urandom % (SIZE/2);
      addr = 16'(2*w);
      if (($urandom % 2) != 0) begin
        we = 1; re = 0; be = 2'($urandom); wdata = 16'($urandom);
        if (be[0]) ref_m[w][7:0]  = wdata[7:0];
        if (be[1]) ref_m[w][15:8] = wdata[15:8];
        @(negedge clk); we = 0;
      end else begin
        re = 1; we = 0;
        @(negedge clk); re = 0;
        check(rdata == ref_m[w], $sformatf("word %0d: %h, expected %h", w, rdata, ref_m[w]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
