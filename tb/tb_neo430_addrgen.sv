// tb_neo430_addrgen: checks the adder with every offset choice, the three
// address sources (sum, MAR, IRQ vector, base), MAR loading and the MAR sync
// write against values computed in the testbench.
module tb_neo430_addrgen;
  import neo430_pkg::*;
  logic clk = 1'b0, rst_n;
  logic [15:0] base, imm, sum, mem_addr, mar_q, sync_wdata;
  logic [2:0] off_sel;
  logic [1:0] addr_sel;
  logic mar_we, sync_we;
  int checks = 0, failures = 0;
  logic [15:0] ref_mar, exp_sum;

  neo430_addrgen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; base = 0; imm = 0; off_sel = 0; addr_sel = 0; mar_we = 0; sync_we = 0; sync_wdata = 0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    ref_mar = 0;
    for (int t = 0; t < 1000; t++) begin
      base = 16'($urandom); imm = 16'($urandom); off_sel = 3'($urandom % 5);
      addr_sel = 2'($urandom); mar_we = 1'($urandom); sync_we = ($urandom % 6) == 0;
      sync_wdata = 16'($urandom);
      #1;
      case (off_sel)
        3'd1: exp_sum = base + 16'd1;
        3'd2: exp_sum = base + 16'd2;
        3'd3: exp_sum = base - 16'd2;
        3'd4: exp_sum = base + imm;
        default: exp_sum = base;
      endcase
      check(sum == exp_sum, $sformatf("sum off_sel=%0d", off_sel));
      check(mem_addr == (addr_sel == 0 ? exp_sum : addr_sel == 1 ? ref_mar :
                         addr_sel == 2 ? IRQ_VECTOR_ADDR : base), $sformatf("mem_addr sel=%0d", addr_sel));
      check(mar_q == ref_mar, "MAR");
      @(negedge clk);
      if (sync_we) ref_mar = sync_wdata; else if (mar_we) ref_mar = exp_sum;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
