// tb_neo430_regfile: compares the register file with a reference array under
// random traffic on all write ports (result, pointer update, flags, sync),
// including collisions, the read-only CG register and reset.
module tb_neo430_regfile;
  logic clk = 1'b0, rst_n;
  logic [3:0] rs_addr, rd_addr, wa_addr, wb_addr, sync_addr, flags;
  logic [15:0] rs_data, rd_data, pc, sp, sr, wa_data, wb_data, sync_wdata, sync_rdata;
  logic wa_en, wb_en, flags_we, sync_we;
  int checks = 0, failures = 0;
  logic [15:0] ref_r [16];

  neo430_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; {wa_en, wb_en, flags_we, sync_we} = '0;
    rs_addr = 0; rd_addr = 0; wa_addr = 0; wb_addr = 0; sync_addr = 0; flags = 0;
    wa_data = 0; wb_data = 0; sync_wdata = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    foreach (ref_r[i]) ref_r[i] = '0;
    for (int i = 0; i < 16; i++) begin
      rs_addr = 4'(i); #1; check(rs_data == 16'h0, "reset value");
    end
    for (int t = 0; t < 2000; t++) begin
      wa_en = 1'($urandom); wa_addr = 4'($urandom); wa_data = 16'($urandom);
      wb_en = 1'($urandom); wb_addr = 4'($urandom); wb_data = 16'($urandom);
      flags_we = 1'($urandom); flags = 4'($urandom);
      sync_we = ($urandom % 8) == 0; sync_addr = 4'($urandom); sync_wdata = 16'($urandom);
      @(negedge clk);
      // reference update (priority: sync, A, B, flags; CG ignores A/B)
      for (int i = 0; i < 16; i++) begin
        if (sync_we && sync_addr == 4'(i)) ref_r[i] = sync_wdata;
        else if (wa_en && wa_addr == 4'(i) && i != 3) ref_r[i] = wa_data;
        else if (wb_en && wb_addr == 4'(i) && i != 3) ref_r[i] = wb_data;
        else if (flags_we && i == 2) begin
          ref_r[i][0] = flags[0]; ref_r[i][1] = flags[1];
          ref_r[i][2] = flags[2]; ref_r[i][8] = flags[3];
        end
      end
      rs_addr = 4'($urandom); rd_addr = 4'($urandom); sync_addr = 4'($urandom);
      {wa_en, wb_en, flags_we, sync_we} = '0;
      #1;
      check(rs_data == ref_r[rs_addr], $sformatf("rs R%0d", rs_addr));
      check(rd_data == ref_r[rd_addr], $sformatf("rd R%0d", rd_addr));
      check(sync_rdata == ref_r[sync_addr], $sformatf("sync R%0d", sync_addr));
      check(pc == ref_r[0] && sp == ref_r[1] && sr == ref_r[2], "PC/SP/SR outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
