// tb_neo430_alu: checks every ALU operation in word and byte mode with random
// operands against a reference computed in integer arithmetic (MSP430 rules for
// N, Z, C and V, BCD addition digit by digit), plus the SRC/DST registers and
// their synchronization access.
module tb_neo430_alu;
  import neo430_pkg::*;
  logic clk = 1'b0, rst_n;
  logic src_we, dst_we, byte_op, c_in, upd_flags, sync_sel, sync_we;
  logic [15:0] src_in, dst_in, res, src_q, dst_q, sync_wdata, sync_rdata;
  logic [3:0] flags;
  alu_op_e op;
  int checks = 0, failures = 0;

  neo430_alu dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: returns {upd, V, N, Z, C, result}
  function automatic logic [20:0] model(input alu_op_e o, input logic [15:0] s, input logic [15:0] d,
                                        input logic bw, input logic ci);
    int unsigned w, mask, sign, a, b, r, full;
    logic c, v, upd, zc;
    w = bw ? 8 : 16; mask = (1 << w) - 1; sign = 1 << (w - 1);
    a = d & mask; b = s & mask; c = 0; v = 0; upd = 1; zc = 0; r = 0;
    case (o)
      ALU_MOV:  begin r = b; upd = 0; end
      ALU_ADD:  begin full = a + b;      r = full & mask; c = full > mask; v = ((a ^ r) & (b ^ r) & sign) != 0; end
      ALU_ADDC: begin full = a + b + ci; r = full & mask; c = full > mask; v = ((a ^ r) & (b ^ r) & sign) != 0; end
      ALU_SUB:  begin full = a + (~b & mask) + 1;  r = full & mask; c = full > mask; v = ((a ^ b) & (a ^ r) & sign) != 0; end
      ALU_SUBC: begin full = a + (~b & mask) + ci; r = full & mask; c = full > mask; v = ((a ^ b) & (a ^ r) & sign) != 0; end
      ALU_DADD: begin
        int unsigned cy, dg;
        cy = ci;
        for (int k = 0; k < 4; k++) begin
          dg = ((d >> (4*k)) & 15) + ((s >> (4*k)) & 15) + cy;
          cy = dg > 9;
          if (cy) dg = dg + 6;
          r = r | ((dg & 15) << (4*k));
          if (bw && k == 1) c = cy;
        end
        if (!bw) c = cy;
        r = r & mask;
      end
      ALU_AND:  begin r = a & b; zc = 1; end
      ALU_BIC:  begin r = a & ~b & mask; upd = 0; end
      ALU_BIS:  begin r = a | b; upd = 0; end
      ALU_XOR:  begin r = a ^ b; zc = 1; v = ((a & sign) != 0) && ((b & sign) != 0); end
      ALU_RRC:  begin r = (b >> 1) | (ci ? sign : 0); c = b & 1; end
      ALU_RRA:  begin r = (b >> 1) | (b & sign); c = b & 1; end
      ALU_SWPB: begin r = {s[7:0], s[15:8]}; upd = 0; w = 16; mask = 16'hFFFF; sign = 16'h8000; end
      ALU_SXT:  begin r = {{8{s[7]}}, s[7:0]}; zc = 1; w = 16; mask = 16'hFFFF; sign = 16'h8000; end
      default:  begin r = b; upd = 0; end
    endcase
    if (zc) c = (r & mask) != 0;
    return {upd, v, (r & sign) != 0, (r & mask) == 0, c, 16'(r)};
  endfunction

  alu_op_e ops [14] = '{ALU_MOV, ALU_ADD, ALU_ADDC, ALU_SUBC, ALU_SUB, ALU_DADD, ALU_AND,
                        ALU_BIC, ALU_BIS, ALU_XOR, ALU_RRC, ALU_RRA, ALU_SWPB, ALU_SXT};

  initial begin
    logic [20:0] e;
    logic [15:0] s, d;
    rst_n = 1'b0; src_we = 0; dst_we = 0; src_in = 0; dst_in = 0; op = ALU_MOV; byte_op = 0; c_in = 0;
    sync_sel = 0; sync_we = 0; sync_wdata = 0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      s = 16'($urandom); d = 16'($urandom);
      if (t % 7 == 0) begin s = 16'h9999 & 16'($urandom); d = 16'h9999 & 16'($urandom); end // BCD digits
      src_in = s; dst_in = d; src_we = 1; dst_we = 1;
      @(negedge clk);
      src_we = 0; dst_we = 0;
      op = ops[$urandom % 14]; byte_op = 1'($urandom); c_in = 1'($urandom);
      if (op == ALU_SWPB || op == ALU_SXT) byte_op = 0;
      #1;
      e = model(op, s, d, byte_op, c_in);
      check(src_q == s && dst_q == d, "operand registers");
      check(res == e[15:0], $sformatf("%s bw=%0d s=%h d=%h c=%0d: res %h exp %h", op.name(), byte_op, s, d, c_in, res, e[15:0]));
      check(upd_flags == e[20], $sformatf("%s upd", op.name()));
      if (e[20]) check(flags == e[19:16] || (op == ALU_DADD && flags[2:0] == e[18:16]),
                       $sformatf("%s bw=%0d s=%h d=%h c=%0d: flags %b exp %b", op.name(), byte_op, s, d, c_in, flags, e[19:16]));
    end
    // synchronization access to SRC and DST
    @(negedge clk);
    sync_sel = 0; sync_we = 1; sync_wdata = 16'hCAFE; @(negedge clk);
    sync_sel = 1; sync_wdata = 16'hBEEF; @(negedge clk);
    sync_we = 0; sync_sel = 0; #1;
    check(src_q == 16'hCAFE && sync_rdata == 16'hCAFE, "sync write/read SRC");
    sync_sel = 1; #1;
    check(dst_q == 16'hBEEF && sync_rdata == 16'hBEEF, "sync write/read DST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
