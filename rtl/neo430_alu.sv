// neo430_alu: arithmetic logic unit with its two operand registers SRC and DST.
//
// The operands are latched into SRC and DST (from the register file or from the
// swapped memory read data) by src_we/dst_we; the combinational ALU then works
// on the registered values, so the result is available in the cycle after the
// last operand was loaded. In byte mode (byte_op) the ALU works on bits 7:0, the
// "mask" stage clears bits 15:8 of the result and the flags are taken from the
// low byte. Flags are returned as {V, N, Z, C} with MSP430 semantics; upd_flags
// says whether the operation changes them at all (MOV, BIC, BIS and SWPB do not).
// Carry for SUB/SUBC/CMP is the MSP430 "no borrow" carry. DADD adds in BCD.
//
// The synchronization port reads and writes SRC (sync_sel=0) or DST (1) so that
// the internal operand state can be copied between CPU copies. Synchronous
// active-low reset clears both registers.
module neo430_alu
  import neo430_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        src_we,
  input  logic [15:0] src_in,
  input  logic        dst_we,
  input  logic [15:0] dst_in,
  input  alu_op_e     op,
  input  logic        byte_op,
  input  logic        c_in,
  output logic [15:0] res,
  output logic [3:0]  flags,      // {V, N, Z, C}
  output logic        upd_flags,
  output logic [15:0] src_q,
  output logic [15:0] dst_q,
  // synchronization port
  input  logic        sync_sel,   // 0: SRC, 1: DST
  input  logic        sync_we,
  input  logic [15:0] sync_wdata,
  output logic [15:0] sync_rdata
);

  logic [15:0] src_r, dst_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      src_r <= '0;
      dst_r <= '0;
    end else begin
      if (sync_we && !sync_sel) src_r <= sync_wdata;
      else if (src_we)          src_r <= src_in;
      if (sync_we && sync_sel)  dst_r <= sync_wdata;
      else if (dst_we)          dst_r <= dst_in;
    end
  end

  assign src_q      = src_r;
  assign dst_q      = dst_r;
  assign sync_rdata = sync_sel ? dst_r : src_r;

  // BCD add of one nibble with carry
  function automatic logic [4:0] bcd_nib(input logic [3:0] a, input logic [3:0] b, input logic ci);
    logic [4:0] s;
    logic       cy;
    s  = {1'b0, a} + {1'b0, b} + {4'b0, ci};
    cy = (s > 5'd9);
    if (cy) s = s + 5'd6;
    return {cy, s[3:0]};
  endfunction

  logic [16:0] sum;
  logic [15:0] r, m;
  logic        msb_s, msb_d, msb_r;
  logic        c, v, cz;           // cz: C = not Z
  logic [4:0]  nib;
  logic        dc;
  logic [15:0] b;
  logic        ci;

  always_comb begin
    sum = '0; r = '0; b = '0; ci = 1'b0; msb_r = 1'b0; c = 1'b0; v = 1'b0; cz = 1'b0;
    nib = '0; dc = c_in;
    upd_flags = 1'b1;
    msb_s = byte_op ? src_r[7] : src_r[15];
    msb_d = byte_op ? dst_r[7] : dst_r[15];
    unique case (op)
      ALU_MOV:  begin r = src_r; upd_flags = 1'b0; end
      ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBC: begin
        b  = (op == ALU_SUB || op == ALU_SUBC) ? ~src_r : src_r;
        ci = (op == ALU_ADD) ? 1'b0 : (op == ALU_SUB) ? 1'b1 : c_in;
        if (byte_op) begin
          sum = {8'b0, {1'b0, dst_r[7:0]} + {1'b0, b[7:0]} + {8'b0, ci}};
          c   = sum[8];
        end else begin
          sum = {1'b0, dst_r} + {1'b0, b} + {16'b0, ci};
          c   = sum[16];
        end
        r = sum[15:0];
        msb_r = byte_op ? r[7] : r[15];
        v = ((byte_op ? b[7] : b[15]) == msb_d) && (msb_r != msb_d);
      end
      ALU_DADD: begin
        for (int i = 0; i < 4; i++) begin
          nib = bcd_nib(dst_r[4*i +: 4], src_r[4*i +: 4], dc);
          r[4*i +: 4] = nib[3:0];
          dc = nib[4];
          if (byte_op && i == 1) c = dc;
        end
        if (!byte_op) c = dc;
      end
      ALU_AND:  begin r = dst_r & src_r; cz = 1'b1; end
      ALU_BIC:  begin r = dst_r & ~src_r; upd_flags = 1'b0; end
      ALU_BIS:  begin r = dst_r | src_r; upd_flags = 1'b0; end
      ALU_XOR:  begin r = dst_r ^ src_r; cz = 1'b1; v = msb_s & msb_d; end
      ALU_RRC:  begin
        r = byte_op ? {8'b0, c_in, src_r[7:1]} : {c_in, src_r[15:1]};
        c = src_r[0];
      end
      ALU_RRA:  begin
        r = byte_op ? {8'b0, src_r[7], src_r[7:1]} : {src_r[15], src_r[15:1]};
        c = src_r[0];
      end
      ALU_SWPB: begin r = {src_r[7:0], src_r[15:8]}; upd_flags = 1'b0; end
      ALU_SXT:  begin r = {{8{src_r[7]}}, src_r[7:0]}; cz = 1'b1; end
      default:  begin r = src_r; upd_flags = 1'b0; end
    endcase
    // mask stage: byte results only keep the low byte (SWPB/SXT are word-only)
    m = (byte_op && op != ALU_SWPB && op != ALU_SXT) ? {8'b0, r[7:0]} : r;
    res = m;
    flags[2] = (byte_op && op != ALU_SXT) ? m[7] : m[15];   // N
    flags[1] = (byte_op && op != ALU_SXT) ? (m[7:0] == 8'b0) : (m == 16'b0); // Z
    flags[0] = cz ? !flags[1] : c;                            // C
    flags[3] = v;                                             // V
  end

endmodule
