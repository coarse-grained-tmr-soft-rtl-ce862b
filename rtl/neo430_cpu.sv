// neo430_cpu: 16-bit MSP430-compatible multi-cycle CPU, one of the three copies
// of the coarse-grained TMR system, with a hardware state-synchronization port.
//
// The CPU is built from the blocks of the NEO430 data path: the register file
// (PC, SP, SR, CG, R4..R15), the address generator with its MAR, the ALU with its
// SRC and DST operand registers, and the control arbiter (CA), a finite state
// machine that holds the instruction register IR and sequences each instruction
// as a series of micro operations. Every instruction starts in state IFETCH_0.
// In IFETCH_0 the CPU also waits for an interrupt request: while SR.CPUOFF is set
// (SLEEP mode) it stays there until an enabled IRQ arrives.
//
// Instruction set: all twelve MSP430 double-operand instructions (MOV ADD ADDC
// SUBC SUB CMP DADD BIT BIC BIS XOR AND), the single-operand RRC SWPB RRA SXT
// PUSH CALL RETI, and the eight conditional jumps, in word and byte form, with
// all seven addressing modes and the R2/R3 constant generator. One interrupt
// channel (irq_i, latched as pending) vectors through the word at
// IRQ_VECTOR_ADDR; entry pushes PC then SR and clears SR, RETI restores them.
//
// Memory interface (one bus for instructions, data and peripherals, carried in
// bus_req_t): a read issued in cycle t (re=1) returns mem_rdata in cycle t+1;
// a write (we=1, be = byte lanes, data already on the right lane) is done at the
// clock edge. Cycle counts: register-to-register 4 cycles, jump 3, each memory
// operand or index word adds 2.
//
// Synchronization port: sync_addr 0..15 selects R0..R15, 16 MAR, 17 IR, 18 SRC,
// 19 DST; sync_rdata shows the selected register combinationally and sync_we
// overwrites it. hold_i forces the CA to idle in IFETCH_0 (used to keep the copy
// being written quiet while its registers are copied). sleep_o is high when
// the CA idles in IFETCH_0 because of SLEEP mode or hold.
//
// The register names, the IFETCH_0/SLEEP/IRQ behaviour and the list of registers
// that are synchronized follow the NEO430 description; the state sequence, the
// cycle counts, the single IRQ channel and the sync-port numbering are this
// design's own. Reset is synchronous and active low; PC starts at 0.
module neo430_cpu
  import neo430_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // memory / system bus
  output bus_req_t    bus_o,
  input  logic [15:0] mem_rdata,
  // interrupt and status
  input  logic        irq_i,
  input  logic        hold_i,
  output logic        sleep_o,
  // synchronization port
  input  logic [4:0]  sync_addr,
  input  logic        sync_we,
  input  logic [15:0] sync_wdata,
  output logic [15:0] sync_rdata
);

  typedef enum logic [4:0] {
    IFETCH_0, IFETCH_1, DECODE,
    SRC_EXT_0, SRC_EXT_1, SRC_RD_0, SRC_RD_1,
    DST_EXT_0, DST_EXT_1, DST_RD_0, DST_RD_1,
    EXECUTE, PUSH_0, PUSH_1, CALL_0, CALL_1,
    RETI_0, RETI_1, RETI_2, RETI_3,
    IRQ_0, IRQ_1, IRQ_2, IRQ_3, IRQ_4, IRQ_5
  } ca_state_e;

  ca_state_e   state, state_nxt;
  logic [15:0] ir;
  logic        ir_we;
  logic        irq_pend;

  // ---------------- instruction fields ----------------
  logic        is_jmp, is_f2, is_f1;
  logic [3:0]  src_reg, dst_reg;
  logic [1:0]  as_m;
  logic        ad_m, bw;
  fmt2_op_e    f2op;
  fmt1_op_e    f1op;

  assign is_jmp  = (ir[15:13] == 3'b001);
  assign is_f2   = (ir[15:10] == 6'b000100);
  assign is_f1   = (ir[15:12] >= 4'h4);
  assign src_reg = is_f1 ? ir[11:8] : ir[3:0];
  assign dst_reg = ir[3:0];
  assign as_m    = ir[5:4];
  assign ad_m    = ir[7];
  assign bw      = ir[6] & !(is_f2 && (f2op == F2_SWPB || f2op == F2_SXT || f2op == F2_CALL));
  assign f2op    = fmt2_op_e'(ir[9:7]);
  assign f1op    = fmt1_op_e'(ir[15:12]);

  // source operand classification
  logic        src_const, src_regm, src_idx, src_inc;
  logic [15:0] const_val;
  always_comb begin
    src_const = (src_reg == REG_CG) || (src_reg == REG_SR && as_m[1]);
    src_regm  = !src_const && as_m == 2'b00;
    src_idx   = !src_const && as_m == 2'b01;
    src_inc   = !src_const && as_m == 2'b11;
    unique case ({src_reg == REG_SR, as_m})
      3'b000:  const_val = 16'h0000;
      3'b001:  const_val = 16'h0001;
      3'b010:  const_val = 16'h0002;
      3'b011:  const_val = 16'hFFFF;
      3'b110:  const_val = 16'h0004;
      3'b111:  const_val = 16'h0008;
      default: const_val = 16'h0000;
    endcase
  end

  // what follows once the source operand is in SRC
  ca_state_e after_src;
  always_comb begin
    if (is_f2) begin
      unique case (f2op)
        F2_PUSH: after_src = PUSH_0;
        F2_CALL: after_src = CALL_0;
        default: after_src = EXECUTE;
      endcase
    end else begin
      after_src = ad_m ? DST_EXT_0 : EXECUTE;
    end
  end

  // ---------------- data path blocks ----------------
  logic [3:0]  rs_addr, rd_addr;
  logic [15:0] rs_data, rd_data, pc, sp, sr;
  logic        wa_en, wb_en, flags_we;
  logic [3:0]  wa_addr, wb_addr;
  logic [15:0] wa_data, wb_data;
  logic [15:0] rf_sync_rdata;

  logic [15:0] ag_base, ag_imm, ag_sum, mem_addr, mar;
  logic [2:0]  ag_off;
  logic [1:0]  ag_asel;
  logic        mar_we;

  logic        src_we, dst_we;
  logic [15:0] src_in, dst_in, alu_res, src_q, dst_q, alu_sync_rdata;
  logic [3:0]  alu_flags;
  logic        alu_upd;
  alu_op_e     alu_op;

  neo430_regfile u_rf (
    .clk, .rst_n,
    .rs_addr, .rs_data, .rd_addr, .rd_data, .pc, .sp, .sr,
    .wa_en, .wa_addr, .wa_data, .wb_en, .wb_addr, .wb_data,
    .flags_we, .flags(alu_flags),
    .sync_addr(sync_addr[3:0]), .sync_we(sync_we && sync_addr < 5'd16),
    .sync_wdata, .sync_rdata(rf_sync_rdata)
  );

  neo430_addrgen u_ag (
    .clk, .rst_n,
    .base(ag_base), .off_sel(ag_off), .imm(ag_imm), .mar_we, .addr_sel(ag_asel),
    .sum(ag_sum), .mem_addr, .mar_q(mar),
    .sync_we(sync_we && sync_addr == SYNC_MAR), .sync_wdata
  );

  neo430_alu u_alu (
    .clk, .rst_n,
    .src_we, .src_in, .dst_we, .dst_in,
    .op(alu_op), .byte_op(bw), .c_in(sr[SR_C]),
    .res(alu_res), .flags(alu_flags), .upd_flags(alu_upd), .src_q, .dst_q,
    .sync_sel(sync_addr == SYNC_DST),
    .sync_we(sync_we && (sync_addr == SYNC_SRC || sync_addr == SYNC_DST)),
    .sync_wdata, .sync_rdata(alu_sync_rdata)
  );

  // ALU operation from the instruction
  always_comb begin
    alu_op = ALU_MOV;
    if (is_f2) begin
      unique case (f2op)
        F2_RRC:  alu_op = ALU_RRC;
        F2_SWPB: alu_op = ALU_SWPB;
        F2_RRA:  alu_op = ALU_RRA;
        F2_SXT:  alu_op = ALU_SXT;
        default: alu_op = ALU_MOV;
      endcase
    end else if (is_f1) begin
      unique case (f1op)
        OP_MOV:  alu_op = ALU_MOV;
        OP_ADD:  alu_op = ALU_ADD;
        OP_ADDC: alu_op = ALU_ADDC;
        OP_SUBC: alu_op = ALU_SUBC;
        OP_SUB, OP_CMP: alu_op = ALU_SUB;
        OP_DADD: alu_op = ALU_DADD;
        OP_BIT, OP_AND: alu_op = ALU_AND;
        OP_BIC:  alu_op = ALU_BIC;
        OP_BIS:  alu_op = ALU_BIS;
        OP_XOR:  alu_op = ALU_XOR;
        default: alu_op = ALU_MOV;
      endcase
    end
  end

  // swap stage on read data: byte operands come from the addressed lane
  logic [15:0] rdata_sw;
  assign rdata_sw = !bw ? mem_rdata : (mar[0] ? {8'b0, mem_rdata[15:8]} : {8'b0, mem_rdata[7:0]});

  // jump condition
  logic jmp_take;
  always_comb begin
    unique case (ir[12:10])
      3'd0: jmp_take = !sr[SR_Z];
      3'd1: jmp_take =  sr[SR_Z];
      3'd2: jmp_take = !sr[SR_C];
      3'd3: jmp_take =  sr[SR_C];
      3'd4: jmp_take =  sr[SR_N];
      3'd5: jmp_take = !(sr[SR_N] ^ sr[SR_V]);
      3'd6: jmp_take =  (sr[SR_N] ^ sr[SR_V]);
      default: jmp_take = 1'b1;
    endcase
  end

  // auto-increment step: 1 for byte operands, 2 for words and always for PC/SP
  logic [2:0] inc_sel;
  assign inc_sel = (bw && src_reg != REG_PC && src_reg != REG_SP) ? 3'd1 : 3'd2;

  logic stores;   // format I result goes back to the destination
  assign stores = is_f1 && f1op != OP_CMP && f1op != OP_BIT;

  logic [1:0]  wr_be;
  assign wr_be = !bw ? 2'b11 : (mar[0] ? 2'b10 : 2'b01);

  // register that an index word applies to
  logic [3:0] ext_reg;
  assign ext_reg = (state == SRC_EXT_1) ? src_reg : dst_reg;

  // ---------------- control arbiter FSM ----------------
  always_comb begin
    state_nxt = state;
    ir_we = 1'b0;
    rs_addr = src_reg; rd_addr = dst_reg;
    wa_en = 1'b0; wa_addr = dst_reg; wa_data = alu_res;
    wb_en = 1'b0; wb_addr = REG_PC;  wb_data = ag_sum;
    flags_we = 1'b0;
    ag_base = pc; ag_off = 3'd0; ag_imm = '0; ag_asel = 2'd3; mar_we = 1'b0;
    src_we = 1'b0; src_in = rs_data; dst_we = 1'b0; dst_in = rd_data;
    bus_o.addr = mem_addr; bus_o.wdata = alu_res; bus_o.be = 2'b11;
    bus_o.re = 1'b0; bus_o.we = 1'b0;

    unique case (state)
      IFETCH_0: begin
        if (hold_i) begin
          state_nxt = IFETCH_0;
        end else if (irq_pend && sr[SR_GIE]) begin
          state_nxt = IRQ_0;
        end else if (!sr[SR_CPUOFF]) begin
          bus_o.re = 1'b1;                          // fetch at PC
          ag_off = 3'd2; wb_en = 1'b1;              // PC <= PC + 2
          state_nxt = IFETCH_1;
        end
      end
      IFETCH_1: begin
        ir_we = 1'b1;
        state_nxt = DECODE;
      end
      DECODE: begin
        if (is_jmp) begin
          ag_off = 3'd4; ag_imm = {{5{ir[9]}}, ir[9:0], 1'b0};
          wb_en = jmp_take;                         // PC <= PC + 2*offset
          state_nxt = IFETCH_0;
        end else if (is_f2 && f2op == F2_RETI) begin
          state_nxt = RETI_0;
        end else if (is_f1 || (is_f2 && f2op != F2_NONE)) begin
          // load DST from the destination register (used when Ad = 0)
          dst_we = 1'b1;
          if (src_const) begin
            src_we = 1'b1; src_in = const_val; state_nxt = after_src;
          end else if (src_regm) begin
            src_we = 1'b1; src_in = rs_data; state_nxt = after_src;
          end else if (src_idx) begin
            state_nxt = SRC_EXT_0;
          end else begin                            // @Rn, @Rn+, #N
            ag_base = rs_data; mar_we = 1'b1;       // MAR <= Rn
            state_nxt = SRC_RD_0;
          end
        end else begin
          state_nxt = IFETCH_0;                     // undefined opcode: no operation
        end
      end
      SRC_EXT_0, DST_EXT_0: begin
        bus_o.re = 1'b1;                            // index word at PC
        ag_off = 3'd2; wb_en = 1'b1;                // PC <= PC + 2
        state_nxt = (state == SRC_EXT_0) ? SRC_EXT_1 : DST_EXT_1;
      end
      SRC_EXT_1, DST_EXT_1: begin
        rs_addr = ext_reg;
        // absolute (R2): 0 + X; symbolic (PC): address of the index word + X
        ag_base = (ext_reg == REG_SR) ? 16'h0000 : rs_data;
        ag_off  = 3'd4;
        ag_imm  = (ext_reg == REG_PC) ? mem_rdata - 16'd2 : mem_rdata;
        mar_we  = 1'b1;
        state_nxt = (state == SRC_EXT_1) ? SRC_RD_0 : DST_RD_0;
      end
      SRC_RD_0: begin
        ag_asel = 2'd1; bus_o.re = 1'b1;            // read @MAR
        if (src_inc) begin                          // Rn <= Rn + 1/2
          ag_base = rs_data; ag_off = inc_sel; wb_en = 1'b1; wb_addr = src_reg;
        end
        state_nxt = SRC_RD_1;
      end
      SRC_RD_1: begin
        src_we = 1'b1; src_in = rdata_sw;
        dst_we = 1'b1;                              // refresh DST (Rd may be Rn)
        state_nxt = after_src;
      end
      DST_RD_0: begin
        ag_asel = 2'd1; bus_o.re = 1'b1;
        state_nxt = DST_RD_1;
      end
      DST_RD_1: begin
        dst_we = 1'b1; dst_in = rdata_sw;
        state_nxt = EXECUTE;
      end
      EXECUTE: begin
        flags_we = alu_upd && (is_f1 || is_f2);
        ag_asel = 2'd1;
        bus_o.wdata = bw ? {alu_res[7:0], alu_res[7:0]} : alu_res;
        bus_o.be = wr_be;
        if (is_f1) begin
          if (stores && !ad_m) begin wa_en = 1'b1; wa_addr = dst_reg; end
          if (stores &&  ad_m) bus_o.we = 1'b1;
        end else begin
          if (as_m == 2'b00) begin wa_en = 1'b1; wa_addr = dst_reg; end
          else if (!src_const && !(src_reg == REG_PC && as_m == 2'b11)) bus_o.we = 1'b1;
        end
        state_nxt = IFETCH_0;
      end
      PUSH_0, CALL_0, IRQ_0, IRQ_2: begin
        ag_base = sp; ag_off = 3'd3; mar_we = 1'b1; // MAR, SP <= SP - 2
        wb_en = 1'b1; wb_addr = REG_SP;
        state_nxt = (state == PUSH_0) ? PUSH_1 : (state == CALL_0) ? CALL_1 :
                    (state == IRQ_0) ? IRQ_1 : IRQ_3;
      end
      PUSH_1: begin
        ag_asel = 2'd1; bus_o.we = 1'b1;
        bus_o.wdata = bw ? {src_q[7:0], src_q[7:0]} : src_q;
        bus_o.be = wr_be;
        state_nxt = IFETCH_0;
      end
      CALL_1, IRQ_1: begin
        ag_asel = 2'd1; bus_o.we = 1'b1; bus_o.wdata = pc;   // push PC
        if (state == CALL_1) begin
          wa_en = 1'b1; wa_addr = REG_PC; wa_data = src_q;   // PC <= target
          state_nxt = IFETCH_0;
        end else begin
          state_nxt = IRQ_2;
        end
      end
      IRQ_3: begin
        ag_asel = 2'd1; bus_o.we = 1'b1; bus_o.wdata = sr;   // push SR
        wa_en = 1'b1; wa_addr = REG_SR; wa_data = '0;        // clear SR
        state_nxt = IRQ_4;
      end
      IRQ_4: begin
        ag_asel = 2'd2; bus_o.re = 1'b1;                     // read vector
        state_nxt = IRQ_5;
      end
      IRQ_5: begin
        wa_en = 1'b1; wa_addr = REG_PC; wa_data = mem_rdata;
        state_nxt = IFETCH_0;
      end
      RETI_0, RETI_2: begin
        ag_base = sp; ag_asel = 2'd3; bus_o.re = 1'b1;       // read @SP
        ag_off = 3'd2; wb_en = 1'b1; wb_addr = REG_SP;       // SP <= SP + 2
        state_nxt = (state == RETI_0) ? RETI_1 : RETI_3;
      end
      RETI_1: begin
        wa_en = 1'b1; wa_addr = REG_SR; wa_data = mem_rdata;
        state_nxt = RETI_2;
      end
      RETI_3: begin
        wa_en = 1'b1; wa_addr = REG_PC; wa_data = mem_rdata;
        state_nxt = IFETCH_0;
      end
      default: state_nxt = IFETCH_0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IFETCH_0;
      ir       <= '0;
      irq_pend <= 1'b0;
    end else begin
      state <= state_nxt;
      if (sync_we && sync_addr == SYNC_IR) ir <= sync_wdata;
      else if (ir_we)                      ir <= mem_rdata;
      if (irq_i)               irq_pend <= 1'b1;
      else if (state == IRQ_3) irq_pend <= 1'b0;
    end
  end

  assign sleep_o = (state == IFETCH_0) &&
                   (hold_i || (sr[SR_CPUOFF] && !(irq_pend && sr[SR_GIE])));

  always_comb begin
    if (sync_addr < 5'd16)          sync_rdata = rf_sync_rdata;
    else if (sync_addr == SYNC_MAR) sync_rdata = mar;
    else if (sync_addr == SYNC_IR)  sync_rdata = ir;
    else if (sync_addr == SYNC_SRC || sync_addr == SYNC_DST) sync_rdata = alu_sync_rdata;
    else                            sync_rdata = '0;
  end

  // unused: dst_q is consumed inside the ALU only
  logic unused;
  assign unused = ^dst_q;

endmodule
