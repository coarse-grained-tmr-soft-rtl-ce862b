// tb_neo430_cpu: self-checking test of one CPU copy against a program whose
// results were worked out by hand from the MSP430 instruction semantics.
//
// A 64 KiB behavioural memory (one-cycle read latency, byte-lane writes)
// surrounds the CPU. The program exercises every ALU operation, flags, the
// seven addressing modes, byte access on both lanes, jumps, CALL/RET,
// PUSH/POP, sleep and the interrupt entry/RETI; it stores its results into
// memory, which the testbench compares with the expected values. The
// synchronization port and hold input are then tested directly: registers are
// read and overwritten while the CPU sleeps, and a held CPU must not wake.
// The cycle counts of a register-to-register instruction and of a jump are
// checked on the fetch addresses.
//
// A second phase runs 40 random programs of 200 instructions (all double-operand
// operations, RRC/SWPB/RRA/SXT, PUSH and conditional jumps, word and byte, with
// register, indexed, indirect, auto-increment, immediate, absolute and constant
// generator operands) on the CPU and on an instruction-level reference model
// written here from the MSP430 semantics, and compares all sixteen registers at
// every instruction boundary and the data area at the end of each program.
module tb_neo430_cpu;
  import neo430_pkg::*;
  import neo430_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  bus_req_t    bus;
  logic [15:0] mem_rdata;
  logic        irq, hold, sleep;
  logic [4:0]  sync_addr;
  logic        sync_we;
  logic [15:0] sync_wdata, sync_rdata;

  neo430_cpu dut (
    .clk, .rst_n, .bus_o(bus), .mem_rdata, .irq_i(irq), .hold_i(hold), .sleep_o(sleep),
    .sync_addr, .sync_we, .sync_wdata, .sync_rdata
  );

  always #5 clk = ~clk;

  // behavioural memory
  logic [15:0] mem [32768];
  always @(posedge clk) begin
    if (bus.we && bus.be[0]) mem[bus.addr[15:1]][7:0]  <= bus.wdata[7:0];
    if (bus.we && bus.be[1]) mem[bus.addr[15:1]][15:8] <= bus.wdata[15:8];
    if (bus.re) mem_rdata <= mem[bus.addr[15:1]];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic expect_mem(input logic [15:0] a, input logic [15:0] v);
    check(mem[a[15:1]] == v, $sformatf("[%h] = %h, expected %h", a, mem[a[15:1]], v));
  endtask

  int pc_a;
  int L_l1, L_bad, L_sub, L_isr, L_halt1, L_halt2;
  task automatic emit(input logic [15:0] w);
    mem[pc_a/2] = w;
    pc_a += 2;
  endtask
  task automatic movi(input logic [15:0] v, input logic [3:0] r);
    emit(f1(MOV, PC, 0, 0, M_INC, r)); emit(v);
  endtask
  task automatic st(input logic [3:0] r, input logic [15:0] a);   // MOV Rr, &a
    emit(f1(MOV, r, 1, 0, M_REG, SR)); emit(a);
  endtask

  task automatic assemble();
    pc_a = 0;
    movi(16'h1234, 4'd4);
    movi(16'h0F0F, 4'd5);
    emit(f1(ADD, 4'd4, 0, 0, M_REG, 4'd5));            // R5 = 0x2143
    st(4'd5, 16'h0200);
    emit(f1(SUB, 4'd4, 0, 0, M_REG, 4'd5));            // R5 = 0x0F0F
    st(4'd5, 16'h0202);
    movi(16'h7FFF, 4'd6);
    emit(f1(ADD, CG, 0, 0, M_IDX, 4'd6));              // 0x8000: N=1 V=1
    st(SR, 16'h0204);
    movi(16'h0099, 4'd7);
    emit(f1(DADD, CG, 0, 0, M_IDX, 4'd7));             // BCD 99+1 = 0x0100
    st(4'd7, 16'h0206);
    movi(16'h00F0, 4'd8);
    emit(f1(AND, PC, 0, 0, M_INC, 4'd8)); emit(16'h003C); // 0x0030
    emit(f1(XOR, CG, 0, 0, M_INC, 4'd8));              // ^0xFFFF = 0xFFCF
    st(4'd8, 16'h0208);
    emit(f1(BIC, PC, 0, 0, M_INC, 4'd8)); emit(16'h00F0); // 0xFF0F
    emit(f1(BIS, PC, 0, 0, M_INC, 4'd8)); emit(16'h0030); // 0xFF3F
    st(4'd8, 16'h020A);
    movi(16'h8001, 4'd9);
    emit(f2(RRA, 0, M_REG, 4'd9));                     // 0xC000, C=1
    emit(f2(RRC, 0, M_REG, 4'd9));                     // 0xE000, C=0
    st(4'd9, 16'h020C);
    emit(f2(SWPB, 0, M_REG, 4'd9));                    // 0x00E0
    emit(f2(SXT, 0, M_REG, 4'd9));                     // 0xFFE0
    st(4'd9, 16'h020E);
    movi(16'h0210, 4'd10);
    emit(f1(MOV, PC, 1, 0, M_INC, 4'd10)); emit(16'hABCD); emit(16'h0000); // MOV #0xABCD, 0(R10)
    emit(f1(MOV, 4'd10, 0, 0, M_INC, 4'd11));          // MOV @R10+, R11
    emit(f1(MOV, 4'd11, 1, 0, M_REG, 4'd10)); emit(16'h0002); // MOV R11, 2(R10) -> 0x0214
    st(4'd10, 16'h0216);                               // 0x0212
    emit(f1(MOV, PC, 1, 1, M_INC, SR)); emit(16'h0055); emit(16'h0219); // MOV.B #0x55, &0x0219
    emit(f1(MOV, SR, 0, 1, M_IDX, 4'd12)); emit(16'h0219);  // MOV.B &0x0219, R12
    st(4'd12, 16'h021A);
    emit(f1(CMP, PC, 0, 0, M_INC, 4'd12)); emit(16'h0005);  // 0x55 - 5
    emit(jmp(JGE, 16'(pc_a), 16'(L_l1)));
    emit(f1(MOV, PC, 1, 0, M_INC, SR)); emit(16'hDEAD); emit(16'h021C);
    L_l1 = pc_a;
    emit(jmp(JEQ, 16'(pc_a), 16'(L_bad)));
    emit(f1(MOV, CG, 1, 0, M_IDX, SR)); emit(16'h021E);     // MOV #1, &0x021E
    movi(16'h0400, SP);
    emit(f2(CALL, 0, M_INC, PC)); emit(16'(L_sub));
    st(4'd13, 16'h0220);
    emit(f2(PUSH, 0, M_INC, PC)); emit(16'h7777);           // PUSH #0x7777
    emit(f1(MOV, SP, 1, 0, M_INC, SR)); emit(16'h0222);     // MOV @SP+, &0x0222
    st(SP, 16'h0228);                                       // SP back at 0x0400
    // interrupt / sleep
    emit(f1(MOV, PC, 1, 0, M_INC, SR)); emit(16'(L_isr)); emit(IRQ_VECTOR_ADDR);
    emit(f1(BIS, PC, 0, 0, M_INC, SR)); emit(16'h0018);     // GIE | CPUOFF
    emit(f1(MOV, PC, 1, 0, M_INC, SR)); emit(16'h2222); emit(16'h0224);
    L_halt1 = pc_a;
    emit(jmp(JMP, 16'(pc_a), 16'(L_halt1)));
    L_bad = pc_a;
    emit(f1(MOV, PC, 1, 0, M_INC, SR)); emit(16'hBAD0); emit(16'h021E);
    L_halt2 = pc_a;
    emit(jmp(JMP, 16'(pc_a), 16'(L_halt2)));
    L_sub = pc_a;
    movi(16'h1111, 4'd13);
    emit(f1(MOV, SP, 0, 0, M_INC, PC));                     // RET
    L_isr = pc_a;
    emit(f1(MOV, PC, 1, 0, M_INC, SR)); emit(16'h3333); emit(16'h0226);
    emit(f1(BIC, PC, 1, 0, M_INC, SP)); emit(16'h0010); emit(16'h0000); // BIC #CPUOFF, 0(SP)
    emit(f2(RETI, 0, M_REG, PC));
  endtask

  task automatic chk_sync(input logic [4:0] a, input logic [15:0] v, input string what);
    sync_addr = a;
    #1;
    check(sync_rdata == v, $sformatf("%s: %h, expected %h", what, sync_rdata, v));
  endtask

  // instruction timing: fetch-to-fetch distance of a register-to-register
  // instruction (4 cycles) and of a jump that is not taken (3 cycles)
  int unsigned cyc = 0, t_add = 0, t_jeq = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !rphase && bus.re && dut.state == dut.IFETCH_0) begin
      if (bus.addr == 16'h0008) t_add = cyc;
      if (bus.addr == 16'h000A && t_add != 0) begin
        check(cyc - t_add == 4, $sformatf("register ADD took %0d cycles, expected 4", cyc - t_add));
        t_add = 0;
      end
      if (bus.addr == 16'(L_l1)) t_jeq = cyc;
      if (bus.addr == 16'(L_l1 + 2) && t_jeq != 0) begin
        check(cyc - t_jeq == 3, $sformatf("jump took %0d cycles, expected 3", cyc - t_jeq));
        t_jeq = 0;
      end
    end
  end


  // ---------------- random programs against a reference model ----------------
  // An instruction-level model of the MSP430 semantics runs each random program
  // alongside the CPU; at every instruction boundary (CA in IFETCH_0) all
  // sixteen registers must agree, and at the end the data area must agree.
  logic [15:0] rmem [32768];
  logic [15:0] R [16];
  logic [31:0] seed = 32'h2545_F491;
  bit          rphase = 1'b0;

  function automatic logic [31:0] rnd();
    seed ^= seed << 13;
    seed ^= seed >> 17;
    seed ^= seed << 5;
    return seed;
  endfunction

  function automatic logic [15:0] r_rd(input logic [15:0] a, input bit bw);
    logic [15:0] w;
    w = rmem[a[15:1]];
    if (!bw) return w;
    return a[0] ? {8'h00, w[15:8]} : {8'h00, w[7:0]};
  endfunction

  task automatic r_wr(input logic [15:0] a, input logic [15:0] v, input bit bw);
    if (!bw)       rmem[a[15:1]] = v;
    else if (a[0]) rmem[a[15:1]][15:8] = v[7:0];
    else           rmem[a[15:1]][7:0] = v[7:0];
  endtask

  task automatic r_fetch(output logic [15:0] w);
    w = rmem[R[0][15:1]];
    R[0] = R[0] + 16'd2;
  endtask

  task automatic r_src(input logic [3:0] rs, input logic [1:0] as_m, input bit bw,
                       output logic [15:0] v);
    logic [15:0] a;
    if (rs == CG) begin
      v = (as_m == 2'd0) ? 16'h0000 : (as_m == 2'd1) ? 16'h0001 :
          (as_m == 2'd2) ? 16'h0002 : 16'hFFFF;
    end else if (rs == SR && as_m == M_IND) v = 16'h0004;
    else if (rs == SR && as_m == M_INC)     v = 16'h0008;
    else begin
      unique case (as_m)
        M_REG: v = R[rs];
        M_IDX: begin
          r_fetch(a);
          if (rs != SR) a = a + R[rs];
          v = r_rd(a, bw);
        end
        M_IND: v = r_rd(R[rs], bw);
        default:
          if (rs == PC) r_fetch(v);
          else begin
            v = r_rd(R[rs], bw);
            R[rs] = R[rs] + ((bw && rs != SP) ? 16'd1 : 16'd2);
          end
      endcase
    end
    if (bw) v = {8'h00, v[7:0]};
  endtask

  task automatic r_flags(input logic [15:0] r, input bit bw, input bit c, input bit v);
    logic n, z;
    n = bw ? r[7] : r[15];
    z = bw ? (r[7:0] == 8'h00) : (r == 16'h0000);
    R[SR] = (R[SR] & ~16'h0107) | {7'b0, v, 5'b0, n, z, c};
  endtask

  task automatic r_step();
    logic [15:0] w, s, d, r, a, x, mask, msb;
    logic [3:0]  op, rs, rd;
    logic [1:0]  as_m;
    bit          ad, bw, c, v, wr;
    int unsigned full, sv, dv, cin, t;
    r_fetch(w);
    if (w[15:13] == 3'b001) begin                      // jump
      logic [15:0] sr;
      bit take;
      sr = R[SR];
      unique case (w[12:10])
        3'd0: take = !sr[1];
        3'd1: take = sr[1];
        3'd2: take = !sr[0];
        3'd3: take = sr[0];
        3'd4: take = sr[2];
        3'd5: take = (sr[2] == sr[8]);
        3'd6: take = (sr[2] != sr[8]);
        default: take = 1'b1;
      endcase
      if (take) R[PC] = R[PC] + {{5{w[9]}}, w[9:0], 1'b0};
      return;
    end
    if (w[15:10] == 6'b000100) begin                   // single operand
      bw = w[6]; as_m = w[5:4]; rd = w[3:0];
      mask = bw ? 16'h00FF : 16'hFFFF;
      msb  = bw ? 16'h0080 : 16'h8000;
      if (w[9:7] == 3'd4) begin                        // PUSH (word)
        r_src(rd, as_m, 1'b0, s);
        R[SP] = R[SP] - 16'd2;
        r_wr(R[SP], s, 1'b0);
        return;
      end
      a = '0;
      unique case (as_m)
        M_REG: d = R[rd] & mask;
        M_IDX: begin r_fetch(a); a = a + R[rd]; d = r_rd(a, bw); end
        default: begin a = R[rd]; d = r_rd(a, bw); end
      endcase
      unique case (w[9:7])
        3'd0: begin r = ((d >> 1) | (R[SR][0] ? msb : 16'h0)) & mask; r_flags(r, bw, d[0], 1'b0); end
        3'd1: r = {d[7:0], d[15:8]};
        3'd2: begin r = ((d >> 1) | (d & msb)) & mask; r_flags(r, bw, d[0], 1'b0); end
        default: begin r = {{8{d[7]}}, d[7:0]}; r_flags(r, 1'b0, r != 16'h0, 1'b0); end
      endcase
      if (as_m == M_REG) R[rd] = r;
      else               r_wr(a, r, bw);
      return;
    end
    op = w[15:12]; rs = w[11:8]; ad = w[7]; bw = w[6]; as_m = w[5:4]; rd = w[3:0];
    mask = bw ? 16'h00FF : 16'hFFFF;
    msb  = bw ? 16'h0080 : 16'h8000;
    r_src(rs, as_m, bw, s);
    s = s & mask;
    a = '0;
    if (!ad) d = R[rd] & mask;
    else begin
      r_fetch(x);
      a = (rd == SR) ? x : x + R[rd];
      d = r_rd(a, bw);
    end
    wr = (op != CMP && op != BIT);
    c = 1'b0; v = 1'b0; r = '0;
    unique case (op)
      MOV: r = s;
      ADD, ADDC, SUBC, SUB, CMP: begin
        sv  = (op == ADD || op == ADDC) ? 32'(s) : 32'(~s & mask);
        cin = (op == ADD) ? 0 : (op == SUB || op == CMP) ? 1 : 32'(R[SR][0]);
        dv  = 32'(d);
        full = dv + sv + cin;
        r = 16'(full) & mask;
        c = (full > 32'(mask));
        v = (((d ^ r) & (16'(sv) ^ r) & msb) != 16'h0);
        r_flags(r, bw, c, v);
      end
      DADD: begin
        c = R[SR][0];
        for (int i = 0; i < (bw ? 2 : 4); i++) begin
          t = 32'(d[4*i +: 4]) + 32'(s[4*i +: 4]) + 32'(c);
          c = (t > 9);
          if (c) t = t + 6;
          r[4*i +: 4] = 4'(t);
        end
        r_flags(r, bw, c, 1'b0);
      end
      BIT, AND: begin r = s & d; r_flags(r, bw, r != 16'h0, 1'b0); end
      BIC: r = d & ~s;
      BIS: r = d | s;
      default: begin                                   // XOR
        r = s ^ d;
        r_flags(r, bw, r != 16'h0, ((s & msb) != 0) && ((d & msb) != 0));
      end
    endcase
    if (wr) begin
      if (!ad) begin
        if (rd != CG) R[rd] = r & mask;
      end else r_wr(a, r, bw);
    end
  endtask

  // random program generator
  logic [3:0] dregs [9] = '{4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd13, 4'd14, 4'd15};
  logic [3:0] pregs [3] = '{4'd10, 4'd11, 4'd12};

  // source operand: register, mode, and an extension word if has_x
  task automatic gen_src(output logic [3:0] rs, output logic [1:0] as_m,
                         output bit has_x, output logic [15:0] x);
    int k;
    has_x = 1'b0; x = '0;
    k = int'(rnd() % 7);
    unique case (k)
      0: begin
        int q;
        q = int'(rnd() % 14);
        rs = (q < 12) ? 4'(q + 4) : (q == 12) ? SR : SP;
        as_m = M_REG;
      end
      1: begin rs = pregs[rnd() % 3]; as_m = M_IDX; has_x = 1'b1; x = 16'(rnd() % 64); end
      2: begin rs = pregs[rnd() % 3]; as_m = M_IND; end
      3: begin rs = pregs[rnd() % 3]; as_m = M_INC; end
      4: begin rs = PC; as_m = M_INC; has_x = 1'b1; x = 16'(rnd()); end
      5: begin rs = SR; as_m = M_IDX; has_x = 1'b1; x = 16'hC000 + 16'(rnd() % 16'h0800); end
      default: begin
        int q;
        q = int'(rnd() % 6);
        rs = (q < 4) ? CG : SR;
        as_m = (q < 4) ? 2'(q) : (q == 4) ? M_IND : M_INC;
      end
    endcase
  endtask

  task automatic gen_instr();
    int k;
    logic [3:0] rs, rd;
    logic [1:0] as_m;
    bit has_x, ad, bw;
    logic [15:0] x, y;
    k = int'(rnd() % 100);
    if (k < 60) begin                                  // double operand
      logic [3:0] op;
      int dk;
      op = 4'(4 + rnd() % 12);
      bw = rnd() % 4 == 0;
      gen_src(rs, as_m, has_x, x);
      dk = int'(rnd() % 100);
      y = '0;
      if (dk < 70)      begin ad = 1'b0; rd = dregs[rnd() % 9]; end
      else if (dk < 85) begin ad = 1'b1; rd = pregs[rnd() % 3]; y = 16'(rnd() % 64); end
      else              begin ad = 1'b1; rd = SR; y = 16'hC000 + 16'(rnd() % 16'h0800); end
      emit(f1(op, rs, ad, bw, as_m, rd));
      if (has_x) emit(x);
      if (ad) emit(y);
    end else if (k < 75) begin                         // RRC SWPB RRA SXT
      logic [2:0] op;
      int mk;
      op = 3'(rnd() % 4);
      bw = (op == RRC || op == RRA) && (rnd() % 4 == 0);
      mk = int'(rnd() % 4);
      if (mk < 2)       begin emit(f2(op, bw, M_REG, dregs[rnd() % 9])); end
      else if (mk == 2) begin emit(f2(op, bw, M_IDX, pregs[rnd() % 3])); emit(16'(rnd() % 64)); end
      else              begin emit(f2(op, bw, M_IND, pregs[rnd() % 3])); end
    end else if (k < 82) begin                         // PUSH
      gen_src(rs, as_m, has_x, x);
      if (rs == SP) rs = 4'd4;
      emit(f2(PUSH, 1'b0, as_m, rs));
      if (has_x) emit(x);
    end else begin                                     // conditional jump over the next instruction
      int at;
      at = pc_a;
      emit(16'h0000);
      gen_instr();
      mem[at/2] = jmp(3'(rnd() % 8), 16'(at), 16'(pc_a));
    end
  endtask

  // one random program: set registers and flags, NI random instructions, halt
  task automatic run_random(input int ni, output int halt);
    pc_a = 0;
    movi(16'hC9F0, SP);
    foreach (dregs[i]) movi(16'(rnd()), dregs[i]);
    movi(16'hC100, 4'd10);
    movi(16'hC300, 4'd11);
    movi(16'hC501, 4'd12);
    movi(16'(rnd()) & 16'h0107, SR);
    for (int i = 0; i < ni; i++) gen_instr();
    halt = pc_a;
    emit(jmp(JMP, 16'(pc_a), 16'(pc_a)));
  endtask

  int n_instr = 0;
  task automatic random_phase(input int nprog, input int ni);
    for (int p = 0; p < nprog; p++) begin
      int halt, guard;
      bit bad;
      rst_n = 1'b0;
      @(negedge clk);
      for (int i = 0; i < 2048; i++) mem[i] = 16'h4303;                 // NOP
      for (int i = 16'hC000 / 2; i < 16'hCA00 / 2; i++) mem[i] = 16'(rnd());
      run_random(ni, halt);
      rmem = mem;
      foreach (R[i]) R[i] = '0;
      @(negedge clk);
      rst_n = 1'b1;
      bad = 1'b0;
      guard = 0;
      while (!bad && guard < 20 * ni + 500) begin
        guard++;
        if (dut.state == dut.IFETCH_0) begin
          for (int k = 0; k < 16; k++) begin
            check(dut.u_rf.regs[k] == R[k],
                  $sformatf("program %0d, before PC %h: R%0d = %h, model %h", p, R[0], k, dut.u_rf.regs[k], R[k]));
            if (dut.u_rf.regs[k] != R[k]) bad = 1'b1;
          end
          if (int'(R[0]) == halt) break;
          n_instr++;
          r_step();
        end
        @(negedge clk);
      end
      check(int'(R[0]) == halt && !bad, $sformatf("program %0d did not reach its end", p));
      for (int i = 16'hC000 / 2; i < 16'hCA00 / 2; i++)
        check(mem[i] == rmem[i], $sformatf("program %0d: [%h] = %h, model %h", p, 16'(2 * i), mem[i], rmem[i]));
    end
  endtask

  initial begin
    rst_n = 1'b0; irq = 1'b0; hold = 1'b0; sync_addr = '0; sync_we = 1'b0; sync_wdata = '0;
    foreach (mem[i]) mem[i] = '0;
    assemble();
    assemble();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // run until the CPU sleeps
    for (int i = 0; i < 3000 && !sleep; i++) @(negedge clk);
    check(sleep, "CPU did not reach SLEEP");
    expect_mem(16'h0200, 16'h2143);
    expect_mem(16'h0202, 16'h0F0F);
    expect_mem(16'h0204, 16'h0104);
    expect_mem(16'h0206, 16'h0100);
    expect_mem(16'h0208, 16'hFFCF);
    expect_mem(16'h020A, 16'hFF3F);
    expect_mem(16'h020C, 16'hE000);
    expect_mem(16'h020E, 16'hFFE0);
    expect_mem(16'h0210, 16'hABCD);
    expect_mem(16'h0214, 16'hABCD);
    expect_mem(16'h0216, 16'h0212);
    expect_mem(16'h0218, 16'h5500);
    expect_mem(16'h021A, 16'h0055);
    expect_mem(16'h021C, 16'h0000);
    expect_mem(16'h021E, 16'h0001);
    expect_mem(16'h0220, 16'h1111);
    expect_mem(16'h0222, 16'h7777);
    expect_mem(16'h0228, 16'h0400);
    expect_mem(16'h0224, 16'h0000);   // not yet: asleep

    // synchronization port while asleep
    chk_sync(5'd4, 16'h1234, "sync read R4");
    chk_sync(5'd13, 16'h1111, "sync read R13");
    chk_sync(5'd2, 16'h0019, "sync read SR (GIE|CPUOFF|C)");
    chk_sync(SYNC_IR, f1(BIS, PC, 0, 0, M_INC, SR), "sync read IR");
    chk_sync(SYNC_SRC, 16'h0018, "sync read SRC");
    chk_sync(SYNC_DST, 16'h0001, "sync read DST (old SR)");
    @(negedge clk);
    sync_addr = 5'd4; sync_wdata = 16'h5A5A; sync_we = 1'b1;
    @(negedge clk);
    sync_addr = SYNC_MAR; sync_wdata = 16'h0BEE;
    @(negedge clk);
    sync_we = 1'b0;
    chk_sync(5'd4, 16'h5A5A, "sync write R4");
    chk_sync(SYNC_MAR, 16'h0BEE, "sync write MAR");

    // hold keeps the CPU idle even with an interrupt pending
    hold = 1'b1;
    @(negedge clk); irq = 1'b1; @(negedge clk); irq = 1'b0;
    repeat (20) @(negedge clk);
    check(sleep, "held CPU left IFETCH_0");
    expect_mem(16'h0226, 16'h0000);
    hold = 1'b0;
    repeat (60) @(negedge clk);
    expect_mem(16'h0226, 16'h3333);   // ISR ran
    expect_mem(16'h0224, 16'h2222);   // woke up and continued
    check(!sleep, "CPU still asleep after interrupt");
    chk_sync(5'd1, 16'h0400, "SP restored after RETI");
    chk_sync(5'd2, 16'h0009, "SR restored with CPUOFF cleared");

    rphase = 1'b1;
    random_phase(40, 200);
    $display("random programs: %0d instructions compared with the model", n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
