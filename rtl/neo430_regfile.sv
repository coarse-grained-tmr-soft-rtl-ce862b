// neo430_regfile: the CPU's sixteen 16-bit registers R0..R15.
//
// R0 is the program counter (PC), R1 the stack pointer (SP), R2 the status
// register (SR) and R3 the constant-generator register (CG); R4..R15 are general
// purpose. Two combinational read ports feed the source and destination operand
// paths; PC, SP and SR are also brought out directly. Writes take effect at the
// next rising clock edge. Port A carries an instruction result, port B a pointer
// update (PC+2, SP-2, Rn+2) and the flag port the four ALU flags of SR; when they
// collide on one register, A wins over B and both win over the flags. As on the
// MSP430, normal writes to CG are discarded (its constants are generated by the
// CPU decoder), so CG stays at its reset value 0.
//
// The synchronization port gives the synchronization controller random access
// to all sixteen registers: sync_rdata shows register sync_addr combinationally,
// and sync_we overwrites it with priority over every other write. All registers
// reset to 0 (synchronous active-low reset).
module neo430_regfile
  import neo430_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // operand reads
  input  logic [3:0]  rs_addr,
  output logic [15:0] rs_data,
  input  logic [3:0]  rd_addr,
  output logic [15:0] rd_data,
  output logic [15:0] pc,
  output logic [15:0] sp,
  output logic [15:0] sr,
  // write port A (result)
  input  logic        wa_en,
  input  logic [3:0]  wa_addr,
  input  logic [15:0] wa_data,
  // write port B (pointer update)
  input  logic        wb_en,
  input  logic [3:0]  wb_addr,
  input  logic [15:0] wb_data,
  // flag update: {V, N, Z, C}
  input  logic        flags_we,
  input  logic [3:0]  flags,
  // synchronization port
  input  logic [3:0]  sync_addr,
  input  logic        sync_we,
  input  logic [15:0] sync_wdata,
  output logic [15:0] sync_rdata
);

  logic [15:0] regs [16];

  assign rs_data    = regs[rs_addr];
  assign rd_data    = regs[rd_addr];
  assign pc         = regs[REG_PC];
  assign sp         = regs[REG_SP];
  assign sr         = regs[REG_SR];
  assign sync_rdata = regs[sync_addr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < 16; i++) begin
        if (sync_we && sync_addr == 4'(i))
          regs[i] <= sync_wdata;
        else if (wa_en && wa_addr == 4'(i) && 4'(i) != REG_CG)
          regs[i] <= wa_data;
        else if (wb_en && wb_addr == 4'(i) && 4'(i) != REG_CG)
          regs[i] <= wb_data;
        else if (flags_we && 4'(i) == REG_SR) begin
          regs[i][SR_C] <= flags[0];
          regs[i][SR_Z] <= flags[1];
          regs[i][SR_N] <= flags[2];
          regs[i][SR_V] <= flags[3];
        end
      end
    end
  end

endmodule
