// neo430_pkg: types and constants shared by the triplicated NEO430-style CPU and
// the fault-recovery logic around it.
//
// It holds the MSP430 status-register bit positions, the operation codes the CPU
// decodes, the address map of the shared memories and the peripheral, the
// numbering of the registers on the synchronization port, and the struct that
// carries one CPU's memory/system-bus request. The MSP430 encodings follow the
// public MSP430 instruction set; the address map and the synchronization-port
// numbering are choices of this design.
package neo430_pkg;

  // ---- Status register (R2) bits, MSP430 layout ----
  localparam int unsigned SR_C      = 0;
  localparam int unsigned SR_Z      = 1;
  localparam int unsigned SR_N      = 2;
  localparam int unsigned SR_GIE    = 3;
  localparam int unsigned SR_CPUOFF = 4;  // set: CPU sleeps in IFETCH_0
  localparam int unsigned SR_V      = 8;

  // ---- Register numbers ----
  localparam logic [3:0] REG_PC = 4'd0;
  localparam logic [3:0] REG_SP = 4'd1;
  localparam logic [3:0] REG_SR = 4'd2;
  localparam logic [3:0] REG_CG = 4'd3;

  // ---- Synchronization port: register addresses ----
  // 0..15 architectural registers R0..R15, then the internal registers.
  localparam int unsigned SYNC_NREGS = 20;
  localparam logic [4:0] SYNC_MAR = 5'd16;
  localparam logic [4:0] SYNC_IR  = 5'd17;
  localparam logic [4:0] SYNC_SRC = 5'd18;
  localparam logic [4:0] SYNC_DST = 5'd19;

  // ---- Address map (byte addresses) ----
  localparam logic [15:0] IMEM_BASE = 16'h0000;  // program memory from 0x0000
  localparam logic [15:0] DMEM_BASE = 16'hC000;  // data memory from 0xC000
  localparam logic [15:0] IO_BASE   = 16'hFF80;  // peripherals 0xFF80..0xFFFF
  localparam logic [15:0] IRQ_VECTOR_ADDR = DMEM_BASE; // interrupt vector word
  localparam logic [15:0] GPIO_IN_ADDR  = 16'hFFB0;
  localparam logic [15:0] GPIO_OUT_ADDR = 16'hFFB2;

  // ---- Format I (double operand) opcodes, IR[15:12] ----
  typedef enum logic [3:0] {
    OP_MOV  = 4'h4, OP_ADD = 4'h5, OP_ADDC = 4'h6, OP_SUBC = 4'h7,
    OP_SUB  = 4'h8, OP_CMP = 4'h9, OP_DADD = 4'hA, OP_BIT  = 4'hB,
    OP_BIC  = 4'hC, OP_BIS = 4'hD, OP_XOR  = 4'hE, OP_AND  = 4'hF
  } fmt1_op_e;

  // ---- Format II (single operand) opcodes, IR[9:7] ----
  typedef enum logic [2:0] {
    F2_RRC = 3'd0, F2_SWPB = 3'd1, F2_RRA  = 3'd2, F2_SXT = 3'd3,
    F2_PUSH = 3'd4, F2_CALL = 3'd5, F2_RETI = 3'd6, F2_NONE = 3'd7
  } fmt2_op_e;

  // ---- ALU operations (internal encoding) ----
  typedef enum logic [3:0] {
    ALU_MOV, ALU_ADD, ALU_ADDC, ALU_SUBC, ALU_SUB, ALU_DADD,
    ALU_AND, ALU_BIC, ALU_BIS, ALU_XOR, ALU_RRC, ALU_RRA, ALU_SWPB, ALU_SXT
  } alu_op_e;

  // ---- One CPU's bus request (what the voters compare) ----
  typedef struct packed {
    logic [15:0] addr;   // byte address
    logic [15:0] wdata;  // write data, byte lanes already swapped
    logic [1:0]  be;     // byte enables
    logic        re;     // read strobe, data returned next cycle
    logic        we;     // write strobe
  } bus_req_t;

endpackage
