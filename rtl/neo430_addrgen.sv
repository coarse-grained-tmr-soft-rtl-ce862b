// neo430_addrgen: the CPU's address generator (AG) with the memory address
// register (MAR).
//
// An adder forms base + offset, where the base is a register value chosen by the
// CPU and the offset is 0, +1, +2, -2 or an immediate (an index word taken from
// the instruction stream). The sum serves three purposes: it is loaded into MAR
// (mar_we), it is written back to the register file for pointer updates
// (PC+2, SP-2, Rn+1/+2), and it can drive the memory address directly. The
// memory address is selected among the sum, MAR, the un-added base (so that an
// instruction word can be fetched at PC while PC+2 is formed in the same cycle)
// and the fixed interrupt-vector address. Everything except MAR is combinational.
//
// The synchronization port reads MAR and overwrites it (sync_we) so that the
// internal address state can be copied between CPU copies. MAR resets to 0.
module neo430_addrgen
  import neo430_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] base,
  input  logic [2:0]  off_sel,   // 0 (or 5..7): 0, 1: +1, 2: +2, 3: -2, 4: imm
  input  logic [15:0] imm,
  input  logic        mar_we,
  input  logic [1:0]  addr_sel,  // 0: sum, 1: MAR, 2: IRQ vector, 3: base
  output logic [15:0] sum,
  output logic [15:0] mem_addr,
  output logic [15:0] mar_q,
  input  logic        sync_we,
  input  logic [15:0] sync_wdata
);

  localparam logic [2:0] OFF_P1 = 3'd1, OFF_P2 = 3'd2, OFF_M2 = 3'd3, OFF_IMM = 3'd4;

  logic [15:0] off;
  logic [15:0] mar_r;

  always_comb begin
    unique case (off_sel)
      OFF_P1:  off = 16'd1;
      OFF_P2:  off = 16'd2;
      OFF_M2:  off = 16'hFFFE;
      OFF_IMM: off = imm;
      default: off = 16'd0;
    endcase
    sum = base + off;
    unique case (addr_sel)
      2'd1:    mem_addr = mar_r;
      2'd2:    mem_addr = IRQ_VECTOR_ADDR;
      2'd3:    mem_addr = base;
      default: mem_addr = sum;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       mar_r <= '0;
    else if (sync_we) mar_r <= sync_wdata;
    else if (mar_we)  mar_r <= sum;
  end

  assign mar_q = mar_r;

endmodule
