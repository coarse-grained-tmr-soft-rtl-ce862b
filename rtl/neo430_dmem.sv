// neo430_dmem: data memory (DMEM) shared by the three CPU copies.
//
// A word-organised RAM of SIZE bytes with byte-lane write enables. It holds the
// interrupt vector, global variables, the stack and the heap. addr is the byte
// address relative to the start of the memory (bit 0 ignored). A read strobe in
// cycle t returns the word in cycle t+1; a write is done at the clock edge, each
// byte lane only when its be bit is set. The contents are not reset.
module neo430_dmem #(
  parameter int unsigned SIZE = 2048   // bytes
) (
  input  logic        clk,
  input  logic        re,
  input  logic        we,
  input  logic [1:0]  be,
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata
);

  localparam int unsigned AW = $clog2(SIZE/2);

  logic [15:0] mem [SIZE/2];
  logic [AW-1:0] widx;

  assign widx = addr[AW:1];

  always_ff @(posedge clk) begin
    if (we && be[0]) mem[widx][7:0]  <= wdata[7:0];
    if (we && be[1]) mem[widx][15:8] <= wdata[15:8];
    if (re)          rdata <= mem[widx];
  end

endmodule
