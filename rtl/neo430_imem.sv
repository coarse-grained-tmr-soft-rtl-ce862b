// neo430_imem: program memory (IMEM) shared by the three CPU copies.
//
// A word-organised RAM of SIZE bytes placed from address 0. The CPU side is a
// read port: a read strobe in cycle t returns the word at addr (byte address,
// bit 0 ignored) in cycle t+1. Instructions cannot be written by the CPUs; a
// separate load port (ld_we, ld_addr = word index) fills the memory with the
// application before the CPUs are released from reset. A second read port
// (re_b/addr_b/rdata_b, same timing) lets a freshly reconfigured CPU copy fetch
// its own startup code while the voted port keeps serving the working copies;
// this port is this design's own addition. The contents are not reset.
module neo430_imem #(
  parameter int unsigned SIZE = 4096   // bytes
) (
  input  logic                       clk,
  input  logic                       re,
  input  logic [15:0]                addr,
  output logic [15:0]                rdata,
  input  logic                       re_b,
  input  logic [15:0]                addr_b,
  output logic [15:0]                rdata_b,
  input  logic                       ld_we,
  input  logic [$clog2(SIZE/2)-1:0]  ld_addr,
  input  logic [15:0]                ld_wdata
);

  localparam int unsigned AW = $clog2(SIZE/2);

  logic [15:0] mem [SIZE/2];
  logic [AW-1:0] widx, widx_b;

  assign widx   = addr[AW:1];
  assign widx_b = addr_b[AW:1];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_wdata;
    if (re)    rdata <= mem[widx];
    if (re_b)  rdata_b <= mem[widx_b];
  end

endmodule
