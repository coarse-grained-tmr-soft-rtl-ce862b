// neo430_gpio: parallel input/output peripheral on the shared system bus.
//
// Two word registers: GPIO_IN (offset 0, read only) samples the input pins every
// clock, GPIO_OUT (offset 2, read/write, byte lanes) drives the output pins. The
// recovery procedure uses it as the CPUs' digital input for the "sync enable"
// request and their digital output for the "ready for synchronization" flag.
// addr is the byte offset inside the peripheral; a read strobe in cycle t
// returns data in cycle t+1, like the memories. Synchronous active-low reset
// clears both registers.
module neo430_gpio (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        re,
  input  logic        we,
  input  logic [1:0]  be,
  input  logic [1:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  input  logic [15:0] pin_in,
  output logic [15:0] pin_out
);

  logic [15:0] in_r, out_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_r  <= '0;
      out_r <= '0;
      rdata <= '0;
    end else begin
      in_r <= pin_in;
      if (we && addr[1]) begin
        if (be[0]) out_r[7:0]  <= wdata[7:0];
        if (be[1]) out_r[15:8] <= wdata[15:8];
      end
      if (re) rdata <= addr[1] ? out_r : in_r;
    end
  end

  assign pin_out = out_r;

endmodule
