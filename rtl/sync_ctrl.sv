// sync_ctrl: hardware state synchronization controller for the three CPU copies.
//
// After the GPDRC has reconfigured copy `target` it raises sync_enable. The
// repaired copy restarts from reset and runs the program's startup code on its
// own (solo[target] = 1 selects its private read path in the top level); that
// code sees the request on the digital input and puts the copy to SLEEP. The
// controller waits until the software running on the working copies reports,
// through the voted digital output `ready`, that it is at a point suitable for
// synchronization and all three copies are asleep (cpu_sleep). It then holds
// the repaired copy (hold[target]), addresses every register of the state in
// turn on the common address bus sync_addr (NREGS registers, one per clock:
// R0..R15, MAR, IR, SRC, DST), takes the data from the first working copy and
// writes it into the repaired copy (sync_we[target]); the second working copy is
// compared on the way and a difference sets sync_err. Afterwards it releases the
// hold and pulses irq to all three copies in the same cycle, which wakes them
// from SLEEP together, and pulses sync_done to the GPDRC. It then waits for
// sync_enable to fall.
//
// Timing: solo from the cycle sync_enable rises until the copy phase starts;
// NREGS copy cycles with hold, then one wake cycle (irq, hold released) and one
// done cycle. Synchronous active-low reset. The sequence follows the published
// recovery steps; the solo/hold signals and the check of the second working
// copy are this design's own.
module sync_ctrl
  import neo430_pkg::*;
#(
  parameter int unsigned NREGS = SYNC_NREGS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync_enable,
  input  logic [1:0]  target,
  input  logic        ready,
  input  logic [2:0]  cpu_sleep,
  output logic [2:0]  solo,
  output logic [2:0]  hold,
  output logic [4:0]  sync_addr,
  output logic [2:0]  sync_we,
  output logic [15:0] sync_wdata,
  input  logic [15:0] cpu_rdata [3],
  output logic        irq,
  output logic        sync_done,
  output logic        sync_err
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_COPY, S_WAKE, S_DONE, S_END} s_state_e;

  s_state_e   state;
  logic [4:0] cnt;
  logic [1:0] ref0, ref1;

  // the two working copies
  always_comb begin
    unique case (target)
      2'd0:    begin ref0 = 2'd1; ref1 = 2'd2; end
      2'd1:    begin ref0 = 2'd0; ref1 = 2'd2; end
      default: begin ref0 = 2'd0; ref1 = 2'd1; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      sync_err <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (sync_enable) begin
          sync_err <= 1'b0;
          state    <= S_WAIT;
        end
        S_WAIT: if (ready && cpu_sleep == 3'b111) begin
          cnt   <= '0;
          state <= S_COPY;
        end
        S_COPY: begin
          if (cpu_rdata[ref0] != cpu_rdata[ref1]) sync_err <= 1'b1;
          cnt <= cnt + 1'b1;
          if (cnt == 5'(NREGS - 1)) state <= S_WAKE;
        end
        S_WAKE: state <= S_DONE;
        S_DONE: state <= S_END;
        S_END:  if (!sync_enable) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    solo = '0;
    if ((state == S_IDLE && sync_enable) || state == S_WAIT)
      solo[target] = 1'b1;
    hold = '0;
    if (state == S_COPY) hold[target] = 1'b1;
    sync_we = '0;
    if (state == S_COPY) sync_we[target] = 1'b1;
  end
  // protocol rules: writes go to one copy only, and only to the held one;
  // the wake-up IRQ never reaches a held copy
  a_one_copy: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sync_we));
  a_held:     assert property (@(posedge clk) disable iff (!rst_n) (sync_we != 3'b000) |-> (hold == sync_we));
  a_irq_free: assert property (@(posedge clk) disable iff (!rst_n) irq |-> (hold == 3'b000));
  a_solo_one: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(solo) && (solo & hold) == 3'b000);

  assign sync_addr  = cnt;
  assign sync_wdata = cpu_rdata[ref0];
  assign irq        = (state == S_WAKE);
  assign sync_done  = (state == S_DONE);

endmodule
