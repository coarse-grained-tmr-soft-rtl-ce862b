// gpdrc_ctrl: recovery sequencer of the generic partial dynamic reconfiguration
// controller (GPDRC).
//
// It watches the PRM error vector formed by the TMR voters. When a mismatch is
// seen while idle, it takes the faulty copy's index (the lowest set bit if
// several are set), and reconfigures that PRM: prm_reset[idx] is held for
// RECONF_CYCLES clock cycles, which stands for the time the configuration port
// needs to rewrite the region with its partial bitstream and leaves the copy in
// its power-up state. It then raises sync_enable with sync_target = idx and
// waits for sync_done from the synchronization controller, after which it
// returns to idle and watches the error vector again. Errors are ignored while
// a repair is in progress, because the repaired copy disagrees until it has been
// synchronized. repairs counts completed repairs.
//
// Timing: the error vector is registered (one cycle), then RECONF_CYCLES cycles
// of reset; sync_enable rises in the cycle prm_reset falls. Synchronous
// active-low reset. Writing the bitstream itself (configuration port, flash
// controller) is outside this block.
module gpdrc_ctrl #(
  parameter int unsigned RECONF_CYCLES = 1000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] err_vec,
  output logic [2:0] prm_reset,
  output logic       sync_enable,
  output logic [1:0] sync_target,
  input  logic       sync_done,
  output logic       busy,
  output logic [7:0] repairs
);

  typedef enum logic [1:0] {G_IDLE, G_RECONF, G_SYNC} g_state_e;

  g_state_e    state;
  logic [2:0]  err_q;
  logic [1:0]  idx;
  logic [$clog2(RECONF_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= G_IDLE;
      err_q   <= '0;
      idx     <= '0;
      cnt     <= '0;
      repairs <= '0;
    end else begin
      err_q <= err_vec;
      unique case (state)
        G_IDLE: if (err_q != 3'b000) begin
          idx   <= err_q[0] ? 2'd0 : err_q[1] ? 2'd1 : 2'd2;
          cnt   <= '0;
          state <= G_RECONF;
        end
        G_RECONF: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($bits(cnt))'(RECONF_CYCLES - 1)) state <= G_SYNC;
        end
        G_SYNC: if (sync_done) begin
          repairs <= repairs + 1'b1;
          state   <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  always_comb begin
    prm_reset = '0;
    if (state == G_RECONF) prm_reset[idx] = 1'b1;
  end
  // one region at a time, and never synchronized while it is being rewritten
  a_one_prm:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(prm_reset));
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(sync_enable && prm_reset != 3'b000));

  assign sync_enable = (state == G_SYNC);
  assign sync_target = idx;
  assign busy        = (state != G_IDLE);

endmodule
