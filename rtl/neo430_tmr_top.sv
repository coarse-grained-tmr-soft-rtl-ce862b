// neo430_tmr_top: coarse-grained TMR NEO430 system with run-time fault recovery.
//
// Three identical CPU copies (each in its own reconfigurable region, PRM 0..2)
// run the same program in lock step. They share one program memory (IMEM), one
// data memory (DMEM) and the peripherals; every path from a CPU to a shared
// resource passes through a 2-of-3 majority voter, one voter per resource, so a
// single faulty copy is masked and the shared state stays correct by itself.
// Each voter also names the copy that disagrees; the OR of these is the PRM
// error vector. The GPDRC sequencer then reconfigures that PRM (modelled as
// holding the copy in reset for RECONF_CYCLES cycles) and raises "sync enable",
// which the program sees on digital input bit 15. The repaired copy restarts
// from address 0 on a private read path (second IMEM port and the GPIO
// registers; its writes still go to the voters, where the two working copies
// outvote them), so its startup code finds the request and puts it to SLEEP.
// The working copies bring the program to a safe point, set the "ready" flag on
// digital output bit 15 and enter SLEEP too. The synchronization controller
// then copies all architectural and internal CPU registers from a working copy
// into the repaired one over the CPUs' synchronization ports and wakes all
// three with one interrupt, after which they continue in lock step.
//
// Address map: IMEM from 0x0000 (IMEM_SIZE bytes), DMEM from 0xC000 (DMEM_SIZE
// bytes, its first word is the interrupt vector), GPIO_IN at 0xFFB0 and GPIO_OUT
// at 0xFFB2 (no other address in the peripheral area 0xFF80..0xFFFF answers).
// Reads return data one cycle after the strobe.
//
// Ports: test_in[14:0] and test_out are the digital inputs/outputs of the GPIO
// (test_out[15] is the ready flag); the imem_ld_* port loads the application
// while the CPUs are in reset; the seu_* port flips bits (seu_mask) of register
// seu_addr of copy seu_cpu for one cycle, to emulate an upset; the status
// outputs show the error vector, the repair count and the recovery handshake.
// Voter/shared-bus structure and the recovery sequence follow the published
// NEO430 TMR architecture; the address map, GPIO bit assignment, one-IRQ
// wake-up, the private read path (which reads only IMEM and the GPIO, so the
// startup check must not touch DMEM) and the fault-injection port are this
// design's own.
module neo430_tmr_top
  import neo430_pkg::*;
#(
  parameter int unsigned IMEM_SIZE     = 4096,  // bytes
  parameter int unsigned DMEM_SIZE     = 2048,  // bytes
  parameter int unsigned RECONF_CYCLES = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  // program load port (use while rst_n is low)
  input  logic        imem_ld_we,
  input  logic [$clog2(IMEM_SIZE/2)-1:0] imem_ld_addr,
  input  logic [15:0] imem_ld_wdata,
  // test inputs / outputs
  input  logic [14:0] test_in,
  output logic [15:0] test_out,
  // upset emulation
  input  logic        seu_we,
  input  logic [1:0]  seu_cpu,
  input  logic [4:0]  seu_addr,
  input  logic [15:0] seu_mask,
  // status
  output logic [2:0]  prm_err_vec,
  output logic [2:0]  prm_reset,
  output logic        sync_enable,
  output logic        sync_ready,
  output logic        sync_irq,
  output logic        sync_err,
  output logic [2:0]  cpu_sleep,
  output logic        recovery_busy,
  output logic [7:0]  repairs
);

  localparam int unsigned BW = $bits(bus_req_t);

  bus_req_t    cpu_bus  [3];
  logic [15:0] cpu_sync_rdata [3];
  logic [4:0]  cpu_sync_addr  [3];
  logic [2:0]  cpu_sync_we;
  logic [15:0] cpu_sync_wdata [3];
  logic [2:0]  hold, solo, solo_q;
  logic [15:0] rdata, priv_rdata;

  logic [4:0]  sc_addr;
  logic [2:0]  sc_we;
  logic [15:0] sc_wdata;
  logic        sync_done, sc_irq;
  logic [1:0]  sync_target;

  // ---------------- the three CPU copies (PRM 0..2) ----------------
  for (genvar i = 0; i < 3; i++) begin : g_prm
    logic inj;
    assign inj = seu_we && seu_cpu == 2'(i);
    assign cpu_sync_addr[i]  = inj ? seu_addr : sc_addr;
    assign cpu_sync_we[i]    = inj | sc_we[i];
    assign cpu_sync_wdata[i] = inj ? (cpu_sync_rdata[i] ^ seu_mask) : sc_wdata;

    neo430_cpu u_cpu (
      .clk,
      .rst_n(rst_n && !prm_reset[i]),
      .bus_o(cpu_bus[i]),
      .mem_rdata(solo_q[i] ? priv_rdata : rdata),
      .irq_i(sc_irq),
      .hold_i(hold[i]),
      .sleep_o(cpu_sleep[i]),
      .sync_addr(cpu_sync_addr[i]),
      .sync_we(cpu_sync_we[i]),
      .sync_wdata(cpu_sync_wdata[i]),
      .sync_rdata(cpu_sync_rdata[i])
    );
  end

  // ---------------- per-resource request selection and voting ----------------
  function automatic logic sel_imem(input logic [15:0] a);
    return a < 16'(IMEM_SIZE);
  endfunction
  function automatic logic sel_dmem(input logic [15:0] a);
    return a >= DMEM_BASE && a < DMEM_BASE + 16'(DMEM_SIZE);
  endfunction
  function automatic logic sel_gpio(input logic [15:0] a);
    return a[15:2] == GPIO_IN_ADDR[15:2];   // GPIO_IN / GPIO_OUT
  endfunction

  bus_req_t req_i [3], req_d [3], req_p [3];
  bus_req_t v_i, v_d, v_p;
  logic [2:0] err_i, err_d, err_p;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      req_i[i] = cpu_bus[i];
      req_i[i].re = cpu_bus[i].re && sel_imem(cpu_bus[i].addr);
      req_i[i].we = 1'b0;                       // program memory is read only
      req_d[i] = cpu_bus[i];
      req_d[i].re = cpu_bus[i].re && sel_dmem(cpu_bus[i].addr);
      req_d[i].we = cpu_bus[i].we && sel_dmem(cpu_bus[i].addr);
      req_p[i] = cpu_bus[i];
      req_p[i].re = cpu_bus[i].re && sel_gpio(cpu_bus[i].addr);
      req_p[i].we = cpu_bus[i].we && sel_gpio(cpu_bus[i].addr);
    end
  end

  tmr_voter #(.WIDTH(BW)) u_vote_imem (.in0(req_i[0]), .in1(req_i[1]), .in2(req_i[2]), .y(v_i), .err(err_i));
  tmr_voter #(.WIDTH(BW)) u_vote_dmem (.in0(req_d[0]), .in1(req_d[1]), .in2(req_d[2]), .y(v_d), .err(err_d));
  tmr_voter #(.WIDTH(BW)) u_vote_io   (.in0(req_p[0]), .in1(req_p[1]), .in2(req_p[2]), .y(v_p), .err(err_p));

  assign prm_err_vec = err_i | err_d | err_p;

  // ---------------- shared memories and peripheral ----------------
  logic [15:0] imem_rdata, dmem_rdata, gpio_rdata;
  logic [15:0] gpio_in, gpio_out;

  // private read path of the copy that restarts after reconfiguration
  bus_req_t    priv;
  logic        priv_re_i, priv_re_p;
  logic [15:0] priv_imem_rdata, priv_io_q;
  logic [1:0]  priv_sel;

  assign priv      = cpu_bus[sync_target];
  assign priv_re_i = (solo != 3'b000) && priv.re && sel_imem(priv.addr);
  assign priv_re_p = (solo != 3'b000) && priv.re && sel_gpio(priv.addr);

  neo430_imem #(.SIZE(IMEM_SIZE)) u_imem (
    .clk, .re(v_i.re), .addr(v_i.addr), .rdata(imem_rdata),
    .re_b(priv_re_i), .addr_b(priv.addr), .rdata_b(priv_imem_rdata),
    .ld_we(imem_ld_we), .ld_addr(imem_ld_addr), .ld_wdata(imem_ld_wdata)
  );

  neo430_dmem #(.SIZE(DMEM_SIZE)) u_dmem (
    .clk, .re(v_d.re), .we(v_d.we), .be(v_d.be), .addr(v_d.addr - DMEM_BASE),
    .wdata(v_d.wdata), .rdata(dmem_rdata)
  );

  assign gpio_in = {sync_enable, test_in};

  neo430_gpio u_gpio (
    .clk, .rst_n, .re(v_p.re), .we(v_p.we), .be(v_p.be),
    .addr(v_p.addr[1:0]),
    .wdata(v_p.wdata), .rdata(gpio_rdata), .pin_in(gpio_in), .pin_out(gpio_out)
  );

  // read data return: remember which resource answered
  logic [1:0] rsel;
  always_ff @(posedge clk) begin
    if (!rst_n)      rsel <= 2'd0;
    else if (v_i.re) rsel <= 2'd0;
    else if (v_d.re) rsel <= 2'd1;
    else if (v_p.re) rsel <= 2'd2;
  end
  always_comb begin
    unique case (rsel)
      2'd1:    rdata = dmem_rdata;
      2'd2:    rdata = gpio_rdata;
      default: rdata = imem_rdata;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      solo_q    <= '0;
      priv_sel  <= 2'd0;
      priv_io_q <= '0;
    end else begin
      solo_q <= solo;
      if (priv_re_i)      priv_sel <= 2'd1;
      else if (priv_re_p) priv_sel <= 2'd2;
      else if (priv.re)   priv_sel <= 2'd0;   // no other resource on this path
      if (priv_re_p) priv_io_q <= priv.addr[1] ? gpio_out : gpio_in;
    end
  end
  always_comb begin
    unique case (priv_sel)
      2'd1:    priv_rdata = priv_imem_rdata;
      2'd2:    priv_rdata = priv_io_q;
      default: priv_rdata = '0;
    endcase
  end

  assign test_out   = gpio_out;
  assign sync_ready = gpio_out[15];

  // ---------------- recovery control ----------------
  gpdrc_ctrl #(.RECONF_CYCLES(RECONF_CYCLES)) u_gpdrc (
    .clk, .rst_n, .err_vec(prm_err_vec), .prm_reset, .sync_enable, .sync_target,
    .sync_done, .busy(recovery_busy), .repairs
  );

  sync_ctrl u_sync (
    .clk, .rst_n, .sync_enable, .target(sync_target), .ready(sync_ready),
    .cpu_sleep, .solo, .hold, .sync_addr(sc_addr), .sync_we(sc_we), .sync_wdata(sc_wdata),
    .cpu_rdata(cpu_sync_rdata), .irq(sc_irq), .sync_done, .sync_err
  );

  assign sync_irq = sc_irq;

endmodule
