// tb_sca_pl_top: end-to-end test of the programmable-logic side at its full,
// published size (25000 measurement oscillators, 2500 of them for EMA, 15
// background blocks of 1000 oscillators, 25 kHz fan PWM from 100 MHz).
//
// It plays the part of the training software on the processor, through the
// AXI4-Lite port only:
//   1. read the capability register;
//   2. for every background level 0..15 blocks: set the blocks, run an idle
//      phase, switch on the EMA measurement load, run, switch to the PA load,
//      run, switch the load off (the recovery phase); in each phase count the
//      oscillators that are actually running and compare with the expected
//      number (EMA 2500, PA 25000, background n * 1000);
//   3. step the fan speed 0..100 % by 20 % and measure the high time of one
//      full PWM period on the fan pin (duty * 40 clocks of 4000);
//   4. write and read back words of the application's logic behind the
//      user-logic port (a behavioural model here) and check that the control
//      registers are untouched.
// Phases are a few clocks long instead of the 10 s / 30 s / 10 s of a real
// measurement. Each mechanism (EMA load, PA load, background block steps,
// fan steps, user-logic accesses) is counted and must have occurred.
module tb_sca_pl_top;
  import sca_pkg::*;

  localparam int unsigned N_PA   = N_RO_PA_DEFAULT;
  localparam int unsigned N_EMA  = N_RO_EMA_DEFAULT;
  localparam int unsigned NB     = N_BG_BLOCKS_DEFAULT;
  localparam int unsigned NRB    = N_RO_PER_BG_DEFAULT;
  localparam int unsigned PWM_PERIOD = 4000;   // 100 MHz / 25 kHz
  localparam int unsigned PWM_DIV    = PWM_PERIOD / 100;

  logic        clk = 1'b0, rst_n;
  logic [11:0] awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        fan_pwm;
  // user-logic port
  logic [11:0] u_awaddr, u_araddr;
  logic        u_awvalid, u_awready, u_wvalid, u_wready, u_bvalid, u_bready;
  logic        u_arvalid, u_arready, u_rvalid, u_rready;
  logic [31:0] u_wdata, u_rdata;
  logic [3:0]  u_wstrb;
  logic [1:0]  u_bresp, u_rresp;
  int          usr_writes, usr_reads;
  int          checks = 0, failures = 0;

  sca_pl_top dut (
    .clk(clk), .rst_n(rst_n),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .fan_pwm(fan_pwm),
    .m_axi_usr_awaddr(u_awaddr), .m_axi_usr_awvalid(u_awvalid), .m_axi_usr_awready(u_awready),
    .m_axi_usr_wdata(u_wdata), .m_axi_usr_wstrb(u_wstrb), .m_axi_usr_wvalid(u_wvalid),
    .m_axi_usr_wready(u_wready), .m_axi_usr_bresp(u_bresp), .m_axi_usr_bvalid(u_bvalid),
    .m_axi_usr_bready(u_bready), .m_axi_usr_araddr(u_araddr), .m_axi_usr_arvalid(u_arvalid),
    .m_axi_usr_arready(u_arready), .m_axi_usr_rdata(u_rdata), .m_axi_usr_rresp(u_rresp),
    .m_axi_usr_rvalid(u_rvalid), .m_axi_usr_rready(u_rready)
  );

  usr_logic_model u_usr (
    .clk(clk), .rst_n(rst_n),
    .awaddr(u_awaddr), .awvalid(u_awvalid), .awready(u_awready),
    .wdata(u_wdata), .wstrb(u_wstrb), .wvalid(u_wvalid), .wready(u_wready),
    .bresp(u_bresp), .bvalid(u_bvalid), .bready(u_bready),
    .araddr(u_araddr), .arvalid(u_arvalid), .arready(u_arready),
    .rdata(u_rdata), .rresp(u_rresp), .rvalid(u_rvalid), .rready(u_rready),
    .n_writes(usr_writes), .n_reads(usr_reads)
  );

  always #5ns clk = ~clk;   // 100 MHz

  int n_ema_phases = 0, n_pa_phases = 0, n_bg_levels = 0, n_fan_steps = 0, n_usr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AXI4-Lite master tasks. Inputs change on the falling edge; a handshake
  // is recognised from VALID and READY just after that, and completes on the
  // following rising edge.
  task automatic axi_write(input logic [11:0] a, input logic [31:0] d, output logic [1:0] resp);
    bit aw_hs, w_hs, b_hs;
    @(negedge clk);
    awaddr = a; awvalid = 1'b1;
    wdata  = d; wstrb   = 4'hf; wvalid = 1'b1;
    bready = 1'b1;
    forever begin
      #1ps;
      aw_hs = awvalid && awready;
      w_hs  = wvalid && wready;
      b_hs  = bvalid && bready;
      resp  = bresp;
      @(negedge clk);
      if (aw_hs) awvalid = 1'b0;
      if (w_hs)  wvalid  = 1'b0;
      if (b_hs) begin bready = 1'b0; break; end
    end
  endtask

  task automatic axi_read(input logic [11:0] a, output logic [31:0] d, output logic [1:0] resp);
    bit ar_hs, r_hs;
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b1;
    forever begin
      #1ps;
      ar_hs = arvalid && arready;
      r_hs  = rvalid && rready;
      d     = rdata;
      resp  = rresp;
      @(negedge clk);
      if (ar_hs) arvalid = 1'b0;
      if (r_hs) begin rready = 1'b0; break; end
    end
  endtask

  task automatic write_ok(input logic [11:0] a, input logic [31:0] d);
    logic [1:0] r;
    axi_write(a, d, r);
    check(r == AXI_RESP_OKAY, $sformatf("write %h answered %0d", a, r));
  endtask

  // Count running oscillators: every enabled oscillator toggles exactly once
  // between two samples half a loop period apart from a clock edge on either
  // side of a toggle instant (toggles fall on clock edge + k * 500 ps).
  int unsigned meas_running, bg_running;
  task automatic count_running();
    logic [N_PA-1:0]     m0;
    logic [NB*NRB-1:0]   b0;
    @(posedge clk);
    #250ps;
    m0 = dut.meas_osc;
    b0 = dut.g_training.bg_osc;
    #500ps;
    meas_running = $countones(m0 ^ dut.meas_osc);
    bg_running   = $countones(b0 ^ dut.g_training.bg_osc);
  endtask

  task automatic phase(input int unsigned n_bg, input int unsigned exp_meas, input string name);
    repeat (4) @(posedge clk);
    count_running();
    check(meas_running == exp_meas,
          $sformatf("bg %0d, %s phase: %0d measurement ROs running, expected %0d",
                    n_bg, name, meas_running, exp_meas));
    check(bg_running == n_bg * NRB,
          $sformatf("bg %0d, %s phase: %0d background ROs running, expected %0d",
                    n_bg, name, bg_running, n_bg * NRB));
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0]  r;
    int unsigned high;

    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; wdata = 0; wstrb = 0; araddr = 0;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    axi_read(12'h00c, d, r);
    check(r == AXI_RESP_OKAY && d == (32'h100 | NB), $sformatf("CAPS read %h", d));

    // Load scenarios over all background levels.
    for (int unsigned n = 0; n <= NB; n++) begin
      write_ok(12'h004, (32'd1 << n) - 1);
      axi_read(12'h004, d, r);
      check(d == (32'd1 << n) - 1, "BG_EN readback");
      n_bg_levels++;
      phase(n, 0, "idle");
      write_ok(12'h000, 32'h1);
      phase(n, N_EMA, "EMA load");
      if (meas_running == N_EMA) n_ema_phases++;
      write_ok(12'h000, 32'h2);
      phase(n, N_PA, "PA load");
      if (meas_running == N_PA) n_pa_phases++;
      write_ok(12'h000, 32'h0);
      phase(n, 0, "recovery");
    end
    write_ok(12'h004, 32'h0);

    // Fan speed steps.
    for (int unsigned p = 0; p <= 100; p += 20) begin
      write_ok(12'h008, p);
      repeat (2 * PWM_PERIOD) @(posedge clk);
      high = 0;
      repeat (PWM_PERIOD) begin
        @(posedge clk);
        if (fan_pwm) high++;
      end
      check(high == p * PWM_DIV, $sformatf("fan %0d %%: %0d high clocks per period, expected %0d",
                                           p, high, p * PWM_DIV));
      if (high == p * PWM_DIV) n_fan_steps++;
    end

    // Accesses outside the register window reach the application's logic
    // and leave the control registers alone.
    for (int unsigned k = 0; k < 8; k++) begin
      write_ok(12'h100 + 12'(4 * k), 32'hc0de_0000 + k);
    end
    for (int unsigned k = 0; k < 8; k++) begin
      axi_read(12'h100 + 12'(4 * k), d, r);
      check(r == AXI_RESP_OKAY && d == 32'hc0de_0000 + k,
            $sformatf("user logic word %0d read %h", k, d));
    end
    check(usr_writes == 8 && usr_reads == 8,
          $sformatf("user logic saw %0d writes, %0d reads, expected 8 and 8", usr_writes, usr_reads));
    n_usr = usr_writes + usr_reads;
    axi_read(12'h000, d, r);
    check(d == 0, "user-logic traffic changed CTRL");
    axi_read(12'h008, d, r);
    check(d == 100, "user-logic traffic changed FAN_DUTY");

    $display("mechanisms: ema_load=%0d pa_load=%0d bg_levels=%0d fan_steps=%0d user_accesses=%0d",
             n_ema_phases, n_pa_phases, n_bg_levels, n_fan_steps, n_usr);
    check(n_ema_phases > 0, "EMA measurement load never ran");
    check(n_pa_phases > 0, "PA measurement load never ran");
    check(n_bg_levels == NB + 1, "not every background level was applied");
    check(n_fan_steps == 6, "not every fan step was produced");
    check(n_usr > 0, "user-logic port never used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
