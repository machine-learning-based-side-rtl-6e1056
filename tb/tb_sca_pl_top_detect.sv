// tb_sca_pl_top_detect: test of the deployed detection build
// (TRAINING_BUILD = 0) at reduced load sizes.
//
// The detection build keeps only the AXI registers and the measurement load.
// The test checks that: the capability register reports the detection build;
// writes to the background and fan registers are accepted but have no effect
// (they read 0); the fan pin stays low; no background oscillators exist; and
// the EMA and PA loads still switch the expected number of oscillators.
module tb_sca_pl_top_detect;
  import sca_pkg::*;

  localparam int unsigned N_PA  = 200;
  localparam int unsigned N_EMA = 20;

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

  sca_pl_top #(.TRAINING_BUILD(1'b0), .N_RO_PA(N_PA), .N_RO_EMA(N_EMA),
               .CLK_HZ(1_000_000), .FAN_PWM_HZ(2_500)) dut (
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

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
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

  function automatic int unsigned running(input logic [N_PA-1:0] a, input logic [N_PA-1:0] b);
    return $countones(a ^ b);
  endfunction

  initial begin
    logic [31:0]     d;
    logic [1:0]      r;
    logic [N_PA-1:0] m0;
    bit              pwm_seen;

    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; wdata = 0; wstrb = 0; araddr = 0;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    axi_read(12'h00c, d, r);
    check(d[8] == 1'b0 && d[7:0] == 8'(N_BG_BLOCKS_DEFAULT), $sformatf("CAPS %h", d));

    axi_write(12'h004, 32'h7fff, r);
    check(r == AXI_RESP_OKAY, "BG_EN write response");
    axi_read(12'h004, d, r);
    check(d == 0, "BG_EN exists in detection build");
    axi_write(12'h008, 32'd60, r);
    axi_read(12'h008, d, r);
    check(d == 0, "FAN_DUTY exists in detection build");

    pwm_seen = 0;
    repeat (1000) begin
      @(posedge clk);
      if (fan_pwm) pwm_seen = 1;
    end
    check(!pwm_seen, "fan pin active in detection build");

    for (int mode = 0; mode < 4; mode++) begin
      int unsigned exp_n;
      exp_n = mode[1] ? N_PA : (mode[0] ? N_EMA : 0);
      axi_write(12'h000, 32'(mode), r);
      repeat (3) @(posedge clk);
      @(posedge clk);
      #250ps;
      m0 = dut.meas_osc;
      #500ps;
      check(running(m0, dut.meas_osc) == exp_n,
            $sformatf("mode %0d: %0d oscillators running, expected %0d", mode,
                      running(m0, dut.meas_osc), exp_n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
