// sca_pl_top: programmable-logic side of an on-chip tamper detector for
// power-analysis (PA) and electromagnetic-analysis (EMA) side-channel attacks.
//
// Idea: a board prepared for PA has a shunt in its core supply, and a board
// prepared for EMA has lost its fan, heat sink and heat spreader. Neither can
// be seen directly, but both change how the chip reacts to a burst of load:
// the shunt deepens the supply-voltage drop, the missing cooling steepens the
// temperature rise. Software on the processing system switches on a
// ring-oscillator measurement load, records the on-chip voltage and
// temperature sensors, and a trained classifier running on the CPU decides
// "tampered" or "untampered". This module holds the hardware part of that
// scheme; the sensors, the software and the classifier are outside it.
//
// Contents (the arrangement follows the published design):
//   u_split  splits the processor's AXI4-Lite link: 0x000..0x00F to the
//            control registers, everything else to the application's logic
//            through the m_axi_usr_* master port
//   u_axi    AXI4-Lite control registers
//   u_meas   measurement load: 25000 ring oscillators for PA detection, the
//            first 2500 of which form the EMA load
//   u_bg     background load, 15 blocks of 1000 ring oscillators   } training
//   u_fan    PWM fan control for the cooling fan                   } build only
//
// TRAINING_BUILD = 1 gives the training-data-collection configuration (all
// blocks); TRAINING_BUILD = 0 gives the deployed detection configuration,
// which drops the background load and the fan control; fan_pwm is then held
// low. Folding both configurations into one parameterised top, the clock rate
// and the register map are this design's own choices.
//
// Interface: one clock domain (clk, synchronous active-low rst_n); an AXI4-Lite
// slave (12-bit byte address, 32-bit data) with the register map described in
// axi_pl_interface; fan_pwm to the I/O pin of the off-chip fan driver;
// m_axi_usr_*, an AXI4-Lite master carrying all other addresses unchanged to
// the application's logic, which is not part of this design. A
// register write takes effect on the loads one clock after its write response
// is raised, plus one ring-oscillator loop delay.
module sca_pl_top #(
  parameter bit          TRAINING_BUILD    = 1'b1,
  parameter int unsigned N_RO_PA           = sca_pkg::N_RO_PA_DEFAULT,
  parameter int unsigned N_RO_EMA          = sca_pkg::N_RO_EMA_DEFAULT,
  parameter int unsigned N_BG_BLOCKS       = sca_pkg::N_BG_BLOCKS_DEFAULT,
  parameter int unsigned N_RO_PER_BG_BLOCK = sca_pkg::N_RO_PER_BG_DEFAULT,
  parameter int unsigned CLK_HZ            = 100_000_000,
  parameter int unsigned FAN_PWM_HZ        = 25_000,
  parameter int unsigned RO_HALF_PERIOD_PS = 500
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [11:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        fan_pwm,
  // AXI4-Lite master towards the application's own logic (addresses 0x010..0xFFF)
  output logic [11:0] m_axi_usr_awaddr,
  output logic        m_axi_usr_awvalid,
  input  logic        m_axi_usr_awready,
  output logic [31:0] m_axi_usr_wdata,
  output logic [3:0]  m_axi_usr_wstrb,
  output logic        m_axi_usr_wvalid,
  input  logic        m_axi_usr_wready,
  input  logic [1:0]  m_axi_usr_bresp,
  input  logic        m_axi_usr_bvalid,
  output logic        m_axi_usr_bready,
  output logic [11:0] m_axi_usr_araddr,
  output logic        m_axi_usr_arvalid,
  input  logic        m_axi_usr_arready,
  input  logic [31:0] m_axi_usr_rdata,
  input  logic [1:0]  m_axi_usr_rresp,
  input  logic        m_axi_usr_rvalid,
  output logic        m_axi_usr_rready
);
  import sca_pkg::*;

  logic                   ema_load_en, pa_load_en;
  logic [N_BG_BLOCKS-1:0] bg_load_en;
  logic [FAN_DUTY_W-1:0]  fan_duty_pct;

  // Address split: 0x000..0x00F control registers, the rest user logic.
  logic [11:0] m_awaddr [2], m_araddr [2];
  logic        m_awvalid [2], m_awready [2], m_wvalid [2], m_wready [2];
  logic        m_bvalid [2], m_bready [2], m_arvalid [2], m_arready [2];
  logic        m_rvalid [2], m_rready [2];
  logic [31:0] m_wdata [2], m_rdata [2];
  logic [3:0]  m_wstrb [2];
  logic [1:0]  m_bresp [2], m_rresp [2];

  axi_lite_split #(.ADDR_W(12)) u_split (
    .clk, .rst_n,
    .s_awaddr (s_axi_awaddr), .s_awvalid (s_axi_awvalid), .s_awready (s_axi_awready),
    .s_wdata  (s_axi_wdata),  .s_wstrb   (s_axi_wstrb),   .s_wvalid  (s_axi_wvalid),
    .s_wready (s_axi_wready), .s_bresp   (s_axi_bresp),   .s_bvalid  (s_axi_bvalid),
    .s_bready (s_axi_bready), .s_araddr  (s_axi_araddr),  .s_arvalid (s_axi_arvalid),
    .s_arready(s_axi_arready),.s_rdata   (s_axi_rdata),   .s_rresp   (s_axi_rresp),
    .s_rvalid (s_axi_rvalid), .s_rready  (s_axi_rready),
    .m_awaddr, .m_awvalid, .m_awready, .m_wdata, .m_wstrb, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready, .m_araddr, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rvalid, .m_rready
  );

  // Port 1: the application's logic.
  assign m_axi_usr_awaddr  = m_awaddr[1];
  assign m_axi_usr_awvalid = m_awvalid[1];
  assign m_awready[1]      = m_axi_usr_awready;
  assign m_axi_usr_wdata   = m_wdata[1];
  assign m_axi_usr_wstrb   = m_wstrb[1];
  assign m_axi_usr_wvalid  = m_wvalid[1];
  assign m_wready[1]       = m_axi_usr_wready;
  assign m_bresp[1]        = m_axi_usr_bresp;
  assign m_bvalid[1]       = m_axi_usr_bvalid;
  assign m_axi_usr_bready  = m_bready[1];
  assign m_axi_usr_araddr  = m_araddr[1];
  assign m_axi_usr_arvalid = m_arvalid[1];
  assign m_arready[1]      = m_axi_usr_arready;
  assign m_rdata[1]        = m_axi_usr_rdata;
  assign m_rresp[1]        = m_axi_usr_rresp;
  assign m_rvalid[1]       = m_axi_usr_rvalid;
  assign m_axi_usr_rready  = m_rready[1];

  // Port 0: control registers.
  axi_pl_interface #(
    .ADDR_W         (12),
    .N_BG_BLOCKS    (N_BG_BLOCKS),
    .TRAINING_BUILD (TRAINING_BUILD)
  ) u_axi (
    .clk, .rst_n,
    .s_axi_awaddr (m_awaddr[0]), .s_axi_awvalid (m_awvalid[0]), .s_axi_awready (m_awready[0]),
    .s_axi_wdata  (m_wdata[0]),  .s_axi_wstrb   (m_wstrb[0]),   .s_axi_wvalid  (m_wvalid[0]),
    .s_axi_wready (m_wready[0]), .s_axi_bresp   (m_bresp[0]),   .s_axi_bvalid  (m_bvalid[0]),
    .s_axi_bready (m_bready[0]), .s_axi_araddr  (m_araddr[0]),  .s_axi_arvalid (m_arvalid[0]),
    .s_axi_arready(m_arready[0]),.s_axi_rdata   (m_rdata[0]),   .s_axi_rresp   (m_rresp[0]),
    .s_axi_rvalid (m_rvalid[0]), .s_axi_rready  (m_rready[0]),
    .ema_load_en, .pa_load_en, .bg_load_en, .fan_duty_pct
  );

  // The oscillator outputs are not consumed: the loads exist only to draw
  // power. They are kept by the DONT_TOUCH attribute inside ro_array.
  logic [N_RO_PA-1:0] meas_osc;

  measurement_load #(
    .N_RO_PA        (N_RO_PA),
    .N_RO_EMA       (N_RO_EMA),
    .HALF_PERIOD_PS (RO_HALF_PERIOD_PS)
  ) u_meas (
    .ema_en (ema_load_en),
    .pa_en  (pa_load_en),
    .osc    (meas_osc)
  );

  if (TRAINING_BUILD) begin : g_training
    logic [N_BG_BLOCKS*N_RO_PER_BG_BLOCK-1:0] bg_osc;

    background_load #(
      .N_BLOCKS       (N_BG_BLOCKS),
      .N_RO_PER_BLOCK (N_RO_PER_BG_BLOCK),
      .HALF_PERIOD_PS (RO_HALF_PERIOD_PS)
    ) u_bg (
      .blk_en (bg_load_en),
      .osc    (bg_osc)
    );

    pwm_fan_control #(
      .CLK_HZ (CLK_HZ),
      .PWM_HZ (FAN_PWM_HZ)
    ) u_fan (
      .clk, .rst_n,
      .duty_pct (fan_duty_pct),
      .pwm      (fan_pwm)
    );
  end else begin : g_detection
    assign fan_pwm = 1'b0;
  end

endmodule
