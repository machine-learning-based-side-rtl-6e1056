// sca_pkg: constants and types shared by the programmable-logic side of the
// tamper-detection system.
//
// The register map of the AXI4-Lite control interface lives here, together
// with the load sizes used in the deployed design (25000 ring oscillators for
// power-analysis detection, the first 2500 of them for electromagnetic-analysis
// detection, and a training-only background load of 15 blocks of 1000 ring
// oscillators). The register offsets, widths and reset values are this
// design's own choice; the load sizes are the published configuration.
package sca_pkg;

  // AXI4-Lite response codes.
  typedef enum logic [1:0] {
    AXI_RESP_OKAY   = 2'b00,
    AXI_RESP_EXOKAY = 2'b01,
    AXI_RESP_SLVERR = 2'b10,
    AXI_RESP_DECERR = 2'b11
  } axi_resp_e;

  // Word index (byte address bits [3:2]) of each control register.
  typedef enum logic [1:0] {
    REG_CTRL     = 2'd0,  // bit 0: EMA measurement load, bit 1: PA measurement load
    REG_BG_EN    = 2'd1,  // one enable bit per background-load block
    REG_FAN_DUTY = 2'd2,  // fan PWM duty in percent, 0..100
    REG_CAPS     = 2'd3   // read-only build information
  } reg_idx_e;

  localparam int unsigned CTRL_EMA_BIT = 0;
  localparam int unsigned CTRL_PA_BIT  = 1;

  // REG_CAPS layout: [7:0] number of background blocks, [8] training build.
  localparam int unsigned CAPS_TRAIN_BIT = 8;

  // Published load sizes.
  localparam int unsigned N_RO_PA_DEFAULT      = 25000;
  localparam int unsigned N_RO_EMA_DEFAULT     = 2500;
  localparam int unsigned N_BG_BLOCKS_DEFAULT  = 15;
  localparam int unsigned N_RO_PER_BG_DEFAULT  = 1000;

  // Duty cycle resolution of the fan PWM: one step per percent.
  localparam int unsigned FAN_DUTY_W   = 7;
  localparam int unsigned FAN_DUTY_MAX = 100;

endpackage
