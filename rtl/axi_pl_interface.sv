// axi_pl_interface: AXI4-Lite control registers of the programmable-logic side.
//
// The processing system (its AXI master port) reaches every detection and
// training block of the programmable logic through this slave; software uses
// it to switch the measurement load, pick background-load blocks and set the
// fan speed. That role follows the published design; the register map below
// is this design's own.
//
//   0x00 CTRL      [0] EMA measurement load on, [1] PA measurement load on
//   0x04 BG_EN     [N_BG_BLOCKS-1:0] background-load block enables
//   0x08 FAN_DUTY  [6:0] fan duty in percent; writes above 100 store 100
//   0x0C CAPS      read-only: [7:0] N_BG_BLOCKS, [8] TRAINING_BUILD
//   other offsets  answer SLVERR, reads return 0
//
// In the detection build (TRAINING_BUILD = 0) BG_EN and FAN_DUTY do not exist:
// they read 0 and ignore writes (response OKAY), and their outputs stay 0.
// All registers reset to 0 (every load off, fan off). Byte strobes are honoured.
//
// Handshake and timing: the write address and write data may arrive in either
// order or together; each is taken as soon as the slave is free (AWREADY /
// WREADY high while nothing is held and no response is pending). The register
// updates on the clock edge after both are held, and BVALID rises with it. A
// read returns RVALID the cycle after the ARVALID/ARREADY handshake. One
// transaction of each kind is outstanding at a time. Reset is synchronous,
// active low.
module axi_pl_interface #(
  parameter int unsigned ADDR_W         = 12,
  parameter int unsigned N_BG_BLOCKS    = sca_pkg::N_BG_BLOCKS_DEFAULT,
  parameter bit          TRAINING_BUILD = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]               s_axi_awaddr,
  input  logic                            s_axi_awvalid,
  output logic                            s_axi_awready,
  input  logic [31:0]                     s_axi_wdata,
  input  logic [3:0]                      s_axi_wstrb,
  input  logic                            s_axi_wvalid,
  output logic                            s_axi_wready,
  output logic [1:0]                      s_axi_bresp,
  output logic                            s_axi_bvalid,
  input  logic                            s_axi_bready,
  input  logic [ADDR_W-1:0]               s_axi_araddr,
  input  logic                            s_axi_arvalid,
  output logic                            s_axi_arready,
  output logic [31:0]                     s_axi_rdata,
  output logic [1:0]                      s_axi_rresp,
  output logic                            s_axi_rvalid,
  input  logic                            s_axi_rready,
  // Control outputs
  output logic                            ema_load_en,
  output logic                            pa_load_en,
  output logic [N_BG_BLOCKS-1:0]          bg_load_en,
  output logic [sca_pkg::FAN_DUTY_W-1:0]  fan_duty_pct
);
  import sca_pkg::*;

  initial begin
    assert (N_BG_BLOCKS >= 1 && N_BG_BLOCKS <= 32)
      else $error("axi_pl_interface: N_BG_BLOCKS must be 1..32");
  end

  // ---------------------------------------------------------------- registers
  logic [1:0]             ctrl_q;
  logic [N_BG_BLOCKS-1:0] bg_q;
  logic [FAN_DUTY_W-1:0]  duty_q;

  // ------------------------------------------------------------- write side
  logic              aw_held_q, w_held_q;
  logic [ADDR_W-1:0] awaddr_q;
  logic [31:0]       wdata_q;
  logic [3:0]        wstrb_q;

  assign s_axi_awready = !aw_held_q && !s_axi_bvalid;
  assign s_axi_wready  = !w_held_q  && !s_axi_bvalid;

  // Address or data taken this cycle or held from before.
  logic              aw_have, w_have, do_write;
  logic [ADDR_W-1:0] waddr;
  logic [31:0]       wdata;
  logic [3:0]        wstrb;

  always_comb begin
    aw_have  = aw_held_q || (s_axi_awvalid && s_axi_awready);
    w_have   = w_held_q  || (s_axi_wvalid  && s_axi_wready);
    do_write = aw_have && w_have;
    waddr    = aw_held_q ? awaddr_q : s_axi_awaddr;
    wdata    = w_held_q  ? wdata_q  : s_axi_wdata;
    wstrb    = w_held_q  ? wstrb_q  : s_axi_wstrb;
  end

  // Byte-merge of the write data into a 32-bit register image.
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[i*8 +: 8] = strb[i] ? nw[i*8 +: 8] : old[i*8 +: 8];
    return r;
  endfunction

  function automatic logic addr_mapped(input logic [ADDR_W-1:0] a);
    return (a[ADDR_W-1:4] == '0);
  endfunction

  logic [31:0] ctrl_img, bg_img, duty_img, wr_val;
  always_comb begin
    ctrl_img = 32'(ctrl_q);
    bg_img   = 32'(bg_q);
    duty_img = 32'(duty_q);
    wr_val   = '0;
    unique case (reg_idx_e'(waddr[3:2]))
      REG_CTRL:     wr_val = merge(ctrl_img, wdata, wstrb);
      REG_BG_EN:    wr_val = merge(bg_img,   wdata, wstrb);
      REG_FAN_DUTY: wr_val = merge(duty_img, wdata, wstrb);
      REG_CAPS:     wr_val = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_held_q    <= 1'b0;
      w_held_q     <= 1'b0;
      awaddr_q     <= '0;
      wdata_q      <= '0;
      wstrb_q      <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= AXI_RESP_OKAY;
      ctrl_q       <= '0;
      bg_q         <= '0;
      duty_q       <= '0;
    end else begin
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      if (do_write) begin
        aw_held_q    <= 1'b0;
        w_held_q     <= 1'b0;
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= addr_mapped(waddr) ? AXI_RESP_OKAY : AXI_RESP_SLVERR;
        if (addr_mapped(waddr)) begin
          unique case (reg_idx_e'(waddr[3:2]))
            REG_CTRL:     ctrl_q <= wr_val[1:0];
            REG_BG_EN:    if (TRAINING_BUILD) bg_q <= wr_val[N_BG_BLOCKS-1:0];
            REG_FAN_DUTY: if (TRAINING_BUILD)
                            duty_q <= (wr_val[FAN_DUTY_W-1:0] > FAN_DUTY_W'(FAN_DUTY_MAX))
                                      ? FAN_DUTY_W'(FAN_DUTY_MAX) : wr_val[FAN_DUTY_W-1:0];
            REG_CAPS:     ;  // read-only
          endcase
        end
      end else begin
        if (s_axi_awvalid && s_axi_awready) begin
          aw_held_q <= 1'b1;
          awaddr_q  <= s_axi_awaddr;
        end
        if (s_axi_wvalid && s_axi_wready) begin
          w_held_q <= 1'b1;
          wdata_q  <= s_axi_wdata;
          wstrb_q  <= s_axi_wstrb;
        end
      end
    end
  end

  // -------------------------------------------------------------- read side
  assign s_axi_arready = !s_axi_rvalid;

  logic [31:0] rd_val;
  always_comb begin
    rd_val = '0;
    unique case (reg_idx_e'(s_axi_araddr[3:2]))
      REG_CTRL:     rd_val = ctrl_img;
      REG_BG_EN:    rd_val = bg_img;
      REG_FAN_DUTY: rd_val = duty_img;
      REG_CAPS: begin
        rd_val[7:0]            = 8'(N_BG_BLOCKS);
        rd_val[CAPS_TRAIN_BIT] = TRAINING_BUILD;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= AXI_RESP_OKAY;
    end else if (s_axi_arvalid && s_axi_arready) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rdata  <= addr_mapped(s_axi_araddr) ? rd_val : '0;
      s_axi_rresp  <= addr_mapped(s_axi_araddr) ? AXI_RESP_OKAY : AXI_RESP_SLVERR;
    end else if (s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // ------------------------------------------------------------ outputs
  assign ema_load_en  = ctrl_q[CTRL_EMA_BIT];
  assign pa_load_en   = ctrl_q[CTRL_PA_BIT];
  assign bg_load_en   = bg_q;
  assign fan_duty_pct = duty_q;

  // ------------------------------------------------------------ protocol rules
  // A response, once offered, stays with the same value until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  // The master must keep a request asserted until it is accepted.
  a_awvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_awvalid && !s_axi_awready |=> s_axi_awvalid);
  a_wvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_wvalid && !s_axi_wready |=> s_axi_wvalid);
  a_arvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_arvalid && !s_axi_arready |=> s_axi_arvalid);

endmodule
