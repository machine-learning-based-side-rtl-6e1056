// axi_lite_split: one AXI4-Lite slave port split into two by address.
//
// Accesses whose byte address has bits [ADDR_W-1:4] all zero (the 16-byte
// control-register window) go to port "reg"; every other address goes to port
// "usr", which leads to the application's own logic. This gives software a
// single AXI window for both, as in a system where the detection hardware and
// the application logic share the processor's AXI link. The window size and
// the split itself are this design's choice.
//
// How it works: a write is steered by its address. The address handshake goes
// straight through to the chosen port (ready comes back combinationally); the
// write data is accepted only after the address has been taken, and the
// response is taken from the same port, after which the next write may start.
// Reads work the same way with the read address and read data. At most one
// write and one read are in flight. There are no added cycles of latency; the
// only extra rule for the masters is that write data waits for its address,
// which AXI permits a slave to require.
//
// Reset: synchronous, active low; clears the in-flight state.
module axi_lite_split #(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream slave port
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // master ports: index 0 = control registers, 1 = user logic
  output logic [ADDR_W-1:0] m_awaddr  [2],
  output logic              m_awvalid [2],
  input  logic              m_awready [2],
  output logic [31:0]       m_wdata   [2],
  output logic [3:0]        m_wstrb   [2],
  output logic              m_wvalid  [2],
  input  logic              m_wready  [2],
  input  logic [1:0]        m_bresp   [2],
  input  logic              m_bvalid  [2],
  output logic              m_bready  [2],
  output logic [ADDR_W-1:0] m_araddr  [2],
  output logic              m_arvalid [2],
  input  logic              m_arready [2],
  input  logic [31:0]       m_rdata   [2],
  input  logic [1:0]        m_rresp   [2],
  input  logic              m_rvalid  [2],
  output logic              m_rready  [2]
);

  function automatic logic sel_of(input logic [ADDR_W-1:0] a);
    return (a[ADDR_W-1:4] != '0);   // 0 = registers, 1 = user logic
  endfunction

  // -------------------------------------------------------------- writes
  logic w_busy_q, w_data_done_q, w_sel_q;
  logic aw_sel;

  assign aw_sel = sel_of(s_awaddr);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      m_awaddr[p]  = s_awaddr;
      m_awvalid[p] = s_awvalid && !w_busy_q && (aw_sel == p[0]);
      m_wdata[p]   = s_wdata;
      m_wstrb[p]   = s_wstrb;
      m_wvalid[p]  = s_wvalid && w_busy_q && !w_data_done_q && (w_sel_q == p[0]);
      m_bready[p]  = s_bready && w_busy_q && (w_sel_q == p[0]);
    end
    s_awready = !w_busy_q && m_awready[aw_sel];
    s_wready  = w_busy_q && !w_data_done_q && m_wready[w_sel_q];
    s_bvalid  = w_busy_q && m_bvalid[w_sel_q];
    s_bresp   = m_bresp[w_sel_q];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_busy_q      <= 1'b0;
      w_data_done_q <= 1'b0;
      w_sel_q       <= 1'b0;
    end else begin
      if (s_awvalid && s_awready) begin
        w_busy_q <= 1'b1;
        w_sel_q  <= aw_sel;
      end
      if (s_wvalid && s_wready) w_data_done_q <= 1'b1;
      if (s_bvalid && s_bready) begin
        w_busy_q      <= 1'b0;
        w_data_done_q <= 1'b0;
      end
    end
  end

  // --------------------------------------------------------------- reads
  logic r_busy_q, r_sel_q;
  logic ar_sel;

  assign ar_sel = sel_of(s_araddr);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      m_araddr[p]  = s_araddr;
      m_arvalid[p] = s_arvalid && !r_busy_q && (ar_sel == p[0]);
      m_rready[p]  = s_rready && r_busy_q && (r_sel_q == p[0]);
    end
    s_arready = !r_busy_q && m_arready[ar_sel];
    s_rvalid  = r_busy_q && m_rvalid[r_sel_q];
    s_rdata   = m_rdata[r_sel_q];
    s_rresp   = m_rresp[r_sel_q];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_busy_q <= 1'b0;
      r_sel_q  <= 1'b0;
    end else begin
      if (s_arvalid && s_arready) begin
        r_busy_q <= 1'b1;
        r_sel_q  <= ar_sel;
      end
      if (s_rvalid && s_rready) r_busy_q <= 1'b0;
    end
  end

  // A write response can only come back for a write whose data was sent.
  a_b_after_w: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid |-> w_data_done_q);

endmodule
