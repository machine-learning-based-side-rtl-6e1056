// usr_logic_model: behavioural stand-in for the application's own logic in
// the top-level testbenches: an AXI4-Lite slave holding 16 words of storage
// (word index = address bits [5:2]). It takes the write address and data in
// any order, answers OKAY one clock after it holds both, and answers a read
// one clock after its address. It counts the writes and reads it served.
module usr_logic_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [11:0] araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready,
  output int          n_writes,
  output int          n_reads
);
  logic [31:0] mem [16];
  logic        aw_q, w_q;
  logic [3:0]  idx_q;
  logic [31:0] d_q;
  logic [3:0]  s_q;

  assign awready = !aw_q && !bvalid;
  assign wready  = !w_q && !bvalid;
  assign arready = !rvalid;
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_q <= 0; w_q <= 0; bvalid <= 0; rvalid <= 0; rdata <= 0;
      idx_q <= 0; d_q <= 0; s_q <= 0;
      n_writes <= 0; n_reads <= 0;
      foreach (mem[i]) mem[i] <= 0;
    end else begin
      if (awvalid && awready) begin aw_q <= 1; idx_q <= awaddr[5:2]; end
      if (wvalid && wready)   begin w_q  <= 1; d_q <= wdata; s_q <= wstrb; end
      if (aw_q && w_q) begin
        for (int b = 0; b < 4; b++) if (s_q[b]) mem[idx_q][b*8 +: 8] <= d_q[b*8 +: 8];
        aw_q <= 0; w_q <= 0; bvalid <= 1; n_writes <= n_writes + 1;
      end
      if (bvalid && bready) bvalid <= 0;
      if (arvalid && arready) begin
        rvalid <= 1; rdata <= mem[araddr[5:2]]; n_reads <= n_reads + 1;
      end else if (rvalid && rready) rvalid <= 0;
    end
  end
endmodule
