// tb_axi_pl_interface: self-checking test of the AXI4-Lite control registers.
//
// A behavioural AXI4-Lite master issues writes with the address first, the
// data first or both together, with random response back-pressure, and reads
// with random RREADY delays. A reference copy of the register map in the
// testbench predicts every read value, the response codes (OKAY for the four
// registers, SLVERR elsewhere), byte-strobe merging, the saturation of the fan
// duty at 100 and the control outputs. Read latency (RVALID one clock after
// the address handshake) and write latency (BVALID one clock after both halves
// are accepted) are checked as well.
module tb_axi_pl_interface;
  import sca_pkg::*;
  localparam int unsigned NB = 15;

  logic        clk = 1'b0, rst_n;
  logic [11:0] awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        ema_en, pa_en;
  logic [NB-1:0] bg_en;
  logic [6:0]  duty;
  int          checks = 0, failures = 0;

  axi_pl_interface #(.ADDR_W(12), .N_BG_BLOCKS(NB), .TRAINING_BUILD(1'b1)) dut (
    .clk(clk), .rst_n(rst_n),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .ema_load_en(ema_en), .pa_load_en(pa_en), .bg_load_en(bg_en), .fan_duty_pct(duty)
  );

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  logic [31:0] ref_reg [4];

  function automatic logic [31:0] ref_read(input logic [11:0] a);
    if (a[11:4] != 0) return 32'd0;
    if (a[3:2] == 2'd3) return 32'h100 | NB;
    return ref_reg[a[3:2]];
  endfunction

  function automatic void ref_write(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s);
    logic [31:0] m;
    if (a[11:4] != 0 || a[3:2] == 2'd3) return;
    m = ref_reg[a[3:2]];
    for (int i = 0; i < 4; i++) if (s[i]) m[i*8 +: 8] = d[i*8 +: 8];
    case (a[3:2])
      2'd0: m = m & 32'h3;
      2'd1: m = m & ((32'd1 << NB) - 1);
      default: begin m = m & 32'h7f; if (m > 100) m = 100; end
    endcase
    ref_reg[a[3:2]] = m;
  endfunction

  // ------------------------------------------------------------ master
  // order: 0 = AW and W together, 1 = AW first, 2 = W first.
  task automatic axi_write(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s,
                           input int order);
    bit aw_done, w_done;
    int gap, wait_b;
    aw_done = 0; w_done = 0;
    gap = 1 + $urandom_range(0, 3);
    if (order != 2) begin awaddr <= a; awvalid <= 1'b1; end
    if (order != 1) begin wdata <= d; wstrb <= s; wvalid <= 1'b1; end
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awvalid && awready) begin aw_done = 1; awvalid <= 1'b0; end
      if (wvalid && wready)   begin w_done  = 1; wvalid  <= 1'b0; end
      if (gap > 0) gap--;
      if (gap == 0 && order == 1 && !wvalid && !w_done) begin wdata <= d; wstrb <= s; wvalid <= 1'b1; end
      if (gap == 0 && order == 2 && !awvalid && !aw_done) begin awaddr <= a; awvalid <= 1'b1; end
    end
    // Both halves accepted at this edge: the response must appear next edge.
    @(posedge clk);
    check(bvalid, "BVALID not raised one clock after write accepted");
    wait_b = $urandom_range(0, 3);
    repeat (wait_b) begin
      @(posedge clk);
      check(bvalid, "BVALID dropped before BREADY");
    end
    bready <= 1'b1;
    @(posedge clk);
    check(bvalid, "BVALID missing at handshake");
    check(bresp == ((a[11:4] == 0) ? AXI_RESP_OKAY : AXI_RESP_SLVERR),
          $sformatf("write %h: BRESP %0d", a, bresp));
    bready <= 1'b0;
    ref_write(a, d, s);
  endtask

  task automatic axi_read(input logic [11:0] a);
    int wait_r;
    araddr  <= a;
    arvalid <= 1'b1;
    do @(posedge clk); while (!(arvalid && arready));
    arvalid <= 1'b0;
    @(posedge clk);
    check(rvalid, "RVALID not raised one clock after read address accepted");
    wait_r = $urandom_range(0, 3);
    repeat (wait_r) @(posedge clk);
    rready <= 1'b1;
    @(posedge clk);
    check(rvalid, "RVALID dropped before RREADY");
    check(rdata == ref_read(a), $sformatf("read %h: got %h expected %h", a, rdata, ref_read(a)));
    check(rresp == ((a[11:4] == 0) ? AXI_RESP_OKAY : AXI_RESP_SLVERR),
          $sformatf("read %h: RRESP %0d", a, rresp));
    rready <= 1'b0;
  endtask

  task automatic check_outputs();
    check(ema_en == ref_reg[0][0], "ema_load_en output");
    check(pa_en  == ref_reg[0][1], "pa_load_en output");
    check(bg_en  == ref_reg[1][NB-1:0], "bg_load_en output");
    check(duty   == ref_reg[2][6:0], "fan_duty_pct output");
  endtask

  initial begin
    logic [11:0] a;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; wdata = 0; wstrb = 0; araddr = 0;
    foreach (ref_reg[i]) ref_reg[i] = 0;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Reset values and capabilities.
    for (int r = 0; r < 4; r++) axi_read(12'(r * 4));
    check_outputs();

    // Directed: each load mode, a background pattern, fan steps of 20 %.
    axi_write(12'h000, 32'h1, 4'hf, 0); check_outputs();
    axi_write(12'h000, 32'h2, 4'hf, 1); check_outputs();
    axi_write(12'h000, 32'h3, 4'hf, 2); check_outputs();
    axi_write(12'h004, 32'h5a5a, 4'hf, 0); check_outputs();
    for (int p = 0; p <= 100; p += 20) begin
      axi_write(12'h008, 32'(p), 4'hf, p % 3);
      check_outputs();
      axi_read(12'h008);
    end
    axi_write(12'h008, 32'd120, 4'hf, 0); check_outputs();   // saturates to 100
    axi_write(12'h004, 32'hffff_0000, 4'b0001, 0);            // only byte 0
    check_outputs();
    axi_write(12'h00c, 32'hdead_beef, 4'hf, 0);               // read-only
    axi_read(12'h00c);
    axi_write(12'h010, 32'h1, 4'hf, 1);                       // unmapped
    axi_read(12'h800);
    check_outputs();

    // Random traffic.
    repeat (200) begin
      a = ($urandom_range(0, 9) == 0) ? 12'($urandom) & 12'hffc : 12'($urandom_range(0, 3) * 4);
      if ($urandom_range(0, 1)) axi_write(a, $urandom, 4'($urandom), $urandom_range(0, 2));
      else axi_read(a);
      check_outputs();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
