// Full-size test of unet_matmul_accel with every parameter at its default
// (TILE_M=256, TILE_N=1024, TILE_K=16, LANES=16, MAX_BURST=256). A processor
// model programs one layer-sized matmul over AXI4-Lite, Y = W x X + bias with
// M=256, K=32, N=1024 (one full output tile, two K tiles), against two
// behavioural AXI memories with random back-pressure, and polls for done.
// Every one of the 262144 outputs is compared with a sequential FP16
// reference, and every compute phase must take tk*tm*ceil(tn/LANES)+2 clocks.
module unet_matmul_accel_full_tb;
  import mm_pkg::*;
  import fp16_ref_pkg::*;

  localparam int TM = 256, TN = 1024, TK = 16, L = 16, MAXB = 256;
  localparam int MEMW = 1 << 19;

  logic clk = 1'b0, rst_n = 1'b0;

  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [5:0] s_axil_awaddr, s_axil_araddr;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;

  logic m0_arvalid, m0_arready, m0_rvalid, m0_rready, m0_rlast;
  addr_t m0_araddr; logic [7:0] m0_arlen; logic [2:0] m0_arsize; logic [1:0] m0_arburst, m0_rresp;
  fp16_t m0_rdata;
  logic m1_arvalid, m1_arready, m1_rvalid, m1_rready, m1_rlast;
  addr_t m1_araddr; logic [7:0] m1_arlen; logic [2:0] m1_arsize; logic [1:0] m1_arburst, m1_rresp;
  fp16_t m1_rdata;
  logic m1_awvalid, m1_awready, m1_wvalid, m1_wready, m1_wlast, m1_bvalid, m1_bready;
  addr_t m1_awaddr; logic [7:0] m1_awlen; logic [2:0] m1_awsize; logic [1:0] m1_awburst, m1_wstrb, m1_bresp;
  fp16_t m1_wdata;
  logic busy, irq_done;

  logic m0_awready_nc, m0_wready_nc, m0_bvalid_nc;
  logic [1:0] m0_bresp_nc;

  int checks = 0, failures = 0;

  unet_matmul_accel dut (.*);

  axi_mem_model #(.MEM_WORDS(MEMW), .STALL_PCT(25)) u_mem0 (
    .clk, .rst_n, .arvalid(m0_arvalid), .arready(m0_arready), .araddr(m0_araddr),
    .arlen(m0_arlen), .arsize(m0_arsize), .arburst(m0_arburst), .rvalid(m0_rvalid),
    .rready(m0_rready), .rdata(m0_rdata), .rresp(m0_rresp), .rlast(m0_rlast),
    .awvalid(1'b0), .awready(m0_awready_nc), .awaddr(32'd0), .awlen(8'd0), .awsize(3'd1),
    .awburst(2'b01), .wvalid(1'b0), .wready(m0_wready_nc), .wdata(16'd0), .wstrb(2'b11),
    .wlast(1'b0), .bvalid(m0_bvalid_nc), .bready(1'b1), .bresp(m0_bresp_nc)
  );
  axi_mem_model #(.MEM_WORDS(MEMW), .STALL_PCT(25)) u_mem1 (
    .clk, .rst_n, .arvalid(m1_arvalid), .arready(m1_arready), .araddr(m1_araddr),
    .arlen(m1_arlen), .arsize(m1_arsize), .arburst(m1_arburst), .rvalid(m1_rvalid),
    .rready(m1_rready), .rdata(m1_rdata), .rresp(m1_rresp), .rlast(m1_rlast),
    .awvalid(m1_awvalid), .awready(m1_awready), .awaddr(m1_awaddr), .awlen(m1_awlen),
    .awsize(m1_awsize), .awburst(m1_awburst), .wvalid(m1_wvalid), .wready(m1_wready),
    .wdata(m1_wdata), .wstrb(m1_wstrb), .wlast(m1_wlast), .bvalid(m1_bvalid),
    .bready(m1_bready), .bresp(m1_bresp)
  );

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_edge = 0, n_kacc = 0, n_bias = 0, n_zero = 0, n_fwd = 0, n_par = 0;
  int n_maxb = 0, n_4k = 0, n_rstall = 0, n_wstall = 0, n_cmp_bad = 0, cmp_cyc = -1;
  int exp_cmp;

  function automatic logic ends_on_4k(addr_t a, logic [7:0] len);
    return ((32'(a) + 2 * (32'(len) + 1)) % 4096 == 0) && (32'(len) + 1 < MAXB);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.cmp_start) begin
      if (dut.cmp_tm < TM || dut.cmp_tn < TN || dut.cmp_tk < TK) n_edge++;
      if (!dut.cmp_first) n_kacc++;
      if (dut.cmp_first && dut.cmp_bias) n_bias++;
      if (dut.cmp_first && !dut.cmp_bias) n_zero++;
      exp_cmp = int'(dut.cmp_tk) * int'(dut.cmp_tm) * ((int'(dut.cmp_tn) + L - 1) / L) + 2;
      cmp_cyc = 0;
    end else if (cmp_cyc >= 0) cmp_cyc++;
    if (dut.cmp_done) begin
      if (cmp_cyc != exp_cmp) n_cmp_bad++;
      cmp_cyc = -1;
    end
    if (dut.fwd_hit) n_fwd++;
    if (m0_rvalid && m0_rready && m1_rvalid && m1_rready) n_par++;
    if (m0_arvalid && m0_arready && m0_arlen == 8'(MAXB - 1)) n_maxb++;
    if (m1_arvalid && m1_arready && m1_arlen == 8'(MAXB - 1)) n_maxb++;
    if (m0_arvalid && m0_arready && ends_on_4k(m0_araddr, m0_arlen)) n_4k++;
    if (m1_arvalid && m1_arready && ends_on_4k(m1_araddr, m1_arlen)) n_4k++;
    if (m1_awvalid && m1_awready && ends_on_4k(m1_awaddr, m1_awlen)) n_4k++;
    if ((m0_rready && !m0_rvalid) || (m0_arvalid && !m0_arready)) n_rstall++;
    if ((m1_wvalid && !m1_wready) || (m1_awvalid && !m1_awready)) n_wstall++;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor model ----------------
  task automatic reg_wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awvalid = 1'b1; s_axil_awaddr = a; s_axil_wvalid = 1'b1; s_axil_wdata = d;
    s_axil_wstrb = 4'hF;
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    @(negedge clk);
    s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic reg_rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_arvalid = 1'b1; s_axil_araddr = a;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk);
    s_axil_arvalid = 1'b0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(negedge clk);
  endtask

  task automatic put(input int byte_addr, input fp16_t v);
    u_mem0.mem[byte_addr / 2] = v;
    u_mem1.mem[byte_addr / 2] = v;
  endtask

  // one matmul: fill DRAM, run, check
  task automatic run(input int M, K, N, input logic be, input int wa, xa, ba, ya);
    fp16_t acc;
    logic [31:0] st;
    int polls;
    for (int k = 0; k < K; k++)
      for (int m = 0; m < M; m++) put(wa + 2 * (k * M + m), rand_f16(10, 16));
    for (int k = 0; k < K; k++)
      for (int n = 0; n < N; n++) put(xa + 2 * (k * N + n), rand_f16(10, 16));
    for (int m = 0; m < M; m++) put(ba + 2 * m, rand_f16(12, 17));
    for (int i = -2; i < M * N + 2; i++) u_mem1.mem[ya / 2 + i] = 16'hDEAD;
    reg_wr(6'h04, 32'(wa)); reg_wr(6'h08, 32'(xa)); reg_wr(6'h0C, 32'(ba));
    reg_wr(6'h10, 32'(ya)); reg_wr(6'h14, 32'(M)); reg_wr(6'h18, 32'(K));
    reg_wr(6'h1C, 32'(N)); reg_wr(6'h20, 32'(be));
    reg_wr(6'h00, 32'h1);
    polls = 0;
    do begin reg_rd(6'h00, st); polls++; end while (!st[1]);
    checks++;
    if (st[0] || !st[2]) begin failures++; $display("FAIL status %h after done", st); end
    for (int m = 0; m < M; m++)
      for (int n = 0; n < N; n++) begin
        acc = be ? u_mem0.mem[ba / 2 + m] : 16'h0000;
        for (int k = 0; k < K; k++)
          acc = ref_fma(u_mem0.mem[wa / 2 + k * M + m], u_mem1.mem[xa / 2 + k * N + n], acc);
        checks++;
        if (u_mem1.mem[ya / 2 + m * N + n] !== acc) begin
          failures++;
          if (failures < 20) $display("FAIL %0dx%0dx%0d Y[%0d][%0d] got %h expected %h",
                                      M, K, N, m, n, u_mem1.mem[ya / 2 + m * N + n], acc);
        end
      end
    for (int i = 1; i <= 2; i++) begin
      checks += 2;
      if (u_mem1.mem[ya / 2 - i] !== 16'hDEAD) failures++;
      if (u_mem1.mem[ya / 2 + M * N - 1 + i] !== 16'hDEAD) failures++;
    end
    $display("run %0dx%0dx%0d bias=%0d done after %0d polls", M, K, N, be, polls);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_awaddr = 0;
    s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0; s_axil_bready = 1; s_axil_rready = 1;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    run(256, 32, 1024, 1'b1, 32'h00000, 32'h10000, 32'h20000, 32'h40000);
    need("parallel weight+input beats", n_par);
    need("K-tile accumulation", n_kacc);
    checks++;
    if (n_cmp_bad != 0) begin failures++; $display("FAIL %0d compute phases off the cycle count", n_cmp_bad); end
    checks++;
    if (u_mem0.cross_4k + u_mem1.cross_4k + u_mem1.wlast_err + u_mem0.bad_size + u_mem1.bad_size != 0) begin
      failures++; $display("FAIL AXI protocol errors seen by the memories");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
