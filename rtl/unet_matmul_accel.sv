// Tiled FP16 matrix-multiply engine for the convolutions of a U-Net diffusion
// model: Y (M x N) = W (M x K) x X (K x N) + bias, with X the im2col view of a
// feature map (K = in_channels * kernel_size^2, N = out_height * out_width,
// M = out_channels). One configuration serves every layer: the matrices are
// tiled along M, N and K, so on-chip storage depends only on TILE_M, TILE_N and
// TILE_K (defaults 256, 1024, 16, the document's best setting), never on the
// layer size.
//
// Structure:
//   mmio_regs        AXI4-Lite registers: matrix locations, sizes, start/done
//   matmul_ctrl      loop nest: M tiles, then N tiles, then K tiles
//   axi_tile_loader  x2, one per AXI master bundle:
//                      bundle 0 (m0_*): transposed weights and the bias
//                      bundle 1 (m1_*): input tiles
//                    the weight and input tiles of a K step load in parallel
//   tile_compute     LANES FP16 multiply-add lanes, accumulating in the output tile
//   axi_tile_writer  stores finished output tiles over bundle 1 (write channels)
//   tile_ram         x4: weight tile [TILE_K][TILE_M], input tile
//                    [TILE_K][TILE_N], output tile [TILE_M][TILE_N], bias [TILE_M]
//
// DRAM layout expected (FP16, row-major, byte addresses): weights transposed,
// element (m, k) at W_ADDR + 2*(k*M + m); input (k, n) at X_ADDR + 2*(k*N + n);
// bias m at B_ADDR + 2*m; output (m, n) at Y_ADDR + 2*(m*N + n). All addresses
// must be even.
//
// What follows the document: the M/N/K tiling and loop order, the tile sizes,
// the transposed weight layout, FP16 arithmetic, two bundles loading weights
// and inputs in parallel, and MMIO parameter passing. This design's own
// choices: the register map, 16-bit AXI data buses (one element per beat),
// bursts of at most MAX_BURST beats, LANES parallel lanes, the bias added in
// the engine, the output written over the input bundle, and the exact FMA.
//
// Timing: every phase (bias load, parallel tile load, compute, store) runs to
// completion before the next starts. Compute of one K tile takes
// tk*tm*ceil(tn/LANES) + 2 clocks. Single clock, active-low asynchronous reset.
module unet_matmul_accel
  import mm_pkg::*;
#(
  parameter int unsigned TILE_M    = 256,
  parameter int unsigned TILE_N    = 1024,
  parameter int unsigned TILE_K    = 16,
  parameter int unsigned LANES     = 16,
  parameter int unsigned MAX_BURST = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite control slave
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [5:0]  s_axil_awaddr,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  output logic [1:0]  s_axil_bresp,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  input  logic [5:0]  s_axil_araddr,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  // AXI4 master, bundle 0: weights and bias (read only)
  output logic        m0_arvalid,
  input  logic        m0_arready,
  output addr_t       m0_araddr,
  output logic [7:0]  m0_arlen,
  output logic [2:0]  m0_arsize,
  output logic [1:0]  m0_arburst,
  input  logic        m0_rvalid,
  output logic        m0_rready,
  input  fp16_t       m0_rdata,
  input  logic [1:0]  m0_rresp,
  input  logic        m0_rlast,
  // AXI4 master, bundle 1: inputs (read) and outputs (write)
  output logic        m1_arvalid,
  input  logic        m1_arready,
  output addr_t       m1_araddr,
  output logic [7:0]  m1_arlen,
  output logic [2:0]  m1_arsize,
  output logic [1:0]  m1_arburst,
  input  logic        m1_rvalid,
  output logic        m1_rready,
  input  fp16_t       m1_rdata,
  input  logic [1:0]  m1_rresp,
  input  logic        m1_rlast,
  output logic        m1_awvalid,
  input  logic        m1_awready,
  output addr_t       m1_awaddr,
  output logic [7:0]  m1_awlen,
  output logic [2:0]  m1_awsize,
  output logic [1:0]  m1_awburst,
  output logic        m1_wvalid,
  input  logic        m1_wready,
  output fp16_t       m1_wdata,
  output logic [1:0]  m1_wstrb,
  output logic        m1_wlast,
  input  logic        m1_bvalid,
  output logic        m1_bready,
  input  logic [1:0]  m1_bresp,
  // status
  output logic        busy,
  output logic        irq_done      // pulses when a run ends
);

  localparam int unsigned NG  = TILE_N / LANES;
  localparam int unsigned WAW = $clog2(TILE_K * TILE_M);
  localparam int unsigned XAW = (TILE_K * NG > 1) ? $clog2(TILE_K * NG) : 1;
  localparam int unsigned OAW = (TILE_M * NG > 1) ? $clog2(TILE_M * NG) : 1;
  localparam int unsigned BAW = (TILE_M > 1) ? $clog2(TILE_M) : 1;
  localparam int unsigned LW  = (LANES > 1) ? $clog2(LANES) : 1;

  // ---------------- registers ----------------
  logic  start;
  addr_t w_addr, x_addr, b_addr, y_addr;
  dim_t  dim_m, dim_k, dim_n;
  logic  bias_en;
  logic  done;

  mmio_regs u_regs (
    .clk, .rst_n,
    .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready), .s_awaddr(s_axil_awaddr),
    .s_wvalid(s_axil_wvalid),   .s_wready(s_axil_wready),   .s_wdata(s_axil_wdata),
    .s_wstrb(s_axil_wstrb),
    .s_bvalid(s_axil_bvalid),   .s_bready(s_axil_bready),   .s_bresp(s_axil_bresp),
    .s_arvalid(s_axil_arvalid), .s_arready(s_axil_arready), .s_araddr(s_axil_araddr),
    .s_rvalid(s_axil_rvalid),   .s_rready(s_axil_rready),   .s_rdata(s_axil_rdata),
    .s_rresp(s_axil_rresp),
    .start, .w_addr, .x_addr, .b_addr, .y_addr, .dim_m, .dim_k, .dim_n, .bias_en,
    .busy, .done
  );

  // ---------------- sequencer ----------------
  logic  ld0_start, ld0_bias, ld0_done, ld1_start, ld1_done;
  addr_t ld0_base, ld1_base, st_base;
  dim_t  ld0_rows, ld0_cols, ld0_stride, ld1_rows, ld1_cols, ld1_stride;
  logic  cmp_start, cmp_first, cmp_bias, cmp_done;
  dim_t  cmp_tm, cmp_tn, cmp_tk;
  logic  st_start, st_done;
  dim_t  st_rows, st_cols, st_stride;

  matmul_ctrl #(.TILE_M(TILE_M), .TILE_N(TILE_N), .TILE_K(TILE_K)) u_ctrl (
    .clk, .rst_n, .start,
    .w_addr, .x_addr, .b_addr, .y_addr, .dim_m, .dim_k, .dim_n, .bias_en,
    .busy, .done,
    .ld0_start, .ld0_bias, .ld0_base, .ld0_rows, .ld0_cols, .ld0_stride, .ld0_done,
    .ld1_start, .ld1_base, .ld1_rows, .ld1_cols, .ld1_stride, .ld1_done,
    .cmp_start, .cmp_tm, .cmp_tn, .cmp_tk, .cmp_first, .cmp_bias, .cmp_done,
    .st_start, .st_base, .st_rows, .st_cols, .st_stride, .st_done
  );
  assign irq_done = done;

  // ---------------- bundle 0: weights and bias ----------------
  logic  ld0_we;
  dim_t  ld0_row, ld0_col;
  fp16_t ld0_data;
  logic  ld0_busy, ld1_busy, st_busy;

  axi_tile_loader #(.MAX_BURST(MAX_BURST)) u_ld_w (
    .clk, .rst_n, .start(ld0_start), .base(ld0_base), .rows(ld0_rows), .cols(ld0_cols),
    .stride(ld0_stride), .busy(ld0_busy), .done(ld0_done),
    .arvalid(m0_arvalid), .arready(m0_arready), .araddr(m0_araddr), .arlen(m0_arlen),
    .arsize(m0_arsize), .arburst(m0_arburst),
    .rvalid(m0_rvalid), .rready(m0_rready), .rdata(m0_rdata), .rresp(m0_rresp),
    .rlast(m0_rlast),
    .wr_en(ld0_we), .wr_row(ld0_row), .wr_col(ld0_col), .wr_data(ld0_data)
  );

  // ---------------- bundle 1: inputs ----------------
  logic  ld1_we;
  dim_t  ld1_row, ld1_col;
  fp16_t ld1_data;

  axi_tile_loader #(.MAX_BURST(MAX_BURST)) u_ld_x (
    .clk, .rst_n, .start(ld1_start), .base(ld1_base), .rows(ld1_rows), .cols(ld1_cols),
    .stride(ld1_stride), .busy(ld1_busy), .done(ld1_done),
    .arvalid(m1_arvalid), .arready(m1_arready), .araddr(m1_araddr), .arlen(m1_arlen),
    .arsize(m1_arsize), .arburst(m1_arburst),
    .rvalid(m1_rvalid), .rready(m1_rready), .rdata(m1_rdata), .rresp(m1_rresp),
    .rlast(m1_rlast),
    .wr_en(ld1_we), .wr_row(ld1_row), .wr_col(ld1_col), .wr_data(ld1_data)
  );

  // ---------------- tile buffers ----------------
  logic           w_rd_en, x_rd_en, b_rd_en, c_o_rd_en;
  logic [WAW-1:0] w_rd_addr;
  logic [XAW-1:0] x_rd_addr;
  logic [BAW-1:0] b_rd_addr;
  logic [OAW-1:0] c_o_rd_addr, o_rd_addr, o_wr_addr;
  fp16_t          w_rd_data, b_rd_data;
  fp16_t [LANES-1:0] x_rd_data, o_rd_data, o_wr_data;
  logic  [LANES-1:0] o_wr_en, x_wr_en;
  logic              o_rd_en;
  logic              cmp_busy, fwd_hit;

  tile_ram #(.DEPTH(TILE_K * TILE_M), .LANES(1)) u_wbuf (
    .clk, .wr_en(ld0_we && !ld0_bias),
    .wr_addr(WAW'(32'(ld0_row) * TILE_M + 32'(ld0_col))), .wr_data(ld0_data),
    .rd_en(w_rd_en), .rd_addr(w_rd_addr), .rd_data(w_rd_data)
  );

  tile_ram #(.DEPTH(TILE_M), .LANES(1)) u_bbuf (
    .clk, .wr_en(ld0_we && ld0_bias), .wr_addr(BAW'(ld0_col)), .wr_data(ld0_data),
    .rd_en(b_rd_en), .rd_addr(b_rd_addr), .rd_data(b_rd_data)
  );

  always_comb begin
    for (int l = 0; l < LANES; l++)
      x_wr_en[l] = ld1_we && (32'(ld1_col) % LANES == l);
  end

  tile_ram #(.DEPTH(TILE_K * NG), .LANES(LANES)) u_xbuf (
    .clk, .wr_en(x_wr_en),
    .wr_addr(XAW'(32'(ld1_row) * NG + 32'(ld1_col) / LANES)), .wr_data({LANES{ld1_data}}),
    .rd_en(x_rd_en), .rd_addr(x_rd_addr), .rd_data(x_rd_data)
  );

  // output tile: compute owns it, except while the writer drains it
  logic           st_rd_en;
  dim_t           st_rd_row, st_rd_col;
  logic [LW-1:0]  st_lane_q;
  fp16_t          st_rd_data;

  assign o_rd_en   = st_busy ? st_rd_en : c_o_rd_en;
  assign o_rd_addr = st_busy ? OAW'(32'(st_rd_row) * NG + 32'(st_rd_col) / LANES) : c_o_rd_addr;

  tile_ram #(.DEPTH(TILE_M * NG), .LANES(LANES)) u_obuf (
    .clk, .wr_en(o_wr_en), .wr_addr(o_wr_addr), .wr_data(o_wr_data),
    .rd_en(o_rd_en), .rd_addr(o_rd_addr), .rd_data(o_rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        st_lane_q <= '0;
    else if (st_rd_en) st_lane_q <= LW'(32'(st_rd_col) % LANES);
  end
  assign st_rd_data = o_rd_data[st_lane_q];

  // ---------------- compute lanes ----------------
  tile_compute #(.TILE_M(TILE_M), .TILE_N(TILE_N), .TILE_K(TILE_K), .LANES(LANES)) u_cmp (
    .clk, .rst_n, .start(cmp_start), .tm(cmp_tm), .tn(cmp_tn), .tk(cmp_tk),
    .first_k(cmp_first), .bias_en(cmp_bias), .busy(cmp_busy), .done(cmp_done),
    .fwd_hit,
    .w_rd_en, .w_rd_addr, .w_rd_data,
    .x_rd_en, .x_rd_addr, .x_rd_data,
    .b_rd_en, .b_rd_addr, .b_rd_data,
    .o_rd_en(c_o_rd_en), .o_rd_addr(c_o_rd_addr), .o_rd_data,
    .o_wr_en, .o_wr_addr, .o_wr_data
  );

  // ---------------- output writer (bundle 1 write channels) ----------------
  axi_tile_writer #(.MAX_BURST(MAX_BURST)) u_st (
    .clk, .rst_n, .start(st_start), .base(st_base), .rows(st_rows), .cols(st_cols),
    .stride(st_stride), .busy(st_busy), .done(st_done),
    .rd_en(st_rd_en), .rd_row(st_rd_row), .rd_col(st_rd_col), .rd_data(st_rd_data),
    .awvalid(m1_awvalid), .awready(m1_awready), .awaddr(m1_awaddr), .awlen(m1_awlen),
    .awsize(m1_awsize), .awburst(m1_awburst),
    .wvalid(m1_wvalid), .wready(m1_wready), .wdata(m1_wdata), .wstrb(m1_wstrb),
    .wlast(m1_wlast), .bvalid(m1_bvalid), .bready(m1_bready), .bresp(m1_bresp)
  );

endmodule
