// Memory-mapped control registers of the matrix-multiply engine (AXI4-Lite slave).
//
// The processor keeps weights (and bias) in shared DRAM for the whole run and,
// for each matmul, only passes their locations and the sizes through these
// registers, then starts the engine and polls for completion. Register map
// (byte offsets, 32-bit registers; the layout is this design's choice):
//   0x00 CTRL   write: bit0 = 1 starts the engine (ignored while busy)
//               read : bit0 busy, bit1 done (set at the end, cleared by start),
//                      bit2 idle
//   0x04 W_ADDR byte address of the weights, stored transposed: K x M, row-major
//   0x08 X_ADDR byte address of the input (im2col output), K x N, row-major
//   0x0C B_ADDR byte address of the bias, M elements
//   0x10 Y_ADDR byte address of the output, M x N, row-major
//   0x14 M, 0x18 K, 0x1C N   matrix sizes (low 16 bits used)
//   0x20 CFG    bit0 = add bias
// Unmapped offsets read as 0 and ignore writes. Writes honour wstrb.
//
// AXI4-Lite timing: a write is taken in the clock where both awvalid and wvalid
// are high and no response is pending (awready and wready rise together); the
// OKAY response follows on B in the next clock. A read is taken when no read
// response is pending and its data appears on R in the next clock.
module mmio_regs
  import mm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [5:0]  s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [5:0]  s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  // engine side
  output logic        start,
  output addr_t       w_addr,
  output addr_t       x_addr,
  output addr_t       b_addr,
  output addr_t       y_addr,
  output dim_t        dim_m,
  output dim_t        dim_k,
  output dim_t        dim_n,
  output logic        bias_en,
  input  logic        busy,
  input  logic        done
);

  typedef enum logic [3:0] {
    R_CTRL = 4'h0, R_WADDR = 4'h1, R_XADDR = 4'h2, R_BADDR = 4'h3, R_YADDR = 4'h4,
    R_M = 4'h5, R_K = 4'h6, R_N = 4'h7, R_CFG = 4'h8
  } reg_e;

  logic [31:0] regs [9];
  logic        done_flag;
  logic        wr_take;
  logic [3:0]  widx, ridx;

  assign wr_take   = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_take;
  assign s_wready  = wr_take;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !s_rvalid;
  assign widx      = s_awaddr[5:2];
  assign ridx      = s_araddr[5:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) regs[i] <= '0;
      s_bvalid  <= 1'b0;
      start     <= 1'b0;
      done_flag <= 1'b0;
    end else begin
      start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (wr_take) begin
        s_bvalid <= 1'b1;
        if (widx == R_CTRL) begin
          if (s_wstrb[0] && s_wdata[0] && !busy && !start) begin
            start     <= 1'b1;
            done_flag <= 1'b0;
          end
        end else if (widx <= R_CFG) begin
          for (int b = 0; b < 4; b++)
            if (s_wstrb[b]) regs[widx][8*b +: 8] <= s_wdata[8*b +: 8];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else if (s_rvalid) begin
      if (s_rready) s_rvalid <= 1'b0;
    end else if (s_arvalid) begin
      s_rvalid <= 1'b1;
      if (ridx == R_CTRL)
        s_rdata <= {29'd0, !(busy || start), done_flag, busy || start};
      else if (ridx <= R_CFG)
        s_rdata <= regs[ridx];
      else
        s_rdata <= '0;
    end
  end

  assign w_addr  = regs[R_WADDR];
  assign x_addr  = regs[R_XADDR];
  assign b_addr  = regs[R_BADDR];
  assign y_addr  = regs[R_YADDR];
  assign dim_m   = dim_t'(regs[R_M]);
  assign dim_k   = dim_t'(regs[R_K]);
  assign dim_n   = dim_t'(regs[R_N]);
  assign bias_en = regs[R_CFG][0];

endmodule
