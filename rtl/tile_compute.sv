// Compute lanes of the matrix-multiply engine: output tile += weight tile x input tile.
//
// For one K tile the unit walks k (outermost), then the output row m, then the
// group g of LANES adjacent output columns, and issues one (k, m, g) step per
// clock. Each step reads the weight W[m][k] (one FP16 value, broadcast to all
// lanes), LANES input elements X[k][g*LANES +: LANES] and the LANES partial sums
// of output row m, and writes back partial + W*X, one fp16_fma per lane. On
// the first K tile of an output tile (first_k) the partial sums are not read:
// lane accumulators start at bias[m] (bias_en) or at +0. Accumulation stays in
// FP16, like the data; the order is k ascending, so results match a sequential
// FP16 dot product. The loop order inside a K tile and the number of lanes are
// this design's choices; the document fixes only the tile loop order.
//
// Buffer layouts (word addresses):
//   weight tile  [k][m]  : k*TILE_M + m        (weights are stored transposed)
//   input tile   [k][g]  : k*(TILE_N/LANES) + g
//   output tile  [m][g]  : m*(TILE_N/LANES) + g
//   bias         [m]     : m
//
// Timing: a two-stage pipeline. Stage 0 presents the buffer read addresses;
// stage 1 gets the data one clock later, computes and writes. A write and the
// next step's read of the same output word meet only when the tile is a single
// word (tm * groups == 1); the result of the previous write is then forwarded
// (fwd_hit pulses). `start` is taken when `busy` is low; `done` pulses one clock
// after the last write, i.e. tk*tm*ceil(tn/LANES) + 2 clocks after `start`.
module tile_compute
  import mm_pkg::*;
#(
  parameter int unsigned TILE_M = 256,
  parameter int unsigned TILE_N = 1024,
  parameter int unsigned TILE_K = 16,
  parameter int unsigned LANES  = 16,
  localparam int unsigned NG    = TILE_N / LANES,
  localparam int unsigned WAW   = $clog2(TILE_K * TILE_M),
  localparam int unsigned XAW   = (TILE_K * NG > 1) ? $clog2(TILE_K * NG) : 1,
  localparam int unsigned OAW   = (TILE_M * NG > 1) ? $clog2(TILE_M * NG) : 1,
  localparam int unsigned BAW   = (TILE_M > 1) ? $clog2(TILE_M) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  dim_t              tm,        // rows of this tile, 1..TILE_M
  input  dim_t              tn,        // columns of this tile, 1..TILE_N
  input  dim_t              tk,        // depth of this K tile, 1..TILE_K
  input  logic              first_k,   // first K tile: seed instead of accumulate
  input  logic              bias_en,
  output logic              busy,
  output logic              done,
  output logic              fwd_hit,
  // weight tile buffer
  output logic              w_rd_en,
  output logic [WAW-1:0]    w_rd_addr,
  input  fp16_t             w_rd_data,
  // input tile buffer
  output logic              x_rd_en,
  output logic [XAW-1:0]    x_rd_addr,
  input  fp16_t [LANES-1:0] x_rd_data,
  // bias buffer
  output logic              b_rd_en,
  output logic [BAW-1:0]    b_rd_addr,
  input  fp16_t             b_rd_data,
  // output tile buffer
  output logic              o_rd_en,
  output logic [OAW-1:0]    o_rd_addr,
  input  fp16_t [LANES-1:0] o_rd_data,
  output logic [LANES-1:0]  o_wr_en,
  output logic [OAW-1:0]    o_wr_addr,
  output fp16_t [LANES-1:0] o_wr_data
);

  // configuration latched at start
  dim_t tm_q, tk_q, ng_q;
  logic first_q, bias_q;

  // stage 0: loop counters
  logic running;
  dim_t k_c, m_c, g_c;
  logic last_step;

  // stage 1
  logic           s1_valid, s1_seed, s1_last;
  logic [OAW-1:0] s1_oaddr;

  // last write, for forwarding
  logic              lw_valid;
  logic [OAW-1:0]    lw_addr;
  fp16_t [LANES-1:0] lw_data;

  fp16_t [LANES-1:0] acc_in;
  fp16_t [LANES-1:0] fma_out;

  assign busy = running || s1_valid || done;
  assign last_step = (k_c == tk_q - 1) && (m_c == tm_q - 1) && (g_c == ng_q - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      k_c <= '0; m_c <= '0; g_c <= '0;
      tm_q <= '0; tk_q <= '0; ng_q <= '0;
      first_q <= 1'b0; bias_q <= 1'b0;
    end else if (!running) begin
      if (start && !busy) begin
        running <= 1'b1;
        k_c <= '0; m_c <= '0; g_c <= '0;
        tm_q <= tm; tk_q <= tk;
        ng_q <= dim_t'((32'(tn) + LANES - 1) / LANES);
        first_q <= first_k; bias_q <= bias_en;
      end
    end else begin
      if (last_step) running <= 1'b0;
      if (g_c == ng_q - 1) begin
        g_c <= '0;
        if (m_c == tm_q - 1) begin
          m_c <= '0;
          k_c <= k_c + 1'b1;
        end else begin
          m_c <= m_c + 1'b1;
        end
      end else begin
        g_c <= g_c + 1'b1;
      end
    end
  end

  // stage 0 read addresses
  always_comb begin
    w_rd_en   = running;
    x_rd_en   = running;
    b_rd_en   = running;
    o_rd_en   = running;
    w_rd_addr = WAW'(32'(k_c) * TILE_M + 32'(m_c));
    x_rd_addr = XAW'(32'(k_c) * NG + 32'(g_c));
    o_rd_addr = OAW'(32'(m_c) * NG + 32'(g_c));
    b_rd_addr = BAW'(m_c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_seed  <= 1'b0;
      s1_last  <= 1'b0;
      s1_oaddr <= '0;
      done     <= 1'b0;
    end else begin
      s1_valid <= running;
      s1_seed  <= running && first_q && (k_c == 0);
      s1_last  <= running && last_step;
      s1_oaddr <= o_rd_addr;
      done     <= s1_valid && s1_last;
    end
  end

  // stage 1: pick the accumulator input, multiply-add, write back
  always_comb begin
    fwd_hit = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      if (s1_seed)
        acc_in[l] = bias_q ? b_rd_data : 16'h0000;
      else if (lw_valid && lw_addr == s1_oaddr)
        acc_in[l] = lw_data[l];
      else
        acc_in[l] = o_rd_data[l];
    end
    if (s1_valid && !s1_seed && lw_valid && lw_addr == s1_oaddr) fwd_hit = 1'b1;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    fp16_fma u_fma (
      .a(w_rd_data),
      .b(x_rd_data[l]),
      .c(acc_in[l]),
      .y(fma_out[l])
    );
  end

  assign o_wr_en   = {LANES{s1_valid}};
  assign o_wr_addr = s1_oaddr;
  assign o_wr_data = fma_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lw_valid <= 1'b0;
      lw_addr  <= '0;
      lw_data  <= '0;
    end else begin
      lw_valid <= s1_valid;
      lw_addr  <= s1_oaddr;
      lw_data  <= fma_out;
    end
  end

endmodule
