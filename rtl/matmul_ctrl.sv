// Tile loop sequencer of the matrix-multiply engine.
//
// Y (M x N) = W (M x K) x X (K x N) (+ bias) is cut into TILE_M x TILE_N output
// tiles and TILE_K deep slices. The loops follow the document's tiling: the
// outermost loop walks output row tiles (m0), the next walks output column
// tiles (n0), the innermost walks K tiles (k0), accumulating into the output
// tile held on chip. Edge tiles are cut short: tm = min(TILE_M, M - m0) and
// likewise tn and tk, so any M, K, N of at least 1 is accepted.
//
// For every output tile: if bias is enabled, the bias slice b[m0 +: tm] is first
// read over the weight bundle (loader 0). Then for every K tile, loader 0
// (weight bundle) fetches the transposed weight tile, rows k0..k0+tk-1 of the
// K x M weight array, tm elements each, while loader 1 (input bundle) fetches
// rows k0.. of the K x N input, tn elements each; both run at the same time and
// the sequencer waits for both. Then the compute lanes run over the tile
// (first_k on the first K tile). After the last K tile the writer stores the
// tile to Y. Loading, computing and storing do not overlap one another; this is
// how the document's design works.
//
// Interface: `start` (while idle) latches the configuration; `done` pulses once
// the last output tile has been acknowledged. If M, K or N is 0 the run ends
// at once without memory traffic. ld0_bias tells the top where loader 0's data go.
module matmul_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned TILE_M = 256,
  parameter int unsigned TILE_N = 1024,
  parameter int unsigned TILE_K = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  addr_t w_addr,
  input  addr_t x_addr,
  input  addr_t b_addr,
  input  addr_t y_addr,
  input  dim_t  dim_m,
  input  dim_t  dim_k,
  input  dim_t  dim_n,
  input  logic  bias_en,
  output logic  busy,
  output logic  done,
  // loader 0 (weight bundle: weights and bias)
  output logic  ld0_start,
  output logic  ld0_bias,
  output addr_t ld0_base,
  output dim_t  ld0_rows,
  output dim_t  ld0_cols,
  output dim_t  ld0_stride,
  input  logic  ld0_done,
  // loader 1 (input bundle)
  output logic  ld1_start,
  output addr_t ld1_base,
  output dim_t  ld1_rows,
  output dim_t  ld1_cols,
  output dim_t  ld1_stride,
  input  logic  ld1_done,
  // compute lanes
  output logic  cmp_start,
  output dim_t  cmp_tm,
  output dim_t  cmp_tn,
  output dim_t  cmp_tk,
  output logic  cmp_first,
  output logic  cmp_bias,
  input  logic  cmp_done,
  // output writer
  output logic  st_start,
  output addr_t st_base,
  output dim_t  st_rows,
  output dim_t  st_cols,
  output dim_t  st_stride,
  input  logic  st_done
);

  typedef enum logic [3:0] {
    S_IDLE, S_TILE, S_BIAS, S_BIAS_WAIT, S_KTILE, S_LOAD, S_LOAD_WAIT,
    S_COMP, S_COMP_WAIT, S_STORE, S_STORE_WAIT, S_NEXT, S_DONE
  } state_e;

  state_e state;
  addr_t  w_q, x_q, b_q, y_q;
  dim_t   m_q, k_q, n_q;
  logic   bias_q;
  dim_t   m0, n0, k0, tm, tn, tk;
  logic   ld0_seen, ld1_seen;

  function automatic dim_t tile_len(input dim_t total, input dim_t pos, input int unsigned tile);
    dim_t left;
    left = total - pos;
    return (32'(left) > tile) ? dim_t'(tile) : left;
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      w_q <= '0; x_q <= '0; b_q <= '0; y_q <= '0;
      m_q <= '0; k_q <= '0; n_q <= '0; bias_q <= 1'b0;
      m0 <= '0; n0 <= '0; k0 <= '0; tm <= '0; tn <= '0; tk <= '0;
      ld0_seen <= 1'b0; ld1_seen <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          w_q <= w_addr; x_q <= x_addr; b_q <= b_addr; y_q <= y_addr;
          m_q <= dim_m; k_q <= dim_k; n_q <= dim_n; bias_q <= bias_en;
          m0 <= '0; n0 <= '0;
          state <= (dim_m == 0 || dim_k == 0 || dim_n == 0) ? S_DONE : S_TILE;
        end
        S_TILE: begin
          tm <= tile_len(m_q, m0, TILE_M);
          tn <= tile_len(n_q, n0, TILE_N);
          k0 <= '0;
          state <= bias_q ? S_BIAS : S_KTILE;
        end
        S_BIAS: state <= S_BIAS_WAIT;
        S_BIAS_WAIT: if (ld0_done) state <= S_KTILE;
        S_KTILE: begin
          tk <= tile_len(k_q, k0, TILE_K);
          state <= S_LOAD;
        end
        S_LOAD: begin
          ld0_seen <= 1'b0;
          ld1_seen <= 1'b0;
          state <= S_LOAD_WAIT;
        end
        S_LOAD_WAIT: begin
          if (ld0_done) ld0_seen <= 1'b1;
          if (ld1_done) ld1_seen <= 1'b1;
          if ((ld0_seen || ld0_done) && (ld1_seen || ld1_done)) state <= S_COMP;
        end
        S_COMP: state <= S_COMP_WAIT;
        S_COMP_WAIT: if (cmp_done) begin
          if (32'(k0) + TILE_K >= 32'(k_q)) begin
            state <= S_STORE;
          end else begin
            k0 <= k0 + dim_t'(TILE_K);
            state <= S_KTILE;
          end
        end
        S_STORE: state <= S_STORE_WAIT;
        S_STORE_WAIT: if (st_done) state <= S_NEXT;
        S_NEXT: begin
          if (32'(n0) + TILE_N < 32'(n_q)) begin
            n0 <= n0 + dim_t'(TILE_N);
            state <= S_TILE;
          end else if (32'(m0) + TILE_M < 32'(m_q)) begin
            n0 <= '0;
            m0 <= m0 + dim_t'(TILE_M);
            state <= S_TILE;
          end else begin
            state <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = (state == S_DONE);

  // loader 0: bias slice in S_BIAS, weight tile (transposed: K x M) in S_LOAD;
  // loader 1: input tile in S_LOAD, in the same clock
  always_comb begin
    ld0_bias   = (state == S_BIAS) || (state == S_BIAS_WAIT);
    ld0_start  = (state == S_BIAS) || (state == S_LOAD);
    if (ld0_bias) begin
      ld0_base   = b_q + addr_t'({m0, 1'b0});
      ld0_rows   = 16'd1;
      ld0_cols   = tm;
      ld0_stride = m_q;
    end else begin
      ld0_base   = w_q + (addr_t'(32'(k0) * 32'(m_q) + 32'(m0)) << 1);
      ld0_rows   = tk;
      ld0_cols   = tm;
      ld0_stride = m_q;
    end
    ld1_start  = (state == S_LOAD);
    ld1_base   = x_q + (addr_t'(32'(k0) * 32'(n_q) + 32'(n0)) << 1);
    ld1_rows   = tk;
    ld1_cols   = tn;
    ld1_stride = n_q;

    cmp_start  = (state == S_COMP);
    cmp_tm     = tm;
    cmp_tn     = tn;
    cmp_tk     = tk;
    cmp_first  = (k0 == 0);
    cmp_bias   = bias_q;

    st_start   = (state == S_STORE);
    st_base    = y_q + (addr_t'(32'(m0) * 32'(n_q) + 32'(n0)) << 1);
    st_rows    = tm;
    st_cols    = tn;
    st_stride  = n_q;
  end

endmodule
