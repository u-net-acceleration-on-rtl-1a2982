// AXI4 burst read master that copies a 2-D tile from DRAM into a tile buffer.
//
// A tile is `rows` rows of `cols` contiguous FP16 elements; row r starts at byte
// address base + 2*r*stride. Because weights are kept in DRAM transposed (K x M),
// a weight tile row is TILE_M contiguous elements, just as an input tile row is
// TILE_N contiguous elements, so both bundles move data in long bursts and
// finish at about the same time when they run in parallel.
//
// How it works: the address side walks the tile burst by burst and issues one
// INCR burst per AR handshake, as long as the slave accepts them, so several
// bursts can be outstanding. Burst length is the smallest of the elements left
// in the row, MAX_BURST and the beats left before the next 4 KiB boundary
// (mm_pkg::burst_beats). The data side walks the same tile beat by beat: read
// data of one AXI ID return in order, so beat i is element (r, c) of a simple
// row/column counter, written to the buffer through wr_row/wr_col.
//
// Interface: `start` (while not busy) latches base/rows/cols/stride. `done`
// pulses one clock after the last beat was written. rows and cols must be at
// least 1. Data bus: 16 bits, one element per beat. Read responses are not
// checked for errors. The AXI protocol details are this design's choices.
module axi_tile_loader
  import mm_pkg::*;
#(
  parameter int unsigned MAX_BURST = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  addr_t      base,
  input  dim_t       rows,
  input  dim_t       cols,
  input  dim_t       stride,     // elements between row starts
  output logic       busy,
  output logic       done,
  // AXI4 read address channel
  output logic       arvalid,
  input  logic       arready,
  output addr_t      araddr,
  output logic [7:0] arlen,
  output logic [2:0] arsize,
  output logic [1:0] arburst,
  // AXI4 read data channel
  input  logic       rvalid,
  output logic       rready,
  input  fp16_t      rdata,
  input  logic [1:0] rresp,
  input  logic       rlast,
  // tile buffer write
  output logic       wr_en,
  output dim_t       wr_row,
  output dim_t       wr_col,
  output fp16_t      wr_data
);

  localparam dim_t MAXB = dim_t'(MAX_BURST);

  dim_t  rows_q, cols_q;
  addr_t row_step;            // 2*stride bytes

  // address side
  logic  ar_active;
  dim_t  ar_row, ar_col;
  addr_t ar_row_addr;
  dim_t  ar_len;

  // data side
  logic  r_active;
  dim_t  r_row, r_col;
  addr_t r_row_addr;
  dim_t  r_beat;              // beat index inside the current burst
  dim_t  r_len;               // length of the current burst
  logic  r_exp_last;

  assign busy = ar_active || r_active || done;

  assign araddr  = ar_row_addr + addr_t'({ar_col, 1'b0});
  assign ar_len  = burst_beats(araddr, cols_q - ar_col, MAXB);
  assign arlen   = 8'(ar_len - 1'b1);
  assign arsize  = AXI_SIZE_2B;
  assign arburst = AXI_BURST_INCR;
  assign arvalid = ar_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_active   <= 1'b0;
      ar_row      <= '0;
      ar_col      <= '0;
      ar_row_addr <= '0;
      rows_q      <= '0;
      cols_q      <= '0;
      row_step    <= '0;
    end else if (start && !busy) begin
      ar_active   <= 1'b1;
      ar_row      <= '0;
      ar_col      <= '0;
      ar_row_addr <= base;
      rows_q      <= rows;
      cols_q      <= cols;
      row_step    <= addr_t'(stride) << 1;
    end else if (arvalid && arready) begin
      if (ar_col + ar_len >= cols_q) begin
        ar_col      <= '0;
        ar_row      <= ar_row + 1'b1;
        ar_row_addr <= ar_row_addr + row_step;
        if (ar_row == rows_q - 1) ar_active <= 1'b0;
      end else begin
        ar_col <= ar_col + ar_len;
      end
    end
  end

  // data side
  assign rready  = r_active;
  assign wr_en   = rvalid && rready;
  assign wr_row  = r_row;
  assign wr_col  = r_col;
  assign wr_data = rdata;

  always_comb begin
    r_len = burst_beats(r_row_addr + addr_t'({r_col - r_beat, 1'b0}),
                        cols_q - (r_col - r_beat), MAXB);
    r_exp_last = (r_beat == r_len - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_active   <= 1'b0;
      r_row      <= '0;
      r_col      <= '0;
      r_row_addr <= '0;
      r_beat     <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        r_active   <= 1'b1;
        r_row      <= '0;
        r_col      <= '0;
        r_row_addr <= base;
        r_beat     <= '0;
      end else if (rvalid && rready) begin
        r_beat <= r_exp_last ? '0 : r_beat + 1'b1;
        if (r_col == cols_q - 1) begin
          r_col      <= '0;
          r_row      <= r_row + 1'b1;
          r_row_addr <= r_row_addr + row_step;
          if (r_row == rows_q - 1) begin
            r_active <= 1'b0;
            done     <= 1'b1;
          end
        end else begin
          r_col <= r_col + 1'b1;
        end
      end
    end
  end

  // the slave must end each burst where the address side said it would
  a_rlast : assert property (@(posedge clk) disable iff (!rst_n)
                             (rvalid && rready) |-> (rlast == r_exp_last));
  // AXI: address and control hold while waiting for arready
  a_ar_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                 (arvalid && !arready) |=> (arvalid && $stable(araddr) && $stable(arlen)));

endmodule
