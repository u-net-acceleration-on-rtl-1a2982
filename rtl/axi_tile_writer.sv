// AXI4 burst write master that stores the finished output tile to DRAM.
//
// After the last K tile of an output tile, its `rows` x `cols` FP16 results go
// back to DRAM; row r starts at byte address base + 2*r*stride (stride = N for
// the row-major M x N output). Bursts are cut like the loader's: at the end of
// a row, at MAX_BURST beats and at 4 KiB boundaries (mm_pkg::burst_beats).
//
// How it works: three independent walkers. The address side issues one AW burst
// per handshake. The fetch side reads the tile buffer one element per clock
// (rd_row/rd_col, data back one clock later on rd_data) into a 4-entry FIFO,
// reading ahead only while the FIFO has room for everything in flight. The data
// side sends FIFO entries as W beats and raises wlast at the end of each burst,
// recomputing burst lengths from its own address. Write responses are counted;
// their error codes are not checked.
//
// Interface: `start` (while not busy) latches the tile geometry; `done` pulses
// once every beat was sent and every burst acknowledged on B. rows and cols must
// be at least 1. With a slave that never stalls, one beat leaves per clock.
// The protocol details are this design's choices.
module axi_tile_writer
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
  input  dim_t       stride,
  output logic       busy,
  output logic       done,
  // tile buffer read, one clock latency
  output logic       rd_en,
  output dim_t       rd_row,
  output dim_t       rd_col,
  input  fp16_t      rd_data,
  // AXI4 write address channel
  output logic       awvalid,
  input  logic       awready,
  output addr_t      awaddr,
  output logic [7:0] awlen,
  output logic [2:0] awsize,
  output logic [1:0] awburst,
  // AXI4 write data channel
  output logic       wvalid,
  input  logic       wready,
  output fp16_t      wdata,
  output logic [1:0] wstrb,
  output logic       wlast,
  // AXI4 write response channel
  input  logic       bvalid,
  output logic       bready,
  input  logic [1:0] bresp
);

  localparam dim_t MAXB = dim_t'(MAX_BURST);
  localparam int unsigned FDEPTH = 4;

  dim_t  rows_q, cols_q;
  addr_t row_step;
  logic  active;

  // address side
  logic  aw_active;
  dim_t  aw_row, aw_col, aw_len;
  addr_t aw_row_addr;
  logic [31:0] aw_count, b_count;

  // fetch side
  logic  f_active;
  dim_t  f_row, f_col;
  logic  f_inflight;
  fp16_t fifo [FDEPTH];
  logic [1:0] f_wp, f_rp;
  logic [2:0] f_occ;
  logic  f_issue, f_push, f_pop;

  // data side
  logic  w_active;
  dim_t  w_row, w_col, w_beat, w_len;
  addr_t w_row_addr;

  assign busy = active || done;

  // ---------------- address side ----------------
  assign awaddr  = aw_row_addr + addr_t'({aw_col, 1'b0});
  assign aw_len  = burst_beats(awaddr, cols_q - aw_col, MAXB);
  assign awlen   = 8'(aw_len - 1'b1);
  assign awsize  = AXI_SIZE_2B;
  assign awburst = AXI_BURST_INCR;
  assign awvalid = aw_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_active <= 1'b0; aw_row <= '0; aw_col <= '0; aw_row_addr <= '0;
      rows_q <= '0; cols_q <= '0; row_step <= '0; aw_count <= '0;
    end else if (start && !busy) begin
      aw_active <= 1'b1; aw_row <= '0; aw_col <= '0; aw_row_addr <= base;
      rows_q <= rows; cols_q <= cols; row_step <= addr_t'(stride) << 1;
      aw_count <= '0;
    end else if (awvalid && awready) begin
      aw_count <= aw_count + 1;
      if (aw_col + aw_len >= cols_q) begin
        aw_col <= '0;
        aw_row <= aw_row + 1'b1;
        aw_row_addr <= aw_row_addr + row_step;
        if (aw_row == rows_q - 1) aw_active <= 1'b0;
      end else begin
        aw_col <= aw_col + aw_len;
      end
    end
  end

  // ---------------- fetch side ----------------
  assign f_issue = f_active && (32'(f_occ) + 32'(f_inflight) < FDEPTH);
  assign rd_en   = f_issue;
  assign rd_row  = f_row;
  assign rd_col  = f_col;
  assign f_push  = f_inflight;
  assign f_pop   = wvalid && wready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_active <= 1'b0; f_row <= '0; f_col <= '0; f_inflight <= 1'b0;
      f_wp <= '0; f_rp <= '0; f_occ <= '0;
    end else begin
      f_inflight <= f_issue;
      if (start && !busy) begin
        f_active <= 1'b1; f_row <= '0; f_col <= '0;
        f_wp <= '0; f_rp <= '0; f_occ <= '0;
      end else if (f_issue) begin
        if (f_col == cols_q - 1) begin
          f_col <= '0;
          f_row <= f_row + 1'b1;
          if (f_row == rows_q - 1) f_active <= 1'b0;
        end else begin
          f_col <= f_col + 1'b1;
        end
      end
      if (f_push) f_wp <= f_wp + 1'b1;
      if (f_pop)  f_rp <= f_rp + 1'b1;
      f_occ <= f_occ + 3'(f_push) - 3'(f_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (f_push) fifo[f_wp] <= rd_data;
  end

  // ---------------- data side ----------------
  assign wvalid = w_active && (f_occ != 0);
  assign wdata  = fifo[f_rp];
  assign wstrb  = 2'b11;
  assign wlast  = (w_beat == w_len - 1);

  always_comb begin
    w_len = burst_beats(w_row_addr + addr_t'({w_col - w_beat, 1'b0}),
                        cols_q - (w_col - w_beat), MAXB);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_active <= 1'b0; w_row <= '0; w_col <= '0; w_beat <= '0; w_row_addr <= '0;
    end else if (start && !busy) begin
      w_active <= 1'b1; w_row <= '0; w_col <= '0; w_beat <= '0; w_row_addr <= base;
    end else if (f_pop) begin
      w_beat <= wlast ? '0 : w_beat + 1'b1;
      if (w_col == cols_q - 1) begin
        w_col <= '0;
        w_row <= w_row + 1'b1;
        w_row_addr <= w_row_addr + row_step;
        if (w_row == rows_q - 1) w_active <= 1'b0;
      end else begin
        w_col <= w_col + 1'b1;
      end
    end
  end

  // ---------------- response side ----------------
  assign bready = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; b_count <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        active <= 1'b1;
        b_count <= '0;
      end else if (active) begin
        if (bvalid && bready) b_count <= b_count + 1;
        if (!aw_active && !w_active &&
            (b_count + 32'(bvalid && bready)) == aw_count) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  a_aw_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                 (awvalid && !awready) |=> (awvalid && $stable(awaddr) && $stable(awlen)));
  a_w_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                (wvalid && !wready) |=> (wvalid && $stable(wdata) && $stable(wlast)));

endmodule
