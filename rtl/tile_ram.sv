// On-chip tile buffer (block RAM) of the matrix-multiply engine.
//
// The engine holds one weight tile, one input tile, one output tile (the
// running partial sums) and the bias slice of the current output rows in
// buffers like this one. Their sizes follow the tile sizes, not the matrix
// sizes, so any M, K, N runs through the same buffers.
//
// Each word holds LANES FP16 elements side by side. One write port with a
// per-lane write enable lets a memory loader fill single elements arriving one
// per AXI beat, while the compute lanes read and write whole words. One read
// port returns the word at rd_addr one clock after it is presented (registered
// output, as a block RAM does). A read and a write of the same address in the
// same clock return the old contents (read-before-write); the compute array
// forwards around that case itself. Contents are not reset.
module tile_ram
  import mm_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned LANES = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic [LANES-1:0]        wr_en,     // one enable per lane
  input  logic [AW-1:0]           wr_addr,
  input  fp16_t [LANES-1:0]       wr_data,
  input  logic                    rd_en,
  input  logic [AW-1:0]           rd_addr,
  output fp16_t [LANES-1:0]       rd_data
);

  fp16_t [LANES-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      if (wr_en[l]) mem[wr_addr][l] <= wr_data[l];
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
