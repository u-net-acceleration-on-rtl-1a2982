// Shared types and helpers of the tiled FP16 matrix-multiply engine.
//
// The engine computes Y = W x X (+ bias) with IEEE binary16 (FP16) data, the
// number format the accelerator uses for weights, inputs and outputs. All
// matrices live in a byte-addressed DRAM reached over AXI4 masters whose data
// bus is one FP16 element wide (16 bits, one element per beat).
//
// burst_beats() gives the length of the next AXI4 INCR burst when walking a row
// of contiguous FP16 elements: at most `remaining`, at most `max_burst` beats,
// and never across a 4 KiB address boundary (an AXI4 rule). Loaders and the
// writer use the same function so that address and data sides agree.
package mm_pkg;

  typedef logic [15:0] fp16_t;

  localparam int unsigned ADDR_W = 32;   // PS-PL AXI address width (Zynq-7000)
  localparam int unsigned DIM_W  = 16;   // width of M, K, N and tile counters

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DIM_W-1:0]  dim_t;

  // AXI4 constants used by the masters
  localparam logic [2:0] AXI_SIZE_2B = 3'd1;   // 2 bytes per beat
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;

  // Number of beats of the next burst starting at byte address `addr`.
  function automatic dim_t burst_beats(input addr_t addr, input dim_t remaining,
                                       input dim_t max_burst);
    logic [12:0] bytes_to_4k;
    dim_t        to_4k;
    dim_t        n;
    bytes_to_4k = 13'd4096 - {1'b0, addr[11:0]};
    to_4k = dim_t'(bytes_to_4k[12:1]);
    n = remaining;
    if (n > max_burst) n = max_burst;
    if (n > to_4k)     n = to_4k;
    return n;
  endfunction

endpackage
