// Self-checking test of axi_tile_loader against the behavioural AXI memory with
// random back-pressure. Tiles with several rows, a row stride wider than the
// tile, rows that cross a 4 KiB boundary and rows longer than MAX_BURST (8 here)
// are read; every element written to the buffer port is compared with DRAM,
// each must arrive exactly once, the number of bursts must match an
// independent count, no burst may cross 4 KiB, and more than one burst must be
// outstanding at some point.
module axi_tile_loader_tb;
  import mm_pkg::*;

  localparam int MAXB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  addr_t base;
  dim_t rows, cols, stride;
  logic arvalid, arready, rvalid, rready, rlast;
  addr_t araddr;
  logic [7:0] arlen;
  logic [2:0] arsize;
  logic [1:0] arburst, rresp;
  fp16_t rdata;
  logic wr_en;
  dim_t wr_row, wr_col;
  fp16_t wr_data;

  logic awready_nc, wready_nc, bvalid_nc;
  logic [1:0] bresp_nc;

  int checks = 0, failures = 0;
  fp16_t got [8][64];
  int    hits [8][64];

  axi_tile_loader #(.MAX_BURST(MAXB)) dut (.*);

  axi_mem_model #(.MEM_WORDS(8192), .STALL_PCT(30)) u_mem (
    .clk, .rst_n, .arvalid, .arready, .araddr, .arlen, .arsize, .arburst,
    .rvalid, .rready, .rdata, .rresp, .rlast,
    .awvalid(1'b0), .awready(awready_nc), .awaddr(32'd0), .awlen(8'd0), .awsize(3'd1),
    .awburst(2'b01), .wvalid(1'b0), .wready(wready_nc), .wdata(16'd0), .wstrb(2'b11),
    .wlast(1'b0), .bvalid(bvalid_nc), .bready(1'b1), .bresp(bresp_nc)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (wr_en) begin
    got[wr_row][wr_col] <= wr_data;
    hits[wr_row][wr_col] <= hits[wr_row][wr_col] + 1;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int b, input int r, input int c, input int s);
    int exp_bursts, bursts0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 64; j++) hits[i][j] = 0;
    exp_bursts = 0;
    for (int i = 0; i < r; i++) begin
      int a, left, n;
      a = b + 2 * i * s; left = c;
      while (left > 0) begin
        n = (left < MAXB) ? left : MAXB;
        if (n > (4096 - (a % 4096)) / 2) n = (4096 - (a % 4096)) / 2;
        a += 2 * n; left -= n; exp_bursts++;
      end
    end
    bursts0 = u_mem.rd_bursts;
    @(negedge clk);
    base = addr_t'(b); rows = dim_t'(r); cols = dim_t'(c); stride = dim_t'(s); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < r; i++)
      for (int j = 0; j < c; j++) begin
        checks++;
        if (hits[i][j] != 1 || got[i][j] !== u_mem.mem[b/2 + i*s + j]) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) hits %0d got %h expected %h",
                                      i, j, hits[i][j], got[i][j], u_mem.mem[b/2 + i*s + j]);
        end
      end
    checks++;
    if (int'(u_mem.rd_bursts) - bursts0 != exp_bursts) begin
      failures++;
      $display("FAIL bursts %0d expected %0d", int'(u_mem.rd_bursts) - bursts0, exp_bursts);
    end
  endtask

  initial begin
    start = 1'b0; base = '0; rows = '0; cols = '0; stride = '0;
    for (int i = 0; i < 8192; i++) u_mem.mem[i] = 16'(i * 7 + 3);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32'h0100, 3, 20, 37);          // rows split at MAX_BURST
    run(32'h0FF0, 4, 21, 50);          // crosses the 4 KiB boundary
    run(32'h0002, 1, 5, 5);            // one short row
    run(32'h1FFE, 2, 64, 64);          // single-beat burst before a boundary
    checks++;
    if (u_mem.cross_4k != 0 || u_mem.bad_size != 0) begin
      failures++;
      $display("FAIL 4KiB crossings %0d, bad size/burst %0d", u_mem.cross_4k, u_mem.bad_size);
    end
    checks++;
    if (u_mem.max_outst < 2) begin
      failures++;
      $display("FAIL never more than one burst outstanding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
