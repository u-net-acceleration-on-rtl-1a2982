// Self-checking test of axi_tile_writer against the behavioural AXI memory with
// random back-pressure on AW, W and B. A modelled tile buffer (one-clock read
// latency) holds random data; after `done` every element must be in DRAM at
// base + 2*(r*stride + c), the words between rows must be untouched, wlast must
// close every burst, burst counts must match an independent count, and no
// burst may cross 4 KiB.
module axi_tile_writer_tb;
  import mm_pkg::*;

  localparam int MAXB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  addr_t base;
  dim_t rows, cols, stride;
  logic rd_en;
  dim_t rd_row, rd_col;
  fp16_t rd_data;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  addr_t awaddr;
  logic [7:0] awlen;
  logic [2:0] awsize;
  logic [1:0] awburst, wstrb, bresp;
  fp16_t wdata;
  logic arready_nc, rvalid_nc, rlast_nc;
  logic [15:0] rdata_nc;
  logic [1:0] rresp_nc;

  fp16_t tile [8][64];
  int checks = 0, failures = 0;

  axi_tile_writer #(.MAX_BURST(MAXB)) dut (.*);

  axi_mem_model #(.MEM_WORDS(8192), .STALL_PCT(30)) u_mem (
    .clk, .rst_n, .arvalid(1'b0), .arready(arready_nc), .araddr(32'd0), .arlen(8'd0),
    .arsize(3'd1), .arburst(2'b01), .rvalid(rvalid_nc), .rready(1'b1), .rdata(rdata_nc),
    .rresp(rresp_nc), .rlast(rlast_nc),
    .awvalid, .awready, .awaddr, .awlen, .awsize, .awburst,
    .wvalid, .wready, .wdata, .wstrb, .wlast, .bvalid, .bready, .bresp
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rd_en) rd_data <= tile[rd_row][rd_col];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int b, input int r, input int c, input int s, output int cyc);
    int exp_bursts, bursts0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 64; j++) tile[i][j] = 16'($urandom);
    for (int i = 0; i < 8192; i++) u_mem.mem[i] = 16'hDEAD;
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
    bursts0 = u_mem.wr_bursts;
    @(negedge clk);
    base = addr_t'(b); rows = dim_t'(r); cols = dim_t'(c); stride = dim_t'(s); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int i = 0; i < r; i++) begin
      for (int j = 0; j < c; j++) begin
        checks++;
        if (u_mem.mem[b/2 + i*s + j] !== tile[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %h expected %h",
                                      i, j, u_mem.mem[b/2 + i*s + j], tile[i][j]);
        end
      end
      if (s > c) begin
        checks++;
        if (u_mem.mem[b/2 + i*s + c] !== 16'hDEAD) begin
          failures++;
          $display("FAIL word after row %0d overwritten", i);
        end
      end
    end
    checks++;
    if (int'(u_mem.wr_bursts) - bursts0 != exp_bursts) begin
      failures++;
      $display("FAIL bursts %0d expected %0d", int'(u_mem.wr_bursts) - bursts0, exp_bursts);
    end
  endtask

  initial begin
    int cyc;
    start = 1'b0; base = '0; rows = '0; cols = '0; stride = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32'h0100, 3, 20, 37, cyc);
    run(32'h0FF0, 4, 21, 50, cyc);
    run(32'h0002, 1, 1, 5, cyc);
    run(32'h1FFE, 2, 64, 64, cyc);
    checks++;
    if (u_mem.cross_4k != 0 || u_mem.wlast_err != 0 || u_mem.bad_size != 0) begin
      failures++;
      $display("FAIL 4KiB crossings %0d, wlast errors %0d, bad size %0d",
               u_mem.cross_4k, u_mem.wlast_err, u_mem.bad_size);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
