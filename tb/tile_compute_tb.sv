// Self-checking test of tile_compute with small tiles (TILE_M=4, TILE_N=8,
// TILE_K=3, LANES=4). The testbench models the four tile buffers (one-clock
// read latency, read-before-write) and runs: a full tile seeded with bias, the
// next K tile accumulating on top, a tile seeded with zero, a partial tile, and
// a one-word tile where each step reads the word the previous step wrote
// (forwarding). Results are compared with a sequential FP16 reference, and the
// clock count of every run with tk*tm*ceil(tn/LANES) + 2.
module tile_compute_tb;
  import mm_pkg::*;
  import fp16_ref_pkg::*;

  localparam int TM = 4, TN = 8, TK = 3, L = 4, NG = TN / L;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, first_k, bias_en, busy, done, fwd_hit;
  dim_t tm, tn, tk;
  logic w_rd_en, x_rd_en, b_rd_en, o_rd_en;
  logic [3:0] w_rd_addr;
  logic [2:0] x_rd_addr;
  logic [1:0] b_rd_addr;
  logic [2:0] o_rd_addr, o_wr_addr;
  fp16_t w_rd_data, b_rd_data;
  fp16_t [L-1:0] x_rd_data, o_rd_data, o_wr_data;
  logic [L-1:0] o_wr_en;

  fp16_t wmem [TK*TM];
  fp16_t [L-1:0] xmem [TK*NG];
  fp16_t bmem [TM];
  fp16_t [L-1:0] omem [TM*NG];

  int checks = 0, failures = 0, fwd_count = 0;

  tile_compute #(.TILE_M(TM), .TILE_N(TN), .TILE_K(TK), .LANES(L)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (w_rd_en) w_rd_data <= wmem[w_rd_addr];
    if (x_rd_en) x_rd_data <= xmem[x_rd_addr];
    if (b_rd_en) b_rd_data <= bmem[b_rd_addr];
    if (o_rd_en) o_rd_data <= omem[o_rd_addr];
    for (int l = 0; l < L; l++) if (o_wr_en[l]) omem[o_wr_addr][l] <= o_wr_data[l];
    if (fwd_hit) fwd_count++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp16_t W(int k, int m); return wmem[k*TM + m]; endfunction
  function automatic fp16_t X(int k, int n); return xmem[k*NG + n/L][n%L]; endfunction

  task automatic run(input int rtm, rtn, rtk, input logic rfirst, rbias);
    fp16_t expv [TM][TN];
    int cyc;
    for (int m = 0; m < rtm; m++)
      for (int n = 0; n < rtn; n++) begin
        fp16_t acc;
        acc = rfirst ? (rbias ? bmem[m] : 16'h0000) : omem[m*NG + n/L][n%L];
        for (int k = 0; k < rtk; k++) acc = ref_fma(W(k, m), X(k, n), acc);
        expv[m][n] = acc;
      end
    @(negedge clk);
    tm = dim_t'(rtm); tn = dim_t'(rtn); tk = dim_t'(rtk); first_k = rfirst; bias_en = rbias;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != rtk * rtm * ((rtn + L - 1) / L) + 2) begin
      failures++;
      $display("FAIL cycles %0d for tm=%0d tn=%0d tk=%0d", cyc, rtm, rtn, rtk);
    end
    @(negedge clk);
    for (int m = 0; m < rtm; m++)
      for (int n = 0; n < rtn; n++) begin
        checks++;
        if (omem[m*NG + n/L][n%L] !== expv[m][n]) begin
          failures++;
          if (failures < 20)
            $display("FAIL m=%0d n=%0d got %h expected %h", m, n, omem[m*NG + n/L][n%L], expv[m][n]);
        end
      end
  endtask

  task automatic fill();
    for (int i = 0; i < TK*TM; i++) wmem[i] = rand_f16(10, 17);
    for (int i = 0; i < TK*NG; i++)
      for (int l = 0; l < L; l++) xmem[i][l] = rand_f16(10, 17);
    for (int i = 0; i < TM; i++) bmem[i] = rand_f16(12, 18);
  endtask

  initial begin
    start = 1'b0; first_k = 1'b0; bias_en = 1'b0; tm = '0; tn = '0; tk = '0;
    for (int i = 0; i < TM*NG; i++) omem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fill(); run(TM, TN, TK, 1'b1, 1'b1);   // full tile, bias seed
    fill(); run(TM, TN, TK, 1'b0, 1'b1);   // next K tile accumulates
    fill(); run(TM, TN, TK, 1'b1, 1'b0);   // zero seed
    fill(); run(3, 6, 2, 1'b1, 1'b1);      // partial tile
    fill(); run(3, 6, 2, 1'b0, 1'b0);
    fill(); run(1, 3, 3, 1'b1, 1'b1);      // one word: forwarding
    fill(); run(1, 4, 3, 1'b0, 1'b0);
    checks++;
    if (fwd_count == 0) begin
      failures++;
      $display("FAIL forwarding never used");
    end
    $display("forwarding used %0d times", fwd_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
