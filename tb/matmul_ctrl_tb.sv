// Self-checking test of matmul_ctrl. The loaders, compute lanes and writer are
// replaced by responders that answer each start with `done` after a random
// delay. The testbench logs every command the sequencer issues and compares
// the log with the loop nest worked out here: M tiles outermost, N tiles, K
// tiles innermost; bias slice first when enabled; weight and input loads
// started in the same clock; compute after both loads; store after the last K
// tile; exact addresses, strides and edge-tile sizes. Zero-size runs must end
// without any command.
module matmul_ctrl_tb;
  import mm_pkg::*;

  localparam int TM = 8, TN = 16, TK = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, bias_en, busy, done;
  addr_t w_addr, x_addr, b_addr, y_addr;
  dim_t dim_m, dim_k, dim_n;
  logic ld0_start, ld0_bias, ld0_done, ld1_start, ld1_done;
  addr_t ld0_base, ld1_base, st_base;
  dim_t ld0_rows, ld0_cols, ld0_stride, ld1_rows, ld1_cols, ld1_stride;
  logic cmp_start, cmp_first, cmp_bias, cmp_done, st_start, st_done;
  dim_t cmp_tm, cmp_tn, cmp_tk, st_rows, st_cols, st_stride;

  string got_log[$], exp_log[$];
  int checks = 0, failures = 0, apart = 0;

  matmul_ctrl #(.TILE_M(TM), .TILE_N(TN), .TILE_K(TK)) dut (.*);

  always #5 clk = ~clk;

  // responders: done pulses a random 1..6 clocks after start
  int c0 = 0, c1 = 0, c2 = 0, c3 = 0;
  always @(posedge clk) begin
    c0 <= ld0_start ? $urandom_range(1, 6) : (c0 > 0 ? c0 - 1 : 0);
    c1 <= ld1_start ? $urandom_range(1, 6) : (c1 > 0 ? c1 - 1 : 0);
    c2 <= cmp_start ? $urandom_range(1, 6) : (c2 > 0 ? c2 - 1 : 0);
    c3 <= st_start  ? $urandom_range(1, 6) : (c3 > 0 ? c3 - 1 : 0);
    ld0_done <= (c0 == 1);
    ld1_done <= (c1 == 1);
    cmp_done <= (c2 == 1);
    st_done  <= (c3 == 1);
  end

  // phases must not overlap: compute only after both loads, store after compute
  int pend = 0, early = 0;
  always @(posedge clk) begin
    if ((cmp_start || st_start || ld0_start || ld1_start) && pend != 0) early++;
    pend = pend + int'(ld0_start) + int'(ld1_start) + int'(cmp_start) + int'(st_start)
                - int'(ld0_done) - int'(ld1_done) - int'(cmp_done) - int'(st_done);
  end

  // command log
  always @(posedge clk) begin
    if (ld0_start && ld0_bias)
      got_log.push_back($sformatf("B %h %0d %0d %0d", ld0_base, ld0_rows, ld0_cols, ld0_stride));
    if (ld0_start && !ld0_bias) begin
      got_log.push_back($sformatf("W %h %0d %0d %0d", ld0_base, ld0_rows, ld0_cols, ld0_stride));
      if (!ld1_start) apart++;
    end
    if (ld1_start)
      got_log.push_back($sformatf("X %h %0d %0d %0d", ld1_base, ld1_rows, ld1_cols, ld1_stride));
    if (cmp_start)
      got_log.push_back($sformatf("C %0d %0d %0d %0d %0d", cmp_tm, cmp_tn, cmp_tk, cmp_first, cmp_bias));
    if (st_start)
      got_log.push_back($sformatf("S %h %0d %0d %0d", st_base, st_rows, st_cols, st_stride));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction

  task automatic run(input int M, K, N, input logic be);
    int cyc;
    got_log.delete(); exp_log.delete();
    for (int m0 = 0; m0 < M; m0 += TM)
      for (int n0 = 0; n0 < N; n0 += TN) begin
        int tm, tn;
        tm = mn(TM, M - m0); tn = mn(TN, N - n0);
        if (be) exp_log.push_back($sformatf("B %h %0d %0d %0d", 32'h3000 + 2*m0, 1, tm, M));
        for (int k0 = 0; k0 < K; k0 += TK) begin
          int tk;
          tk = mn(TK, K - k0);
          exp_log.push_back($sformatf("W %h %0d %0d %0d", 32'h1000 + 2*(k0*M + m0), tk, tm, M));
          exp_log.push_back($sformatf("X %h %0d %0d %0d", 32'h2000 + 2*(k0*N + n0), tk, tn, N));
          exp_log.push_back($sformatf("C %0d %0d %0d %0d %0d", tm, tn, tk, k0 == 0, be));
        end
        exp_log.push_back($sformatf("S %h %0d %0d %0d", 32'h8000 + 2*(m0*N + n0), tm, tn, N));
      end
    @(negedge clk);
    w_addr = 32'h1000; x_addr = 32'h2000; b_addr = 32'h3000; y_addr = 32'h8000;
    dim_m = dim_t'(M); dim_k = dim_t'(K); dim_n = dim_t'(N); bias_en = be; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    repeat (10) @(negedge clk);
    checks++;
    if (got_log.size() != exp_log.size()) begin
      failures++;
      $display("FAIL M=%0d K=%0d N=%0d: %0d commands, expected %0d", M, K, N,
               got_log.size(), exp_log.size());
    end
    for (int i = 0; i < exp_log.size() && i < got_log.size(); i++) begin
      checks++;
      if (got_log[i] != exp_log[i]) begin
        failures++;
        if (failures < 10) $display("FAIL cmd %0d: got '%s' expected '%s'", i, got_log[i], exp_log[i]);
      end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    start = 0; bias_en = 0; w_addr = 0; x_addr = 0; b_addr = 0; y_addr = 0;
    dim_m = 0; dim_k = 0; dim_n = 0;
    ld0_done = 0; ld1_done = 0; cmp_done = 0; st_done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(8, 4, 16, 1'b1);      // exactly one tile
    run(20, 10, 37, 1'b1);    // edge tiles in every dimension
    run(5, 13, 40, 1'b0);     // no bias
    run(17, 1, 1, 1'b1);
    run(0, 4, 4, 1'b1);       // empty
    checks++;
    if (early != 0) begin
      failures++;
      $display("FAIL a phase started %0d times before the previous one ended", early);
    end
    checks++;
    if (apart != 0) begin
      failures++;
      $display("FAIL weight and input loads started apart %0d times", apart);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
