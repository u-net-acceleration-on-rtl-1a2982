// Self-checking test of fp16_fma: hand-worked constants, special values, and
// random operands over the whole FP16 range, all compared with the real-number
// reference in fp16_ref_pkg. The unit is combinational; the testbench applies
// one vector per clock.
module fp16_fma_tb;
  import fp16_ref_pkg::*;

  logic        clk = 1'b0;
  logic [15:0] a, b, c, y;
  int checks = 0, failures = 0, cycles = 0;

  fp16_fma dut (.a, .b, .c, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, tb_, tc, input logic [15:0] exp_y);
    a = ta; b = tb_; c = tc;
    @(posedge clk); #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h c=%h got %h expected %h", ta, tb_, tc, y, exp_y);
    end
  endtask

  task automatic apply_ref(input logic [15:0] ta, tb_, tc);
    apply(ta, tb_, tc, ref_fma(ta, tb_, tc));
  endtask

  initial begin
    // worked by hand
    apply(16'h4000, 16'h4200, 16'h3C00, 16'h4700);  // 2*3 + 1 = 7
    apply(16'h3C00, 16'h3C00, 16'h0000, 16'h3C00);  // 1*1 + 0 = 1
    apply(16'h3C00, 16'h1000, 16'h3C00, 16'h3C00);  // 1 + 2^-11: tie, stays even
    apply(16'h3C00, 16'h1200, 16'h3C00, 16'h3C01);  // 1 + 0.75 ulp rounds up
    apply(16'h3C01, 16'h1000, 16'h3C00, 16'h3C01);  // 1 + 2^-11 + 2^-21: above the tie, up
    apply(16'h7BFF, 16'h4000, 16'h0000, 16'h7C00);  // 65504*2 overflows
    apply(16'h0001, 16'h3C00, 16'h0001, 16'h0002);  // subnormal + subnormal
    apply(16'h0001, 16'h3800, 16'h0000, 16'h0000);  // 2^-25: tie to even 0
    apply(16'h0001, 16'h3A00, 16'h0000, 16'h0001);  // 0.75*2^-24 rounds up
    apply(16'h3C00, 16'h3C00, 16'hBC00, 16'h0000);  // 1 - 1 = +0
    apply(16'h8000, 16'h3C00, 16'h8000, 16'h8000);  // -0 + -0 = -0
    apply(16'h7C00, 16'h0000, 16'h3C00, 16'h7E00);  // inf * 0 = NaN
    apply(16'h7C00, 16'h3C00, 16'hFC00, 16'h7E00);  // inf - inf = NaN
    apply(16'h7C00, 16'hBC00, 16'h3C00, 16'hFC00);  // -inf
    apply(16'h3C00, 16'h3C00, 16'hFC00, 16'hFC00);  // finite + -inf
    apply(16'h7E01, 16'h3C00, 16'h3C00, 16'h7E00);  // NaN in
    // the hand-worked ones against the reference, to cross-check it
    apply_ref(16'h4000, 16'h4200, 16'h3C00);
    apply_ref(16'h3C01, 16'h1000, 16'h3C00);
    // random: normal range, full range with subnormals, and cancellation
    for (int i = 0; i < 20000; i++)
      apply_ref(rand_f16(1, 30), rand_f16(1, 30), rand_f16(1, 30));
    for (int i = 0; i < 20000; i++)
      apply_ref(rand_f16(0, 20), rand_f16(0, 20), rand_f16(0, 12));
    for (int i = 0; i < 10000; i++) begin
      logic [15:0] ta, tb_, tc;
      ta = rand_f16(10, 20); tb_ = rand_f16(10, 20);
      tc = ref_fma(ta, tb_, 16'h0000);
      tc = {~tc[15], tc[14:0] ^ 15'(($urandom_range(3)))};
      apply_ref(ta, tb_, tc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
