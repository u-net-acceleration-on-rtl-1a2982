// Self-checking test of mmio_regs through its AXI4-Lite port: every register is
// written and read back, byte strobes are honoured, unmapped offsets read 0,
// the engine-side outputs follow the registers, and the CTRL register's start,
// busy, done and idle bits behave: start pulses for one clock, is refused while
// busy, done is set by the engine and cleared by the next start.
module mmio_regs_tb;
  import mm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [5:0] s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic start, bias_en, busy, done;
  addr_t w_addr, x_addr, b_addr, y_addr;
  dim_t dim_m, dim_k, dim_n;
  int checks = 0, failures = 0, starts = 0;

  mmio_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [5:0] a, input logic [31:0] d, input logic [3:0] st = 4'hF);
    @(negedge clk);
    s_awvalid = 1'b1; s_awaddr = a; s_wvalid = 1'b1; s_wdata = d; s_wstrb = st;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk);
    s_awvalid = 1'b0; s_wvalid = 1'b0;
    while (!s_bvalid) @(negedge clk);
    check("bresp", 32'(s_bresp), 0);
    @(negedge clk);
  endtask

  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1'b1; s_araddr = a;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 1'b0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic [31:0] vals [9];
    s_awvalid = 0; s_wvalid = 0; s_arvalid = 0; s_awaddr = 0; s_araddr = 0;
    s_wdata = 0; s_wstrb = 0; s_bready = 1; s_rready = 1; busy = 0; done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(6'h00, d); check("idle after reset", d, 32'h4);
    for (int i = 1; i < 9; i++) begin
      vals[i] = $urandom;
      wr(6'(4*i), vals[i]);
    end
    vals[8] = {31'd0, vals[8][0]} | (vals[8] & 32'hFFFFFFFE);
    for (int i = 1; i < 9; i++) begin
      rd(6'(4*i), d); check($sformatf("reg %0d", i), d, vals[i]);
    end
    check("w_addr", w_addr, vals[1]);
    check("x_addr", x_addr, vals[2]);
    check("b_addr", b_addr, vals[3]);
    check("y_addr", y_addr, vals[4]);
    check("M", 32'(dim_m), {16'd0, vals[5][15:0]});
    check("K", 32'(dim_k), {16'd0, vals[6][15:0]});
    check("N", 32'(dim_n), {16'd0, vals[7][15:0]});
    check("bias_en", 32'(bias_en), 32'(vals[8][0]));
    // byte strobes
    wr(6'h14, 32'hAABBCCDD, 4'b0010);
    rd(6'h14, d); check("strobe", d, {vals[5][31:16], 8'hCC, vals[5][7:0]});
    rd(6'h30, d); check("unmapped", d, 0);
    // start / busy / done
    wr(6'h00, 32'h1);
    check("one start pulse", starts, 1);
    busy = 1'b1;
    rd(6'h00, d); check("busy", d, 32'h1);
    wr(6'h00, 32'h1);
    check("start refused while busy", starts, 1);
    @(negedge clk); busy = 1'b0; done = 1'b1;
    @(negedge clk); done = 1'b0;
    rd(6'h00, d); check("done, idle", d, 32'h6);
    wr(6'h00, 32'h1);
    check("second start", starts, 2);
    rd(6'h00, d); check("done cleared", d, 32'h4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
