// Self-checking test of tile_ram: random per-lane writes and reads against a
// model array; checks the one-clock read latency, lane enables, and that a read
// and a write of the same address in one clock return the old word.
module tile_ram_tb;
  localparam int DEPTH = 16, LANES = 4;

  logic clk = 1'b0;
  logic [LANES-1:0] wr_en;
  logic [3:0] wr_addr, rd_addr;
  logic [LANES-1:0][15:0] wr_data, rd_data;
  logic rd_en;
  logic [LANES-1:0][15:0] model [DEPTH];
  logic [LANES-1:0][15:0] expect_q;
  logic expect_v;
  int checks = 0, failures = 0;

  tile_ram #(.DEPTH(DEPTH), .LANES(LANES)) dut (.clk, .wr_en, .wr_addr, .wr_data,
                                                .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = '0; rd_en = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0; expect_v = 1'b0;
    // initialise every word through the write port
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = '1; wr_addr = 4'(i); wr_data = {$urandom, $urandom};
      model[i] = wr_data;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check the word read in the previous clock
      if (expect_v) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %h expected %h", t, rd_data, expect_q);
        end
      end
      rd_en   = 1'($urandom_range(3) != 0);
      rd_addr = 4'($urandom);
      wr_en   = 4'($urandom);
      wr_addr = (t % 7 == 0) ? rd_addr : 4'($urandom);   // force same-address clocks
      wr_data = {$urandom, $urandom};
      expect_v = rd_en;
      expect_q = model[rd_addr];                          // old contents
      for (int l = 0; l < LANES; l++)
        if (wr_en[l]) model[wr_addr][l] = wr_data[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
