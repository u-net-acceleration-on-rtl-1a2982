// Behavioural DRAM with one AXI4 slave port (16-bit data), for testbenches only.
//
// mem[] holds 16-bit words; word i is at byte address 2*i. Read and write
// address requests are queued (several may be outstanding); read bursts are
// answered in order. STALL_PCT sets how often, in percent, each ready/valid
// the model drives is held low in a clock, to exercise back-pressure. The model
// counts bursts, 4 KiB boundary crossings (a protocol error), wlast errors and
// the largest number of read bursts outstanding at once.
module axi_mem_model #(
  parameter int unsigned MEM_WORDS = 65536,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        arvalid,
  output logic        arready,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  output logic        rvalid,
  input  logic        rready,
  output logic [15:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic [2:0]  awsize,
  input  logic [1:0]  awburst,
  input  logic        wvalid,
  output logic        wready,
  input  logic [15:0] wdata,
  input  logic [1:0]  wstrb,
  input  logic        wlast,
  output logic        bvalid,
  input  logic        bready,
  output logic [1:0]  bresp
);

  logic [15:0] mem [MEM_WORDS];

  int unsigned ar_q_addr[$], ar_q_len[$];
  int unsigned aw_q_addr[$], aw_q_len[$];
  int unsigned r_beat, w_beat, b_pending;
  int unsigned rd_bursts, wr_bursts, cross_4k, wlast_err, bad_size, max_outst, long_bursts;

  function automatic logic go();
    return ($urandom_range(99) >= STALL_PCT);
  endfunction

  initial begin
    rd_bursts = 0; wr_bursts = 0; cross_4k = 0; wlast_err = 0; bad_size = 0;
    max_outst = 0; long_bursts = 0; r_beat = 0; w_beat = 0; b_pending = 0;
  end

  assign rresp = 2'b00;
  assign bresp = 2'b00;

  // address channels
  always @(posedge clk) begin
    if (!rst_n) begin
      arready <= 1'b0;
      awready <= 1'b0;
    end else begin
      if (arvalid && arready) begin
        ar_q_addr.push_back(araddr);
        ar_q_len.push_back(int'(arlen) + 1);
        rd_bursts++;
        if (int'(arlen) + 1 >= 16) long_bursts++;
        if ((araddr & 32'hFFF) + (int'(arlen) + 1) * 2 > 4096) cross_4k++;
        if (arsize != 3'd1 || arburst != 2'b01) bad_size++;
        if (ar_q_addr.size() > max_outst) max_outst = ar_q_addr.size();
      end
      if (awvalid && awready) begin
        aw_q_addr.push_back(awaddr);
        aw_q_len.push_back(int'(awlen) + 1);
        wr_bursts++;
        if ((awaddr & 32'hFFF) + (int'(awlen) + 1) * 2 > 4096) cross_4k++;
        if (awsize != 3'd1 || awburst != 2'b01) bad_size++;
      end
      arready <= go();
      awready <= go();
    end
  end

  // read data
  always @(posedge clk) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rlast  <= 1'b0;
      rdata  <= '0;
      r_beat = 0;
    end else begin
      if (rvalid && rready) begin
        r_beat++;
        if (rlast) begin
          void'(ar_q_addr.pop_front());
          void'(ar_q_len.pop_front());
          r_beat = 0;
        end
      end
      if ((!rvalid || rready) && ar_q_addr.size() > 0 && go()) begin
        rvalid <= 1'b1;
        rdata  <= mem[(ar_q_addr[0] >> 1) + r_beat];
        rlast  <= (r_beat == ar_q_len[0] - 1);
      end else if (rvalid && rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  // write data and responses
  always @(posedge clk) begin
    if (!rst_n) begin
      wready <= 1'b0;
      bvalid <= 1'b0;
      w_beat = 0;
    end else begin
      if (wvalid && wready) begin
        if (aw_q_addr.size() == 0) wlast_err++;
        else begin
          mem[(aw_q_addr[0] >> 1) + w_beat] <= wdata;
          if (wlast != (w_beat == aw_q_len[0] - 1)) wlast_err++;
          w_beat++;
          if (w_beat == aw_q_len[0]) begin
            void'(aw_q_addr.pop_front());
            void'(aw_q_len.pop_front());
            w_beat = 0;
            b_pending++;
          end
        end
      end
      wready <= (aw_q_addr.size() > 0) && go();
      if (bvalid && bready) bvalid <= 1'b0;
      else if (!bvalid && b_pending > 0 && go()) begin
        bvalid <= 1'b1;
        b_pending--;
      end
    end
  end

endmodule
