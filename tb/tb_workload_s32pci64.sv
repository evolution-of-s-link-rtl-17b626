// tb_workload_s32pci64: throughput sweep of one channel driven one block at
// a time, the way the single-card measurements were made: for every event
// the host posts one request (two writes), polls the status register until
// the message is there and reads it (three reads); the link source sends
// events of 16 to 4096 bytes back to back; the Input Buffer holds what
// arrives before its request.  Per size the rate in bytes per clock is printed; it
// must grow with the event size and, for 4096-byte events, reach 75% of the
// link's 4 bytes per clock.  All data is checked.
module tb_workload_s32pci64;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        ld_valid, ld_ctrl, ld_xoff, ld_utdo, ld_ureset;
  logic [31:0] ld_data;
  logic        ld_down = 1'b0;
  logic [3:0]  ld_url;
  logic        reg_wr = 0, reg_rd = 0;
  logic [4:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        dma_req, dma_start, dma_rd, dma_done;
  logic [31:0] dma_addr;
  logic [10:0] dma_nbytes;
  logic [63:0] dma_rdata;
  logic        irq, en, block_done;
  logic [7:0]  stall_pct = 8'd0;
  logic        wr_valid;
  logic [31:0] wr_addr;
  logic [63:0] wr_data;
  logic [1:0]  wr_chan;
  int          bursts, max_burst, xoff_cycles;

  s32pci64_core dut (.*);

  slidas_model u_src (.clk, .xoff (ld_xoff), .valid (ld_valid), .ctrl (ld_ctrl),
                      .data (ld_data), .xoff_cycles);
  pci_dma_model #(.START_LAT(2)) u_dma (
    .clk, .rst_n, .stall_pct, .dma_req, .dma_addr, .dma_nbytes, .dma_chan (2'd0),
    .dma_start, .dma_rd, .dma_rdata, .dma_done,
    .wr_valid, .wr_addr, .wr_data, .wr_chan, .bursts, .max_burst_bytes (max_burst)
  );

  logic [63:0] mem [logic [31:0]];
  always @(posedge clk) if (wr_valid) mem[wr_addr] = wr_data;
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1; reg_addr = a;
    @(negedge clk); reg_rd = 0; d = reg_rdata;
  endtask

  localparam int K = 8;
  int sizes [6] = '{16, 64, 256, 1024, 2048, 4096};
  real prev_rate = 0.0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wr(REG_CTRL, 32'h1);
    for (int si = 0; si < 6; si++) begin
      int sz, t0, bad;
      real rate;
      sz = sizes[si];
      bad = 0;
      t0 = cycle;
      fork
        for (int k = 0; k < K; k++)
          u_src.send_packet(32'hB000_0000 | 32'(k), 32'hE000_0000 | 32'(k), sz / 4,
                            32'(sz << 16) + 32'(k << 12));
        for (int k = 0; k < K; k++) begin
          logic [31:0] s, b, e, l;
          wr(REG_REQ_ADDR, 32'h2000_0000 + 32'(k << 13));
          wr(REG_REQ_LEN, 32'd8192);
          do rd(REG_STATUS, s); while (s[13:8] == 0);
          rd(REG_ACK_BEG, b); rd(REG_ACK_END, e); rd(REG_ACK_LEN, l);
          if (b != (32'hB000_0000 | 32'(k)) || e != (32'hE000_0000 | 32'(k)) || l != 32'(sz)) bad++;
        end
      join
      rate = real'(K * sz) / real'(cycle - t0);
      $display("workload event_bytes=%0d bytes_per_clock=%0.2f", sz, rate);
      check(rate > prev_rate, $sformatf("%0d bytes: rate grows with event size", sz));
      prev_rate = rate;
      for (int k = 0; k < K; k++)
        for (int j = 0; j < sz / 4; j += 2) begin
          logic [31:0] a, base;
          a = 32'h2000_0000 + 32'(k << 13) + 32'(j * 4);
          base = 32'(sz << 16) + 32'(k << 12) + 32'(j);
          if (!mem.exists(a) || mem[a] != {base + 1, base}) bad++;
        end
      check(bad == 0, $sformatf("%0d bytes: messages and data", sz));
    end
    check(prev_rate >= 0.75 * 4.0, "4096-byte events near the link rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
