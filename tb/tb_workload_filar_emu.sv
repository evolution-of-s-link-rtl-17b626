// tb_workload_filar_emu: throughput sweep of the four-channel card in
// emulator mode, at full size: 1, 2, 3 and 4 channels enabled, events of
// 64 to 4096 bytes, eight events per point sent back to back on link 0.
// Every event must arrive, with its data, in every enabled channel.  The
// aggregate rate (bytes into host memory per clock) is printed per point and
// checked against the two limits of this model: the link delivers 4 bytes
// per clock, copied to each channel, and the single DMA engine writes at
// most 8 bytes per clock.  For events of 1 Kbyte and more the measured rate
// must reach 75% of min(4 x channels, 8).
module tb_workload_filar_emu;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        emu_mode = 1'b1;
  logic [3:0]  ld_valid, ld_ctrl, ld_xoff, ld_utdo, ld_ureset;
  logic [3:0]  ld_down = '0;
  logic [31:0] ld_data [4];
  logic [3:0]  ld_url [4];
  logic [7:0]  temperature = 8'd30;
  logic        reg_wr = 0, reg_rd = 0;
  logic [7:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        dma_req, dma_start, dma_rd, dma_done, irq;
  logic [31:0] dma_addr;
  logic [10:0] dma_nbytes;
  logic [1:0]  dma_chan;
  logic [63:0] dma_rdata;
  logic [3:0]  ch_enabled, ch_block_done;

  filar dut (.*);

  logic [7:0]  stall_pct = 8'd0;
  logic        wr_valid;
  logic [31:0] wr_addr;
  logic [63:0] wr_data;
  logic [1:0]  wr_chan;
  int          bursts, max_burst, xc;

  pci_dma_model #(.START_LAT(2)) u_dma (
    .clk, .rst_n, .stall_pct, .dma_req, .dma_addr, .dma_nbytes, .dma_chan,
    .dma_start, .dma_rd, .dma_rdata, .dma_done,
    .wr_valid, .wr_addr, .wr_data, .wr_chan, .bursts, .max_burst_bytes (max_burst)
  );

  slidas_model u_src (.clk, .xoff (ld_xoff[0]), .valid (ld_valid[0]), .ctrl (ld_ctrl[0]),
                      .data (ld_data[0]), .xoff_cycles (xc));
  assign ld_valid[3:1] = '0;
  assign ld_ctrl[3:1]  = '0;
  assign ld_data[1] = '0;
  assign ld_data[2] = '0;
  assign ld_data[3] = '0;

  logic [63:0] mem [logic [31:0]];
  always @(posedge clk) if (wr_valid) mem[wr_addr] = wr_data;

  int blocks_seen = 0;
  int last_done_cycle = 0, cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (ch_block_done != 0) begin
      blocks_seen += $countones(ch_block_done);
      last_done_cycle = cycle;
    end
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1; reg_addr = a;
    @(negedge clk); reg_rd = 0; d = reg_rdata;
  endtask
  function automatic logic [7:0] ra(input int ch, input logic [4:0] off);
    return 8'(ch << 5) | 8'(off);
  endfunction
  function automatic logic [31:0] buf_addr(input int ch, input int k);
    return 32'h4000_0000 + 32'(ch << 24) + 32'(k << 13);
  endfunction

  localparam int K = 8;
  int sizes [6] = '{64, 256, 512, 1024, 2048, 4096};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= 4; n++) begin
      for (int si = 0; si < 6; si++) begin
        int sz, t0, b0, bad;
        real rate, ideal;
        logic [31:0] b, e, l;
        sz = sizes[si];
        for (int ch = 0; ch < 4; ch++) begin
          wr(ra(ch, REG_CTRL), (ch < n) ? 32'h1 : 32'h0);
          if (ch < n) for (int k = 0; k < K; k++) begin
            wr(ra(ch, REG_REQ_ADDR), buf_addr(ch, k));
            wr(ra(ch, REG_REQ_LEN), 32'd8192);
          end
        end
        b0 = blocks_seen;
        t0 = cycle;
        for (int k = 0; k < K; k++)
          u_src.send_packet(32'hB000_0000 | 32'(k), 32'hE000_0000 | 32'(k), sz / 4,
                            32'(sz << 16) + 32'(k << 12));
        while (blocks_seen - b0 < n * K && cycle - t0 < 200000) @(posedge clk);
        check(blocks_seen - b0 == n * K, $sformatf("%0d channels, %0d bytes: all events arrived", n, sz));
        rate  = real'(n * K * sz) / real'(last_done_cycle - t0);
        ideal = (4.0 * n < 8.0) ? 4.0 * n : 8.0;
        $display("workload channels=%0d event_bytes=%0d bytes_per_clock=%0.2f limit=%0.1f",
                 n, sz, rate, ideal);
        if (sz >= 1024) check(rate >= 0.75 * ideal,
                              $sformatf("%0d channels, %0d bytes: rate near its limit", n, sz));
        bad = 0;
        for (int ch = 0; ch < n; ch++)
          for (int k = 0; k < K; k++) begin
            rd(ra(ch, REG_ACK_BEG), b); rd(ra(ch, REG_ACK_END), e); rd(ra(ch, REG_ACK_LEN), l);
            if (b != (32'hB000_0000 | 32'(k)) || l != 32'(sz)) bad++;
            for (int j = 0; j < sz / 4; j += 2) begin
              logic [31:0] a;
              logic [31:0] base;
              a = buf_addr(ch, k) + 32'(j * 4);
              base = 32'(sz << 16) + 32'(k << 12) + 32'(j);
              if (!mem.exists(a) || mem[a] != {base + 1, base}) bad++;
            end
          end
        check(bad == 0, $sformatf("%0d channels, %0d bytes: messages and data", n, sz));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
