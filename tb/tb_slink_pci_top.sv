// tb_slink_pci_top: end-to-end test of the whole design at its full size
// (no parameter overrides).  The four-channel card runs the same scenario as
// its own test (four links in normal mode with per-channel flow control, a
// disabled channel, then emulator mode with the 24-message interrupt); the
// bus exerciser, alongside, runs a counted write-and-read benchmark with its
// pattern checked.  Every mechanism is counted and one that never happened
// counts as a failure.
module tb_slink_pci_top;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        emu_mode = 1'b0;
  logic [3:0]  ld_valid, ld_ctrl, ld_xoff, ld_utdo, ld_ureset;
  logic [3:0]  ld_down = '0;
  logic [31:0] ld_data [4];
  logic [3:0]  ld_url [4];
  logic [7:0]  temperature = 8'd41;
  logic        reg_wr = 0, reg_rd = 0;
  logic [7:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        dma_req, dma_start, dma_rd, dma_done, irq;
  logic [31:0] dma_addr;
  logic [10:0] dma_nbytes;
  logic [1:0]  dma_chan;
  logic [63:0] dma_rdata;
  logic [3:0]  ch_enabled, ch_block_done;

  // bus exerciser signals
  logic        blaster_reg_wr = 0, blaster_reg_rd = 0;
  logic [5:0]  blaster_reg_addr = '0;
  logic [31:0] blaster_reg_wdata = '0, blaster_reg_rdata;
  logic        blaster_wdma_req, blaster_wdma_start = 0, blaster_wdma_rd = 0, blaster_wdma_done = 0;
  logic [31:0] blaster_wdma_addr, blaster_rdma_addr;
  logic [10:0] blaster_wdma_nbytes, blaster_rdma_nbytes;
  logic [63:0] blaster_wdma_rdata, blaster_rdma_wdata = '0;
  logic        blaster_rdma_req, blaster_rdma_start = 0, blaster_rdma_wr = 0, blaster_rdma_done = 0;

  slink_pci_top dut (.*);

  logic [7:0]  stall_pct = 8'd0;
  logic        wr_valid;
  logic [31:0] wr_addr;
  logic [63:0] wr_data;
  logic [1:0]  wr_chan;
  int          bursts, max_burst;
  int          xc [4];

  pci_dma_model #(.START_LAT(2)) u_dma (
    .clk, .rst_n, .stall_pct, .dma_req, .dma_addr, .dma_nbytes, .dma_chan,
    .dma_start, .dma_rd, .dma_rdata, .dma_done,
    .wr_valid, .wr_addr, .wr_data, .wr_chan, .bursts, .max_burst_bytes (max_burst)
  );

  slidas_model u_src0 (.clk, .xoff (ld_xoff[0]), .valid (ld_valid[0]), .ctrl (ld_ctrl[0]), .data (ld_data[0]), .xoff_cycles (xc[0]));
  slidas_model u_src1 (.clk, .xoff (ld_xoff[1]), .valid (ld_valid[1]), .ctrl (ld_ctrl[1]), .data (ld_data[1]), .xoff_cycles (xc[1]));
  slidas_model u_src2 (.clk, .xoff (ld_xoff[2]), .valid (ld_valid[2]), .ctrl (ld_ctrl[2]), .data (ld_data[2]), .xoff_cycles (xc[2]));
  slidas_model u_src3 (.clk, .xoff (ld_xoff[3]), .valid (ld_valid[3]), .ctrl (ld_ctrl[3]), .data (ld_data[3]), .xoff_cycles (xc[3]));

  // host memory copy; each channel writes its own address range
  logic [63:0] mem [logic [31:0]];
  int chan_words [4] = '{0, 0, 0, 0};
  always @(posedge clk) if (wr_valid) begin
    mem[wr_addr] = wr_data;
    chan_words[wr_chan]++;
  end

  // mechanism counters
  int m_xoff_split = 0;
  int m_contend = 0, m_xoff_normal = 0, m_xoff_or = 0, m_seg = 0, m_cut = 0;
  int m_disabled_drop = 0, m_emu_copy = 0, m_thresh_irq = 0;
  always @(posedge clk) begin
    if ($countones(dut.u_filar.c_req) >= 2) m_contend++;
    if (!emu_mode && ld_xoff != 0) m_xoff_normal++;
    if (!emu_mode && ld_xoff != 0 && ld_xoff != 4'hF) m_xoff_split++;
    if (emu_mode && ld_xoff[0] && $countones(dut.u_filar.c_xoff) < 4) m_xoff_or++;
    if (dma_start && dma_nbytes == 11'd1024) m_seg++;
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
  task automatic request(input int ch, input logic [31:0] addr, input int len);
    wr(ra(ch, REG_REQ_ADDR), addr);
    wr(ra(ch, REG_REQ_LEN), 32'(len));
  endtask
  task automatic acks(input int ch, output int n);
    logic [31:0] s;
    rd(ra(ch, REG_STATUS), s);
    n = int'(s[13:8]);
  endtask
  task automatic wait_acks(input int ch, input int n);
    int got = 0, g = 0;
    while (got < n && g < 50000) begin acks(ch, got); g++; end
    check(got >= n, $sformatf("channel %0d: %0d messages", ch, n));
  endtask
  task automatic read_ack(input int ch, output logic [31:0] b, output logic [31:0] e,
                          output logic [31:0] l);
    rd(ra(ch, REG_ACK_BEG), b); rd(ra(ch, REG_ACK_END), e); rd(ra(ch, REG_ACK_LEN), l);
  endtask
  task automatic check_mem(input logic [31:0] addr, input logic [31:0] base, input int nwords,
                           input string what);
    int bad = 0;
    for (int j = 0; j < nwords; j++) begin
      logic [31:0] a;
      logic [63:0] w;
      logic [31:0] got;
      a = addr + 32'((j / 2) * 8);
      w = mem.exists(a) ? mem[a] : 64'hDEAD_DEAD_DEAD_DEAD;
      got = (j % 2) ? w[63:32] : w[31:0];
      if (got !== base + 32'(j)) bad++;
    end
    check(bad == 0, what);
  endtask
  function automatic logic [31:0] chbase(input int ch); return 32'h1000_0000 * (ch + 1); endfunction
  function automatic logic [31:0] pbase(input int ch, input int p); return 32'((ch << 28) | (p << 16)); endfunction

  task automatic send(input int ch, input int p, input int n);
    case (ch)
      0: u_src0.send_packet(32'hB000_0000 | 32'(p), 32'hE000_0000 | 32'(p), n, pbase(ch, p));
      1: u_src1.send_packet(32'hB100_0000 | 32'(p), 32'hE100_0000 | 32'(p), n, pbase(ch, p));
      2: u_src2.send_packet(32'hB200_0000 | 32'(p), 32'hE200_0000 | 32'(p), n, pbase(ch, p));
      default: u_src3.send_packet(32'hB300_0000 | 32'(p), 32'hE300_0000 | 32'(p), n, pbase(ch, p));
    endcase
  endtask


  // ---------------- bus exerciser, alongside ----------------
  int bw_words = 0, br_words = 0, b_bad = 0, m_blaster = 0;
  logic [63:0] b_expect = '0;
  initial forever begin
    @(negedge clk);
    if (blaster_wdma_req) begin
      int n;
      n = (int'(blaster_wdma_nbytes) + 7) / 8;
      blaster_wdma_start = 1; @(negedge clk); blaster_wdma_start = 0;
      for (int i = 0; i < n; i++) begin
        if (blaster_wdma_rdata != b_expect) b_bad++;
        b_expect++;
        blaster_wdma_rd = 1; @(negedge clk); blaster_wdma_rd = 0;
        bw_words++;
      end
      blaster_wdma_done = 1; @(negedge clk); blaster_wdma_done = 0;
    end
  end
  initial forever begin
    @(negedge clk);
    if (blaster_rdma_req) begin
      int n;
      n = (int'(blaster_rdma_nbytes) + 7) / 8;
      blaster_rdma_start = 1; @(negedge clk); blaster_rdma_start = 0;
      for (int i = 0; i < n; i++) begin
        blaster_rdma_wdata = {$urandom, $urandom};
        blaster_rdma_wr = 1; @(negedge clk); blaster_rdma_wr = 0;
        br_words++;
      end
      blaster_rdma_done = 1; @(negedge clk); blaster_rdma_done = 0;
    end
  end
  task automatic bw(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk); blaster_reg_wr = 1; blaster_reg_addr = a; blaster_reg_wdata = d;
    @(negedge clk); blaster_reg_wr = 0;
  endtask
  task automatic br(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk); blaster_reg_rd = 1; blaster_reg_addr = a;
    @(negedge clk); blaster_reg_rd = 0; d = blaster_reg_rdata;
  endtask
  initial begin
    logic [31:0] d;
    int g;
    @(posedge rst_n);
    bw(6'h04, 32'h9000_0000); bw(6'h08, 1024); bw(6'h0C, 20);
    bw(6'h10, 32'hA000_0000); bw(6'h14, 1024); bw(6'h18, 10);
    bw(6'h00, 32'h3);
    g = 0;
    do begin br(6'h1C, d); g++; end while (d[1:0] != 0 && g < 20000);
    br(6'h20, d); check(d == 20, "exerciser: 20 write transfers");
    br(6'h24, d); check(d == 10, "exerciser: 10 read transfers");
    check(bw_words == 2560 && br_words == 1280, "exerciser: words moved");
    check(b_bad == 0, "exerciser: known pattern");
    if (d == 10 && b_bad == 0) m_blaster++;
  end

  logic [31:0] b, e, l, s;
  int n;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rd(8'h80, s);
    check(s == 32'd41, "temperature register");
    rd(8'h84, s);
    check(s[19:16] == 4'd4 && !s[8], "card register: four channels, normal mode");
    rd(ra(2, REG_IRQ), s);
    check(s[5:0] == 6'd24, "message threshold resets to 24");

    // ---------------- A: normal mode, four links at once ----------------
    stall_pct = 8'd85;
    for (int ch = 0; ch < 4; ch++) begin
      wr(ra(ch, REG_CTRL), 32'h1);
      if (ch == 1) request(ch, chbase(ch), 1000);
      for (int p = 0; p < 3; p++) request(ch, chbase(ch) + 32'(p << 16) + ((ch == 1) ? 32'h0100_0000 : 0), 4096);
    end
    check(ch_enabled == 4'hF, "all channels enabled");
    fork
      for (int p = 0; p < 3; p++) send(0, p, 600);
      for (int p = 0; p < 3; p++) send(1, p, 600);
      for (int p = 0; p < 3; p++) send(2, p, 600);
      for (int p = 0; p < 3; p++) send(3, p, 600);
    join
    for (int ch = 0; ch < 4; ch++) wait_acks(ch, (ch == 1) ? 4 : 3);
    for (int ch = 0; ch < 4; ch++) begin
      if (ch == 1) begin
        read_ack(1, b, e, l);
        check(b == 32'hB100_0000 && l == {2'b01, 6'h0, 24'd1000}, "channel 1 cut at 1000 bytes");
        if (l[30]) m_cut++;
        check_mem(chbase(1), pbase(1, 0), 250, "channel 1 first part");
        read_ack(1, b, e, l);
        check(e == 32'hE100_0000 && l == {2'b10, 6'h0, 24'd1400}, "channel 1 rest of packet");
        check_mem(chbase(1) + 32'h0100_0000, pbase(1, 0) + 250, 350, "channel 1 rest data");
        for (int p = 1; p < 3; p++) begin
          read_ack(1, b, e, l);
          check(b == (32'hB100_0000 | 32'(p)) && l == 32'd2400, "channel 1 later packets");
          check_mem(chbase(1) + 32'h0100_0000 + 32'(p << 16), pbase(1, p), 600, "channel 1 later data");
        end
      end else begin
        for (int p = 0; p < 3; p++) begin
          read_ack(ch, b, e, l);
          check(b == ((32'hB000_0000 + 32'(ch << 24)) | 32'(p)) &&
                e == ((32'hE000_0000 + 32'(ch << 24)) | 32'(p)) && l == 32'd2400,
                $sformatf("channel %0d packet %0d message", ch, p));
          check_mem(chbase(ch) + 32'(p << 16), pbase(ch, p), 600,
                    $sformatf("channel %0d packet %0d data", ch, p));
        end
      end
    end
    check(max_burst == 1024, "bursts never longer than 1 Kbyte");
    for (int ch = 0; ch < 4; ch++) begin
      rd(ra(ch, REG_STATUS), s);
      check(!s[18], "no input overflow");
    end

    // ---------------- B: a disabled channel ignores its link ----------------
    wr(ra(3, REG_CTRL), 32'h0);
    request(3, 32'h7000_0000, 4096);
    begin
      int w0;
      w0 = chan_words[3];
      send(3, 9, 40);
      repeat (200) @(posedge clk);
      acks(3, n);
      rd(ra(3, REG_STATUS), s);
      check(n == 0 && chan_words[3] == w0 && s[5:0] == 6'd1, "disabled channel moved nothing");
      if (n == 0 && chan_words[3] == w0) m_disabled_drop++;
    end
    // re-enable: the request is served by the next packet
    wr(ra(3, REG_CTRL), 32'h1);
    send(3, 10, 40);
    wait_acks(3, 1);
    read_ack(3, b, e, l);
    check(b == 32'hB300_000A && l == 32'd160, "re-enabled channel serves its request");
    check_mem(32'h7000_0000, pbase(3, 10), 40, "re-enabled channel data");

    // ---------------- C: emulator mode ----------------
    repeat (20) @(posedge clk);
    emu_mode = 1'b1;
    stall_pct = 8'd70;
    rd(8'h84, s);
    check(s[8], "card register shows emulator mode");
    for (int ch = 0; ch < 4; ch++) begin
      wr(ra(ch, REG_CTRL), 32'h1 | (32'h1 << (8 + IRQ_ACK_THRESH)));
      for (int p = 0; p < 25; p++) request(ch, 32'h8000_0000 + 32'(ch << 24) + 32'(p << 12), 4096);
    end
    for (int p = 0; p < 24; p++) begin
      send(0, 32 + p, 300);
      if (p == 22) begin
        for (int ch = 0; ch < 4; ch++) wait_acks(ch, 23);
        repeat (50) @(posedge clk);
        check(!irq, "no interrupt at 23 messages");
      end
    end
    for (int ch = 0; ch < 4; ch++) wait_acks(ch, 24);
    repeat (3) @(posedge clk);
    check(irq, "interrupt at 24 messages");
    if (irq) m_thresh_irq++;
    rd(8'h84, s);
    check(s[3:0] == 4'hF, "every channel reports its interrupt");
    for (int ch = 0; ch < 4; ch++) begin
      int good;
      good = 0;
      for (int p = 0; p < 24; p++) begin
        read_ack(ch, b, e, l);
        if (b == (32'hB000_0000 | 32'(32 + p)) && l == 32'd1200) good++;
        check_mem(32'h8000_0000 + 32'(ch << 24) + 32'(p << 12), pbase(0, 32 + p), 300,
                  "emulator copy data");
      end
      check(good == 24, $sformatf("channel %0d got all 24 copied packets", ch));
      if (good == 24) m_emu_copy++;
    end
    repeat (3) @(posedge clk);
    check(!irq, "interrupt clears when messages are read");

    // ---------------- mechanisms ----------------
    $display("mechanisms: split=%0d contention=%0d xoff_normal=%0d xoff_or=%0d bursts1K=%0d cut=%0d disabled=%0d emu_copy=%0d thresh_irq=%0d",
             m_xoff_split, m_contend, m_xoff_normal, m_xoff_or, m_seg, m_cut, m_disabled_drop, m_emu_copy, m_thresh_irq);
    check(m_contend > 0, "DMA arbitration between channels happened");
    check(m_xoff_normal > 0, "XOFF in normal mode happened");
    check(m_xoff_split > 0, "channels held off separately");
    check(m_xoff_or > 0, "emulator XOFF OR happened");
    check(m_seg > 0, "1 Kbyte bursts happened");
    check(m_cut > 0, "cut at maximum length happened");
    check(m_disabled_drop > 0, "disabled channel happened");
    check(m_emu_copy == 4, "emulator copy happened on all channels");
    check(m_thresh_irq > 0, "threshold interrupt happened");
    check(m_blaster > 0, "exerciser benchmark happened");

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
