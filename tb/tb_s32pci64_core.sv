// tb_s32pci64_core: self-checking test of one S-LINK to PCI channel.
//
// A behavioural link source sends framed packets; a behavioural DMA engine
// writes the bursts into a testbench copy of host memory.  The host side is
// driven through the register window exactly as a driver would: two writes
// per request, three reads per acknowledge message.  Checked: memory contents
// against the generated pattern, message words (control words, length,
// flags), 1 Kbyte burst segmentation, cutting at the maximum length, XOFF
// before the Input Buffer overflows, the Request FIFO count and limit,
// interrupts, and that a packet streams at one S-LINK word per cycle.
module tb_s32pci64_core;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DUT signals
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

  slidas_model #(.XOFF_LAT(4)) u_src (
    .clk, .xoff (ld_xoff), .valid (ld_valid), .ctrl (ld_ctrl), .data (ld_data),
    .xoff_cycles
  );

  pci_dma_model #(.START_LAT(2)) u_dma (
    .clk, .rst_n, .stall_pct, .dma_req, .dma_addr, .dma_nbytes, .dma_chan (2'd0),
    .dma_start, .dma_rd, .dma_rdata, .dma_done,
    .wr_valid, .wr_addr, .wr_data, .wr_chan, .bursts, .max_burst_bytes (max_burst)
  );

  // host memory copy
  logic [63:0] mem [logic [31:0]];
  always @(posedge clk) if (wr_valid) mem[wr_addr] = wr_data;

  // overflow must never happen
  int xoff_seen = 0;
  always @(posedge clk) if (ld_xoff) xoff_seen++;

  // register access
  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1; reg_addr = a;
    @(negedge clk); reg_rd = 0; d = reg_rdata;
  endtask

  task automatic request(input logic [31:0] addr, input logic [23:0] len);
    wr(REG_REQ_ADDR, addr);
    wr(REG_REQ_LEN, {8'h0, len});
  endtask

  task automatic wait_ack(input int n);
    logic [31:0] s;
    int guard = 0;
    do begin rd(REG_STATUS, s); guard++; end while (int'(s[13:8]) < n && guard < 20000);
    check(int'(s[13:8]) >= n, "acknowledge message arrived");
  endtask

  task automatic read_ack(output logic [31:0] b, output logic [31:0] e, output logic [31:0] l);
    rd(REG_ACK_BEG, b); rd(REG_ACK_END, e); rd(REG_ACK_LEN, l);
  endtask

  // checks that host memory at addr holds words base.. for nbytes bytes
  task automatic check_mem(input logic [31:0] addr, input logic [31:0] base, input int nwords,
                           input string what);
    int bad = 0;
    for (int j = 0; j < nwords; j++) begin
      logic [31:0] a = addr + 32'((j / 2) * 8);
      logic [63:0] w = mem.exists(a) ? mem[a] : 64'hDEAD_DEAD_DEAD_DEAD;
      logic [31:0] got = (j % 2) ? w[63:32] : w[31:0];
      if (got !== base + 32'(j)) bad++;
    end
    check(bad == 0, what);
  endtask

  logic [31:0] b, e, l, s;
  int t0, t1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    wr(REG_CTRL, 32'h1 | (32'h5 << 1) | (32'h1 << (8 + IRQ_ACK_NOT_EMPTY)));
    rd(REG_CTRL, s);
    check(s[0] && s[4:1] == 4'h5 && ld_url == 4'h5, "control register and return lines");
    check(!irq, "no interrupt before any message");

    // 1. one packet of 100 words
    request(32'h0001_0000, 24'd4096);
    u_src.send_packet(32'hB000_0001, 32'hE000_0001, 100, 32'h1000_0000);
    wait_ack(1);
    check(irq, "interrupt on acknowledge FIFO not empty");
    read_ack(b, e, l);
    check(b == 32'hB000_0001, "begin control word");
    check(e == 32'hE000_0001, "end control word");
    check(l == 32'd400, "length 400 bytes, no flags");
    check_mem(32'h0001_0000, 32'h1000_0000, 100, "packet 1 data in host memory");
    repeat (4) @(posedge clk);
    check(!irq, "interrupt drops when FIFO emptied");

    // 2. odd number of words
    request(32'h0002_0000, 24'd4096);
    u_src.send_packet(32'hB000_0002, 32'hE000_0002, 101, 32'h2000_0000);
    wait_ack(1);
    read_ack(b, e, l);
    check(l == 32'd404 && e == 32'hE000_0002, "odd packet length 404");
    check_mem(32'h0002_0000, 32'h2000_0000, 101, "packet 2 data");

    // 3. 1000 words: segmented into 1 Kbyte bursts, streamed at one word per cycle
    begin
      int b0;
      b0 = bursts;
      request(32'h0010_0000, 24'd8192);
      repeat (5) @(posedge clk);
      t0 = $time / 10;
      u_src.send_packet(32'hB000_0003, 32'hE000_0003, 1000, 32'h3000_0000);
      t1 = $time / 10;
      check(t1 - t0 <= 1002 + 2, "1002 S-LINK words accepted in 1002 cycles");
      wait_ack(1);
      read_ack(b, e, l);
      check(l == 32'd4000, "length 4000 bytes");
      check(bursts - b0 == 4, "4000 bytes moved in 4 bursts");
      check(max_burst == 1024, "longest burst 1 Kbyte");
      check_mem(32'h0010_0000, 32'h3000_0000, 1000, "packet 3 data");
    end

    // 4. maximum length shorter than the packet
    request(32'h0020_0000, 24'd256);
    request(32'h0021_0000, 24'd4096);
    u_src.send_packet(32'hB000_0004, 32'hE000_0004, 100, 32'h4000_0000);
    wait_ack(2);
    read_ack(b, e, l);
    check(b == 32'hB000_0004 && l == {1'b0, 1'b1, 6'h0, 24'd256}, "first part cut at 256 bytes");
    read_ack(b, e, l);
    check(e == 32'hE000_0004 && l == {1'b1, 1'b0, 6'h0, 24'd144}, "rest: 144 bytes, no begin word");
    check_mem(32'h0020_0000, 32'h4000_0000, 64, "cut block data");
    check_mem(32'h0021_0000, 32'h4000_0040, 36, "rest of packet data");

    // 5. slow PCI: XOFF must hold the source off, nothing may be lost
    stall_pct = 8'd85;
    begin
      int x0;
      x0 = xoff_cycles;
      request(32'h0030_0000, 24'd65536);
      u_src.send_packet(32'hB000_0005, 32'hE000_0005, 6000, 32'h5000_0000);
      wait_ack(1);
      read_ack(b, e, l);
      check(l == 32'd24000, "long packet length under back-pressure");
      check(xoff_cycles > x0, "XOFF held the source off");
      check_mem(32'h0030_0000, 32'h5000_0000, 6000, "long packet data");
      rd(REG_STATUS, s);
      check(!s[18], "no input buffer overflow");
    end
    stall_pct = 8'd0;

    // 6. Request FIFO holds 15 requests, the 16th is refused; disable channel first
    wr(REG_CTRL, 32'h0);
    for (int k = 0; k < 16; k++) request(32'h0100_0000 + 32'(k * 32'h1000), 24'd1024);
    rd(REG_STATUS, s);
    check(s[5:0] == 6'd15, "Request FIFO full at 15");
    wr(REG_CTRL, 32'h1 | (32'h1 << (8 + IRQ_ACK_THRESH)));
    wr(REG_IRQ, 32'd3);
    for (int k = 0; k < 3; k++) begin
      u_src.send_packet(32'hC000_0000 + 32'(k), 32'hF000_0000 + 32'(k), 10 + k, 32'h6000_0000 + 32'(k << 8));
      if (k < 2) begin repeat (100) @(posedge clk); check(!irq, "no interrupt below threshold"); end
    end
    wait_ack(3);
    repeat (3) @(posedge clk);
    check(irq, "interrupt at message threshold");
    for (int k = 0; k < 3; k++) begin
      read_ack(b, e, l);
      check(b == 32'hC000_0000 + 32'(k) && l == 32'(4 * (10 + k)), "queued request message");
      check_mem(32'h0100_0000 + 32'(k * 32'h1000), 32'h6000_0000 + 32'(k << 8), 10 + k, "queued request data");
    end
    rd(REG_STATUS, s);
    // three served, a fourth already taken by the backend and waiting for data
    check(s[5:0] == 6'd11 && s[19], "11 requests left, channel busy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
