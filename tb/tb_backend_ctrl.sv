// tb_backend_ctrl: self-checking test of the backend control logic on its
// own.  The Input Buffer, Request FIFO, PCI Burst FIFO (128 words),
// Acknowledge FIFO and DMA engine are testbench queues.  Checked: control
// words taken out of the data, 1 Kbyte bursts at the right addresses with
// the right data, a block ending exactly on a burst boundary, an empty
// packet, cutting at a maximum length (rounded down to 8 bytes), no request
// taken while disabled or while the Acknowledge FIFO could overflow, and one
// entry moved per cycle.
module tb_backend_ctrl;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        en = 1'b0;
  logic        ib_empty, ib_pop, req_empty, req_pop, bf_full, bf_push, ack_push;
  ib_entry_t   ib_head;
  req_t        req_head;
  logic [63:0] bf_wdata;
  logic [3:0]  ack_count;
  ack_t        ack_msg;
  logic        dma_req, dma_start = 1'b0, dma_done = 1'b0, busy, block_done;
  logic [31:0] dma_addr;
  logic [10:0] dma_nbytes;

  backend_ctrl dut (.*);

  ib_entry_t   ibq[$];
  req_t        reqq[$];
  logic [63:0] bfq[$];
  ack_t        ackq[$];
  logic [63:0] mem [logic [31:0]];
  int          bursts = 0, burst_len[$];
  logic [31:0] burst_addr[$];
  int          moved = 0;

  task automatic refresh();
    ib_empty  = (ibq.size() == 0);
    ib_head   = ib_empty ? '0 : ibq[0];
    req_empty = (reqq.size() == 0);
    req_head  = req_empty ? '0 : reqq[0];
    bf_full   = (bfq.size() >= 128);
    ack_count = 4'(ackq.size());
  endtask

  always @(posedge clk) begin
    logic p_ib, p_req, p_bf, p_ack;
    logic [63:0] w; ack_t m;
    p_ib = ib_pop; p_req = req_pop; p_bf = bf_push; p_ack = ack_push;
    w = bf_wdata; m = ack_msg;
    #1;
    if (p_ib) void'(ibq.pop_front());
    if (p_req) void'(reqq.pop_front());
    if (p_bf) begin bfq.push_back(w); moved++; end
    if (p_ack) ackq.push_back(m);
    refresh();
  end

  // DMA engine: start two cycles after the request, one word per cycle
  initial begin
    forever begin
      @(negedge clk);
      if (dma_req) begin
        logic [31:0] a; int n;
        a = dma_addr; n = (int'(dma_nbytes) + 7) / 8;
        burst_addr.push_back(a); burst_len.push_back(int'(dma_nbytes)); bursts++;
        @(negedge clk); dma_start = 1; @(negedge clk); dma_start = 0;
        for (int i = 0; i < n; i++) begin
          while (bfq.size() == 0) @(negedge clk);
          mem[a] = bfq.pop_front(); a += 8;
          refresh();
          @(negedge clk);
        end
        dma_done = 1; @(negedge clk); dma_done = 0;
      end
    end
  end

  task automatic ctrlw(input logic [31:0] w);
    ib_entry_t e; e = '0; e.ctrl = 1; e.data = {32'h0, w}; ibq.push_back(e);
  endtask
  task automatic pairs(input int n, input logic [31:0] base);
    for (int j = 0; j < n; j++) begin
      ib_entry_t e; e = '0; e.hi_valid = 1;
      e.data = {base + 32'(2*j + 1), base + 32'(2*j)}; ibq.push_back(e);
    end
  endtask
  task automatic req(input logic [31:0] a, input int len);
    req_t r; r.addr = a; r.max_len = 24'(len); reqq.push_back(r);
  endtask
  task automatic wait_acks(input int n);
    int g = 0;
    while (ackq.size() < n && g < 20000) begin @(posedge clk); g++; end
    check(ackq.size() >= n, "acknowledge arrived");
    @(negedge clk);
  endtask
  task automatic check_data(input logic [31:0] a, input logic [31:0] base, input int npairs,
                            input string what);
    int bad = 0;
    for (int j = 0; j < npairs; j++) begin
      logic [31:0] x; x = a + 32'(8*j);
      if (!mem.exists(x) || mem[x] != {base + 32'(2*j + 1), base + 32'(2*j)}) bad++;
    end
    check(bad == 0, what);
  endtask

  ack_t m;
  int t0;

  initial begin
    refresh();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // disabled: nothing happens
    req(32'h1000_0000, 4096); ctrlw(32'hB1); pairs(300, 32'h100); ctrlw(32'hE1);
    refresh();
    repeat (20) @(posedge clk);
    @(negedge clk);
    check(reqq.size() == 1 && ibq.size() == 302, "disabled channel takes nothing");

    // 1. 2400 bytes -> bursts of 1024, 1024, 352
    en = 1;
    t0 = moved;
    repeat (310) @(posedge clk);
    @(negedge clk);
    check(moved - t0 >= 300, "one entry moved per cycle");
    wait_acks(1);
    m = ackq.pop_front(); refresh();
    check(m.begin_ctrl == 32'hB1 && m.end_ctrl == 32'hE1 && m.len == 24'd2400 &&
          m.flags == 2'b00, "message of a 2400-byte block");
    check(bursts == 3 && burst_len[0] == 1024 && burst_len[1] == 1024 && burst_len[2] == 352,
          "segmented into 1024+1024+352");
    check(burst_addr[0] == 32'h1000_0000 && burst_addr[1] == 32'h1000_0400 &&
          burst_addr[2] == 32'h1000_0800, "burst addresses");
    check_data(32'h1000_0000, 32'h100, 300, "block data in memory");

    // 2. exactly 1024 bytes, then an empty packet
    req(32'h2000_0000, 4096); ctrlw(32'hB2); pairs(128, 32'h2000); ctrlw(32'hE2);
    req(32'h3000_0000, 4096); ctrlw(32'hB3); ctrlw(32'hE3);
    refresh();
    wait_acks(2);
    m = ackq.pop_front();
    check(m.len == 24'd1024 && m.end_ctrl == 32'hE2, "block on a burst boundary");
    m = ackq.pop_front(); refresh();
    check(m.len == 24'd0 && m.begin_ctrl == 32'hB3 && m.end_ctrl == 32'hE3, "empty packet");
    check(bursts == 4, "no DMA for zero-length bursts");
    check_data(32'h2000_0000, 32'h2000, 128, "boundary block data");

    // 3. max length 100 -> 96 bytes, rest in the next block
    req(32'h4000_0000, 100); req(32'h4100_0000, 4096);
    ctrlw(32'hB4); pairs(20, 32'h4000); ctrlw(32'hE4);
    refresh();
    wait_acks(2);
    m = ackq.pop_front();
    check(m.len == 24'd96 && m.flags == 2'b01 && m.begin_ctrl == 32'hB4, "cut at 96 bytes");
    m = ackq.pop_front(); refresh();
    check(m.len == 24'd64 && m.flags == 2'b10 && m.end_ctrl == 32'hE4, "rest, no begin word");
    check_data(32'h4000_0000, 32'h4000, 12, "first part data");
    check_data(32'h4100_0000, 32'h4018, 8, "second part data");

    // 4. Acknowledge FIFO room: with 15 messages waiting no request is taken
    for (int k = 0; k < 15; k++) begin
      req(32'h5000_0000 + 32'(k << 8), 64); ctrlw(32'hB5); pairs(1, 32'h5000 + 32'(k << 4)); ctrlw(32'hE5);
    end
    req(32'h6000_0000, 64); ctrlw(32'hB6); pairs(1, 32'h6000); ctrlw(32'hE6);
    refresh();
    wait_acks(15);
    repeat (50) @(posedge clk);
    @(negedge clk);
    check(ackq.size() == 15 && reqq.size() == 1, "no request taken without acknowledge room");
    m = ackq.pop_front(); refresh();
    wait_acks(15);
    repeat (5) @(posedge clk);
    @(negedge clk);
    check(reqq.size() == 0 && ackq[14].begin_ctrl == 32'hB6, "request taken once room is made");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
