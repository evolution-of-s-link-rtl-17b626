// tb_pci_blaster: self-checking test of the bus exerciser.  Two behavioural
// DMA engines serve its write and read directions.  Checked: counted runs in
// both modes at the same time, the known pattern (a word counter) in every
// written word, the number of words read, the done counters, and an endless
// run that goes on past any count until its run bit is cleared.
module tb_pci_blaster;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        reg_wr = 0, reg_rd = 0;
  logic [5:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        wdma_req, wdma_start = 0, wdma_rd = 0, wdma_done = 0;
  logic [31:0] wdma_addr, rdma_addr;
  logic [10:0] wdma_nbytes, rdma_nbytes;
  logic [63:0] wdma_rdata, rdma_wdata = '0;
  logic        rdma_req, rdma_start = 0, rdma_wr = 0, rdma_done = 0;

  pci_blaster dut (.*);

  int w_bursts = 0, r_bursts = 0, w_words = 0, r_words = 0, bad_pattern = 0, overlap = 0;
  logic [63:0] expect_w = '0;
  always @(posedge clk) if (wdma_rd && rdma_wr) overlap++;

  // write-direction engine
  initial forever begin
    @(negedge clk);
    if (wdma_req) begin
      int n;
      n = (int'(wdma_nbytes) + 7) / 8;
      wdma_start = 1; @(negedge clk); wdma_start = 0;
      for (int i = 0; i < n; i++) begin
        if ($urandom_range(3) == 0) @(negedge clk);
        if (wdma_rdata != expect_w) bad_pattern++;
        expect_w++;
        wdma_rd = 1; @(negedge clk); wdma_rd = 0;
        w_words++;
      end
      wdma_done = 1; @(negedge clk); wdma_done = 0;
      w_bursts++;
    end
  end

  // read-direction engine
  initial forever begin
    @(negedge clk);
    if (rdma_req) begin
      int n;
      n = (int'(rdma_nbytes) + 7) / 8;
      rdma_start = 1; @(negedge clk); rdma_start = 0;
      for (int i = 0; i < n; i++) begin
        rdma_wdata = {$urandom, $urandom};
        rdma_wr = 1; @(negedge clk); rdma_wr = 0;
        r_words++;
      end
      rdma_done = 1; @(negedge clk); rdma_done = 0;
      r_bursts++;
    end
  end

  task automatic w(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d; @(negedge clk); reg_wr = 0;
  endtask
  task automatic r(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1; reg_addr = a; @(negedge clk); reg_rd = 0; d = reg_rdata;
  endtask

  logic [31:0] d;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    w(6'h04, 32'h4000_0000); w(6'h08, 256); w(6'h0C, 5);
    w(6'h10, 32'h5000_0000); w(6'h14, 512); w(6'h18, 3);
    w(6'h00, 32'h3);                       // both modes, counted
    repeat (20) @(negedge clk);
    r(6'h1C, d);
    check(d[1:0] == 2'b11, "both modes active together");
    begin
      int g;
      g = 0;
      do begin r(6'h1C, d); g++; end while (d[1:0] != 0 && g < 5000);
    end
    check(w_bursts == 5 && w_words == 160, "write mode: 5 transfers of 256 bytes");
    check(r_bursts == 3 && r_words == 192, "read mode: 3 transfers of 512 bytes");
    check(bad_pattern == 0, "known pattern in every written word");
    check(overlap > 0, "read and write data moved in the same cycles");
    r(6'h20, d); check(d == 5, "write transfers done");
    r(6'h24, d); check(d == 3, "read transfers done");
    r(6'h28, d); check(d == 160, "words written");
    r(6'h2C, d); check(d == 192, "words read");

    // endless write run, stopped by software
    w(6'h00, 32'h0);
    expect_w = '0;
    w(6'h0C, 2);
    w(6'h08, 64);
    w(6'h00, 32'h5);                        // write mode, loop
    repeat (400) @(negedge clk);
    r(6'h20, d);
    check(d > 2, "loop runs past the count");
    w(6'h00, 32'h4);                        // clear run, keep loop bit
    repeat (40) @(negedge clk);
    r(6'h1C, d);
    check(d[0] == 0, "write mode stops when its run bit is cleared");
    begin
      int b0;
      b0 = w_bursts;
      repeat (100) @(negedge clk);
      check(w_bursts == b0, "no transfer after stop");
    end
    check(bad_pattern == 0, "pattern restarts from zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
