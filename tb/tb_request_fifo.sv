// tb_request_fifo: self-checking test of the Request FIFO.  Requests are
// written as address then length; the FIFO must hand them out in order as
// {address, length}, hold exactly 15, refuse a 16th and let one address
// write serve two length writes.
module tb_request_fifo;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        wr_addr = 0, wr_len = 0, pop = 0, empty, full;
  logic [31:0] wdata = '0;
  req_t        head;
  logic [3:0]  count;

  request_fifo dut (.*);

  task automatic wr(input bit is_len, input logic [31:0] d);
    @(negedge clk);
    wr_addr = !is_len; wr_len = is_len; wdata = d;
    @(negedge clk);
    wr_addr = 0; wr_len = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(empty && count == 0, "empty after reset");
    for (int k = 0; k < 16; k++) begin
      wr(1'b0, 32'h8000_0000 + 32'(k << 12));
      wr(1'b1, 32'(100 + k));
    end
    check(full && count == 15, "full at 15 requests");
    for (int k = 0; k < 15; k++) begin
      check(!empty && head.addr == 32'h8000_0000 + 32'(k << 12) &&
            head.max_len == 24'(100 + k), "request order and contents");
      @(negedge clk); pop = 1; @(negedge clk); pop = 0;
    end
    check(empty, "16th request was refused");
    wr(1'b0, 32'h1234_5678);
    wr(1'b1, 32'd8);
    wr(1'b1, 32'd16);
    check(count == 2 && head.addr == 32'h1234_5678 && head.max_len == 24'd8, "first of two");
    @(negedge clk); pop = 1; @(negedge clk); pop = 0;
    check(head.addr == 32'h1234_5678 && head.max_len == 24'd16, "address register reused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
