// tb_ack_fifo: self-checking test of the Acknowledge FIFO.  Messages are
// pushed until full (15); the host side reads begin word, end word and
// length word of each, in order, and only the length read removes it.
// Reads of the empty FIFO return zero.
module tb_ack_fifo;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        push = 0, rd = 0, empty, full;
  ack_t        msg = '0;
  logic [1:0]  rd_sel = '0;
  logic [31:0] rd_word;
  logic [3:0]  count;

  ack_fifo dut (.*);

  function automatic ack_t mk(input int k);
    ack_t m;
    m.begin_ctrl = 32'hB000_0000 + 32'(k);
    m.end_ctrl   = 32'hE000_0000 + 32'(k);
    m.flags      = 2'(k);
    m.len        = 24'(k * 8);
    return m;
  endfunction

  task automatic host_read(input logic [1:0] s, output logic [31:0] w);
    @(negedge clk);
    rd_sel = s; rd = 1;
    #1 w = rd_word;
    @(negedge clk);
    rd = 0;
  endtask

  logic [31:0] w;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    host_read(2'd2, w);
    check(w == 0 && empty, "empty FIFO reads zero");
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); push = 1; msg = mk(k);
    end
    @(negedge clk); push = 0;
    check(full && count == 15, "full at 15 messages");
    for (int k = 0; k < 15; k++) begin
      host_read(2'd0, w); check(w == 32'hB000_0000 + 32'(k), "begin word");
      host_read(2'd1, w); check(w == 32'hE000_0000 + 32'(k), "end word");
      check(int'(count) == 15 - k, "begin/end reads do not pop");
      host_read(2'd2, w);
      check(w == {2'(k), 6'h0, 24'(k * 8)}, "length word with flags");
    end
    check(empty, "16th message was refused");
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
