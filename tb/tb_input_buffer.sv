// tb_input_buffer: self-checking test of the Input Buffer FIFO at its full
// size (1024 x 64 bit).  Checks that XOFF rises exactly when 768 entries
// (75%) are held, one cycle after the count gets there, that an entry pushed
// into the full buffer is dropped and flagged, that entries leave in order,
// and that XOFF falls again below 75%.
module tb_input_buffer;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        push = 0, pop = 0, empty, xoff, overflow;
  ib_entry_t   wdata = '0, rdata;
  logic [10:0] count;

  input_buffer dut (.*);

  function automatic ib_entry_t pat(input int i);
    ib_entry_t e;
    e.ctrl = (i % 7 == 0);
    e.hi_valid = (i % 5 != 0);
    e.data = {32'(i) ^ 32'hA5A5_0000, 32'(i)};
    return e;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      if (int'(count) < 768) check(!xoff, "XOFF low below 75%");
      if (int'(count) > 768) check(xoff, "XOFF high above 75%");
      push = 1; wdata = pat(i);
    end
    @(negedge clk);
    push = 0;
    check(int'(count) == 1024, "holds 1024 entries (8 Kbytes)");
    check(!overflow, "no overflow while filling");
    push = 1; wdata = pat(5000);
    @(negedge clk);
    push = 0;
    check(overflow && int'(count) == 1024, "push into full buffer dropped and flagged");
    for (int i = 0; i < 1024; i++) begin
      check(!empty && rdata == pat(i), "entry order");
      pop = 1;
      @(negedge clk);
      pop = 0;
      if (int'(count) < 767) check(!xoff, "XOFF low again below 75%");
    end
    check(empty, "empty after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
