// tb_sync_fifo: self-checking test of the FIFO used as PCI Burst FIFO
// (128 x 64 bit, its default size) and, at depth 15, as the host-facing FIFOs.
// Random pushes and pops are compared with a queue model; full, empty and
// count are checked every cycle, including push and pop together when full.
module tb_sync_fifo;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        push, pop, empty, full, push15, pop15, empty15, full15;
  logic [63:0] wdata, rdata, wdata15, rdata15;
  logic [7:0]  count;
  logic [3:0]  count15;

  sync_fifo dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count);
  sync_fifo #(.WIDTH(64), .DEPTH(15)) dut15 (.clk, .rst_n, .push (push15), .wdata (wdata15),
    .pop (pop15), .rdata (rdata15), .empty (empty15), .full (full15), .count (count15));

  logic [63:0] q[$], q15[$];
  int saw_full = 0, saw_full15 = 0, both_full = 0;

  initial begin
    push = 0; pop = 0; wdata = '0; push15 = 0; pop15 = 0; wdata15 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // phases: mostly fill, then mostly drain, then mixed
      int pp;
      pp = (cyc % 3000 < 1000) ? 80 : (cyc % 3000 < 2000) ? 20 : 50;
      @(negedge clk);
      check(empty == (q.size() == 0) && full == (q.size() == 128) && int'(count) == q.size(),
            "flags and count (128)");
      check(empty15 == (q15.size() == 0) && full15 == (q15.size() == 15) && int'(count15) == q15.size(),
            "flags and count (15)");
      if (!empty) check(rdata == q[0], "head data (128)");
      if (!empty15) check(rdata15 == q15[0], "head data (15)");
      push  = ($urandom_range(99) < pp);
      pop   = ($urandom_range(99) >= pp) && !empty;
      push15 = ($urandom_range(99) < pp);
      pop15  = ($urandom_range(99) >= pp) && !empty15;
      if (full) begin saw_full++; if (push && pop) both_full++; push = push && pop; end
      if (full15) begin saw_full15++; push15 = push15 && pop15; end
      wdata   = {$urandom, $urandom};
      wdata15 = {$urandom, $urandom};
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
      if (pop15) void'(q15.pop_front());
      if (push15) q15.push_back(wdata15);
    end
    check(saw_full > 0 && saw_full15 > 0, "both FIFOs reached full");
    check(both_full > 0, "push and pop together while full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
