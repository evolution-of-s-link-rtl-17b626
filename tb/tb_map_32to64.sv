// tb_map_32to64: self-checking test of the 32 to 64 map.  A random stream of
// data and control words, with random idle cycles and back-to-back control
// words, is sent in; the expected entries are built from the stream by the
// pairing rule (pairs of data words, a lone data word flushed as a half entry
// before a control word, control words as entries of their own) and compared
// in order with what the map writes.  Words sent while disabled must vanish.
module tb_map_32to64;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        en, ld_valid, ld_ctrl, out_push;
  logic [31:0] ld_data;
  ib_entry_t   out_entry;

  map_32to64 dut (.*);

  ib_entry_t exp_q[$];
  logic        pend_v = 1'b0;
  logic [31:0] pend_d;
  int got = 0, halves = 0, pairs = 0, ctrls = 0;

  // reference: build expected entries from accepted words
  task automatic model(input logic c, input logic [31:0] w);
    ib_entry_t e;
    if (c) begin
      if (pend_v) begin
        e = '0; e.data = {32'h0, pend_d}; exp_q.push_back(e); pend_v = 0; halves++;
      end
      e = '0; e.ctrl = 1'b1; e.data = {32'h0, w}; exp_q.push_back(e); ctrls++;
    end else if (pend_v) begin
      e = '0; e.hi_valid = 1'b1; e.data = {w, pend_d}; exp_q.push_back(e); pend_v = 0; pairs++;
    end else begin
      pend_v = 1; pend_d = w;
    end
  endtask

  always @(posedge clk) if (rst_n && out_push) begin
    if (exp_q.size() == 0) check(1'b0, "unexpected entry");
    else begin
      ib_entry_t e;
      e = exp_q.pop_front();
      check(out_entry == e, "entry matches pairing rule");
      got++;
    end
  end

  initial begin
    en = 1; ld_valid = 0; ld_ctrl = 0; ld_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      ld_valid = ($urandom_range(3) != 0);
      ld_ctrl  = ($urandom_range(5) == 0);
      ld_data  = $urandom;
      en       = !(i >= 2000 && i < 2100);
      if (ld_valid && en) model(ld_ctrl, ld_data);
    end
    @(negedge clk);
    ld_valid = 1; ld_ctrl = 1; ld_data = 32'hE0F0_0000; model(1'b1, ld_data);
    @(negedge clk);
    ld_valid = 0; ld_ctrl = 0;
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0, "all expected entries written");
    check(halves > 0 && pairs > 0 && ctrls > 0, "all entry kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
