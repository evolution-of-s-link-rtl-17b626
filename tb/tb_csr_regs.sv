// tb_csr_regs: self-checking test of the control, status and interrupt
// registers: control fields reach their outputs and read back, the status
// word carries the FIFO occupancies and link state, request and acknowledge
// accesses produce the right strobes, read data appears one cycle after the
// read, and each of the six interrupt sources raises irq only when unmasked.
module tb_csr_regs;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        wr = 0, rd = 0;
  logic [4:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic        en, utdo, ureset, req_wr_addr, req_wr_len, ack_rd, irq;
  logic [3:0]  url;
  logic [1:0]  ack_sel;
  logic [5:0]  req_count = '0, ack_count = '0;
  logic        req_empty = 1, req_full = 0, ack_empty = 1, ack_full = 0;
  logic [31:0] ack_word = 32'hCAFE_0001;
  logic        ld_down = 0, xoff = 0, overflow = 0, busy = 0;

  csr_regs dut (.*);

  int n_addr = 0, n_len = 0, n_ack = 0;
  logic [1:0] last_sel;
  always @(posedge clk) begin
    if (req_wr_addr) n_addr++;
    if (req_wr_len) n_len++;
    if (ack_rd) begin n_ack++; last_sel = ack_sel; end
  end

  task automatic w(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); wr = 1; addr = a; wdata = d; @(negedge clk); wr = 0;
  endtask
  task automatic r(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); rd = 1; addr = a; @(negedge clk); rd = 0; d = rdata;
  endtask

  logic [31:0] d;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!en && !irq, "disabled, no interrupt after reset");
    w(REG_CTRL, 32'h0000_0000 | 32'h1 | (32'hA << 1) | (1 << 5) | (1 << 6));
    check(en && url == 4'hA && utdo && ureset, "control outputs");
    r(REG_CTRL, d);
    check(d == 32'h0000_0075, "control read back");
    req_count = 6'd7; ack_count = 6'd3; ld_down = 1; xoff = 1; busy = 1;
    r(REG_STATUS, d);
    check(d == {12'h0, 1'b1, 1'b0, 1'b1, 1'b1, 2'b0, 6'd3, 2'b0, 6'd7}, "status word");
    ld_down = 0; xoff = 0; busy = 0; req_count = 0; ack_count = 0;
    w(REG_REQ_ADDR, 32'h1); w(REG_REQ_LEN, 32'h2);
    check(n_addr == 1 && n_len == 1, "request write strobes");
    r(REG_ACK_END, d);
    check(n_ack == 1 && last_sel == 2'd1 && d == 32'hCAFE_0001, "acknowledge read");
    r(REG_ACK_LEN, d);
    check(n_ack == 2 && last_sel == 2'd2, "acknowledge length read");
    r(REG_STATUS, d);
    check(n_ack == 2, "status read is no acknowledge read");

    // interrupts, one source at a time
    for (int i = 0; i < N_IRQ; i++) begin
      // all sources inactive
      req_empty = 0; req_full = 1; ack_empty = 1; ack_full = 0; ack_count = 0; ld_down = 0;
      w(REG_IRQ, 32'd4);
      w(REG_CTRL, 32'h1 | (32'(6'h3F & ~(6'h1 << i)) << 8));
      case (i)
        IRQ_REQ_EMPTY:     req_empty = 1;
        IRQ_REQ_NOT_FULL:  req_full = 0;
        IRQ_ACK_NOT_EMPTY: ack_empty = 0;
        IRQ_ACK_FULL:      ack_full = 1;
        IRQ_ACK_THRESH:    ack_count = 6'd4;
        default:           ld_down = 1;
      endcase
      repeat (2) @(negedge clk);
      check(!irq, "masked source gives no interrupt");
      w(REG_CTRL, 32'h1 | (32'(6'h1 << i) << 8));
      repeat (1) @(negedge clk);
      check(irq, "unmasked source interrupts");
      r(REG_IRQ, d);
      check(d[21:16] == 6'(1 << i) && d[5:0] == 6'd4, "pending bit and threshold");
    end
    ack_count = 6'd3; req_empty = 0; req_full = 1; ack_empty = 1; ld_down = 0; ack_full = 0;
    w(REG_CTRL, 32'h1 | (32'(6'h1 << IRQ_ACK_THRESH) << 8));
    repeat (2) @(negedge clk);
    check(!irq, "below threshold");

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
