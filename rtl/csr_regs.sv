// csr_regs: control, status and interrupt registers of one channel, and the
// decoding of the channel's single-cycle PCI target accesses.
//
// Accesses arrive from the PCI core's target side as one-cycle strobes (wr or
// rd) with a byte offset inside the channel's 32-byte window.  Read data is
// registered and valid in the cycle after rd.  The window holds:
//   0x00 CTRL    RW  [0] channel enable, [4:1] S-LINK return lines,
//                    [5] UTDO, [6] URESET, [13:8] interrupt mask
//   0x04 STATUS  RO  [5:0] Request FIFO count, [13:8] Acknowledge FIFO count,
//                    [16] link down, [17] XOFF, [18] input overflow, [19] busy
//   0x08 REQADDR WO  PCI address of the next block
//   0x0C REQLEN  WO  maximum length in bytes; pushes the request
//   0x10 ACKBEG  RO  begin control word of the oldest message
//   0x14 ACKEND  RO  end control word
//   0x18 ACKLEN  RO  [31] no begin word, [30] cut at max length,
//                    [23:0] length in bytes; reading it removes the message
//   0x1C IRQ     RW  [5:0] message threshold; RO [21:16] pending sources
// Six events can raise the interrupt line (the document's number): Request
// FIFO empty, Request FIFO not full, Acknowledge FIFO not empty, Acknowledge
// FIFO full, Acknowledge FIFO holding at least the threshold of messages, and
// link down.  Each has a mask bit; irq is the OR of the unmasked ones, as a
// level.  Which six events they are, and the whole map, are this design's
// choice; the document gives the registers' purpose, the FIFO occupancy in
// the status register and the return lines in the control register.
module csr_regs
  import slink_pkg::*;
#(
  parameter logic [5:0] THRESH_INIT = 6'd1
) (
  input  logic        clk,
  input  logic        rst_n,
  // target access
  input  logic        wr,
  input  logic        rd,
  input  logic [4:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // control outputs
  output logic        en,
  output logic [3:0]  url,
  output logic        utdo,
  output logic        ureset,
  output logic        req_wr_addr,
  output logic        req_wr_len,
  output logic        ack_rd,
  output logic [1:0]  ack_sel,
  output logic        irq,
  // status inputs
  input  logic [5:0]  req_count,
  input  logic        req_empty,
  input  logic        req_full,
  input  logic [5:0]  ack_count,
  input  logic        ack_empty,
  input  logic        ack_full,
  input  logic [31:0] ack_word,
  input  logic        ld_down,
  input  logic        xoff,
  input  logic        overflow,
  input  logic        busy
);

  logic [N_IRQ-1:0] mask;
  logic [5:0]       thresh;
  logic [N_IRQ-1:0] src, pending;

  always_comb begin
    src = '0;
    src[IRQ_REQ_EMPTY]     = req_empty;
    src[IRQ_REQ_NOT_FULL]  = !req_full;
    src[IRQ_ACK_NOT_EMPTY] = !ack_empty;
    src[IRQ_ACK_FULL]      = ack_full;
    src[IRQ_ACK_THRESH]    = (thresh != '0) && (ack_count >= thresh);
    src[IRQ_LINK_DOWN]     = ld_down;
  end
  assign pending = src & mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq <= 1'b0;
    else        irq <= |pending;
  end

  assign req_wr_addr = wr && (addr == REG_REQ_ADDR);
  assign req_wr_len  = wr && (addr == REG_REQ_LEN);
  assign ack_sel     = (addr == REG_ACK_BEG) ? 2'd0 :
                       (addr == REG_ACK_END) ? 2'd1 : 2'd2;
  assign ack_rd      = rd && (addr == REG_ACK_BEG || addr == REG_ACK_END ||
                              addr == REG_ACK_LEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en     <= 1'b0;
      url    <= '0;
      utdo   <= 1'b0;
      ureset <= 1'b0;
      mask   <= '0;
      thresh <= THRESH_INIT;
    end else if (wr) begin
      if (addr == REG_CTRL) begin
        en     <= wdata[0];
        url    <= wdata[4:1];
        utdo   <= wdata[5];
        ureset <= wdata[6];
        mask   <= wdata[13:8];
      end
      if (addr == REG_IRQ) thresh <= wdata[5:0];
    end
  end

  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    unique case (addr)
      REG_CTRL:    rd_mux = {18'h0, mask, 1'b0, ureset, utdo, url, en};
      REG_STATUS:  rd_mux = {12'h0, busy, overflow, xoff, ld_down,
                             2'b0, ack_count, 2'b0, req_count};
      REG_ACK_BEG,
      REG_ACK_END,
      REG_ACK_LEN: rd_mux = ack_word;
      REG_IRQ:     rd_mux = {10'h0, pending, 10'h0, thresh};
      default:     rd_mux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (rd) rdata <= rd_mux;
  end

endmodule
