// s32pci64_core: the local logic of one S-LINK to PCI channel, as in the
// S32PCI64 interface (one such core per channel in the FILAR).
//
// Data path: S-LINK words -> 32 to 64 map -> Input Buffer FIFO (1024 x 64,
// XOFF to the link card at 75% full) -> backend control logic -> PCI Burst
// FIFO (128 x 64) -> the PCI core's DMA engine, which writes the bursts into
// host memory as bus master.  Host side: the driver writes (address, maximum
// length) pairs into the Request FIFO (15 entries) and, once a block is in
// its memory, reads a message of control words and length from the
// Acknowledge FIFO (15 entries): five single PCI cycles per block.  Control,
// status and interrupt registers complete the register window (see
// csr_regs for the map).  The return lines and reset/test lines of the link
// card are driven from the control register.
//
// Interfaces: the link card's user side with active-high signals
// (ld_valid = word present, ld_ctrl = control word, ld_xoff = stop sending,
// ld_down = link down); the PCI core's target side as one-cycle register
// strobes with read data one cycle later; the PCI core's DMA engine as a
// request/start/done handshake, with the engine popping burst words through
// dma_rd (dma_rdata shows the head word).  Everything runs on one clock; the
// link card and PCI clock domains of a real board would need a dual-clock
// Input Buffer FIFO.  Block structure and sizes follow the document; the
// interfaces and the single clock are this design's choices.
module s32pci64_core
  import slink_pkg::*;
#(
  parameter int unsigned IB_DEPTH    = 1024,
  parameter int unsigned BURST_DEPTH = BURST_WORDS,
  parameter int unsigned REQ_DEPTH   = 15,
  parameter int unsigned ACK_DEPTH   = 15,
  parameter logic [5:0]  THRESH_INIT = 6'd1
) (
  input  logic        clk,
  input  logic        rst_n,
  // S-LINK destination card, user side
  input  logic        ld_valid,
  input  logic        ld_ctrl,
  input  logic [31:0] ld_data,
  input  logic        ld_down,
  output logic        ld_xoff,
  output logic [3:0]  ld_url,
  output logic        ld_utdo,
  output logic        ld_ureset,
  // register window of this channel (PCI target side)
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [4:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // PCI core DMA engine
  output logic        dma_req,
  output logic [31:0] dma_addr,
  output logic [10:0] dma_nbytes,
  input  logic        dma_start,
  input  logic        dma_rd,
  output logic [63:0] dma_rdata,
  input  logic        dma_done,
  // status
  output logic        irq,
  output logic        en,
  output logic        block_done
);

  localparam int unsigned IBW  = $clog2(IB_DEPTH + 1);
  localparam int unsigned RQW  = $clog2(REQ_DEPTH + 1);
  localparam int unsigned ACW  = $clog2(ACK_DEPTH + 1);
  localparam int unsigned BFW  = $clog2(BURST_DEPTH + 1);

  // 32 to 64 map
  logic      map_push;
  ib_entry_t map_entry;

  map_32to64 u_map (
    .clk, .rst_n, .en,
    .ld_valid, .ld_ctrl, .ld_data,
    .out_push (map_push), .out_entry (map_entry)
  );

  // Input Buffer FIFO
  ib_entry_t      ib_head;
  logic           ib_pop, ib_empty, ib_overflow;
  logic [IBW-1:0] ib_count;

  input_buffer #(.DEPTH(IB_DEPTH)) u_ib (
    .clk, .rst_n,
    .push (map_push), .wdata (map_entry),
    .pop  (ib_pop),   .rdata (ib_head),
    .empty(ib_empty), .count (ib_count),
    .xoff (ld_xoff),  .overflow (ib_overflow)
  );

  // Request FIFO
  logic           req_wr_addr, req_wr_len, req_pop, req_empty, req_full;
  req_t           req_head;
  logic [RQW-1:0] req_count;

  request_fifo #(.DEPTH(REQ_DEPTH)) u_req (
    .clk, .rst_n,
    .wr_addr (req_wr_addr), .wr_len (req_wr_len), .wdata (reg_wdata),
    .pop (req_pop), .head (req_head),
    .empty (req_empty), .full (req_full), .count (req_count)
  );

  // Acknowledge FIFO
  logic           ack_push, ack_rd, ack_empty, ack_full;
  ack_t           ack_msg;
  logic [1:0]     ack_sel;
  logic [31:0]    ack_word;
  logic [ACW-1:0] ack_count;

  ack_fifo #(.DEPTH(ACK_DEPTH)) u_ack (
    .clk, .rst_n,
    .push (ack_push), .msg (ack_msg),
    .rd_sel (ack_sel), .rd (ack_rd), .rd_word (ack_word),
    .empty (ack_empty), .full (ack_full), .count (ack_count)
  );

  // PCI Burst FIFO
  logic           bf_push, bf_full, bf_empty;
  logic [63:0]    bf_wdata;
  logic [BFW-1:0] bf_count;

  sync_fifo #(.WIDTH(64), .DEPTH(BURST_DEPTH)) u_bf (
    .clk, .rst_n,
    .push (bf_push), .wdata (bf_wdata),
    .pop  (dma_rd),  .rdata (dma_rdata),
    .empty(bf_empty), .full (bf_full), .count (bf_count)
  );

  // Backend control logic
  logic busy;

  backend_ctrl #(.ACK_DEPTH(ACK_DEPTH), .SEG_BYTES(BURST_DEPTH * 8)) u_be (
    .clk, .rst_n, .en,
    .ib_empty, .ib_head, .ib_pop,
    .req_empty, .req_head, .req_pop,
    .bf_full, .bf_push, .bf_wdata,
    .ack_count, .ack_push, .ack_msg,
    .dma_req, .dma_addr, .dma_nbytes, .dma_start, .dma_done,
    .busy, .block_done
  );

  // Control / status / interrupt registers
  csr_regs #(.THRESH_INIT(THRESH_INIT)) u_csr (
    .clk, .rst_n,
    .wr (reg_wr), .rd (reg_rd), .addr (reg_addr), .wdata (reg_wdata),
    .rdata (reg_rdata),
    .en, .url (ld_url), .utdo (ld_utdo), .ureset (ld_ureset),
    .req_wr_addr, .req_wr_len, .ack_rd, .ack_sel, .irq,
    .req_count (6'(req_count)), .req_empty, .req_full,
    .ack_count (6'(ack_count)), .ack_empty, .ack_full, .ack_word,
    .ld_down, .xoff (ld_xoff), .overflow (ib_overflow), .busy
  );

  a_dma_rd_has_data: assert property (@(posedge clk) disable iff (!rst_n)
    dma_rd |-> !bf_empty) else $error("s32pci64_core: DMA read of empty burst FIFO");

endmodule
