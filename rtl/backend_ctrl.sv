// backend_ctrl: the backend control logic of one S-LINK to PCI channel.
//
// Fill side: once a request (PCI address, maximum length) is in the Request
// FIFO and the Acknowledge FIFO is sure to have room for its message, the
// request is taken and entries are moved, one per cycle, from the Input Buffer
// FIFO to the PCI Burst FIFO while the bytes are counted.  Control words are
// not moved: the first one of a block is kept as its begin word, the next one
// ends the block and is kept as its end word.  If the maximum length would be
// passed first, the block is ended there (flag no_end) and the rest of the
// packet starts the next block (which then has flag no_begin).  Blocks are
// cut into bursts of at most SEG_BYTES (1 Kbyte, the PCI Burst FIFO size);
// each finished burst becomes a descriptor in a two-entry queue.
//
// DMA side: the oldest descriptor is offered to the PCI core's DMA engine
// (dma_req with dma_addr/dma_nbytes, accepted by a one-cycle dma_start).
// The engine then pops the burst's 64-bit words from the PCI Burst FIFO
// itself and pulses dma_done at the end.  When the last burst of a block is
// done, its acknowledge message is pushed.  A burst of zero bytes (a block
// with no data, or one that ended on a burst boundary) is retired without the
// engine.  Filling the next burst overlaps with the DMA of the current one.
//
// Requests, word counting, control word extraction, 1 Kbyte segmentation and
// the acknowledge after the whole block is in host memory follow the
// document; the handshakes, the flags and the behaviour at max_len are this
// design's choices.  Lengths are in bytes; max_len is rounded down to a
// multiple of 8.
module backend_ctrl
  import slink_pkg::*;
#(
  parameter int unsigned ACK_DEPTH = 15,
  parameter int unsigned SEG_BYTES = BURST_WORDS * 8,
  localparam int unsigned ACW      = $clog2(ACK_DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  // Input Buffer FIFO head
  input  logic        ib_empty,
  input  ib_entry_t   ib_head,
  output logic        ib_pop,
  // Request FIFO head
  input  logic        req_empty,
  input  req_t        req_head,
  output logic        req_pop,
  // PCI Burst FIFO write side
  input  logic        bf_full,
  output logic        bf_push,
  output logic [63:0] bf_wdata,
  // Acknowledge FIFO write side
  input  logic [ACW-1:0] ack_count,
  output logic        ack_push,
  output ack_t        ack_msg,
  // PCI core DMA engine
  output logic        dma_req,
  output logic [31:0] dma_addr,
  output logic [10:0] dma_nbytes,
  input  logic        dma_start,
  input  logic        dma_done,
  // status
  output logic        busy,
  output logic        block_done   // one pulse per acknowledge message
);

  typedef enum logic {S_IDLE, S_MOVE} state_t;
  state_t state;

  logic [31:0] seg_addr;
  logic [10:0] seg_bytes;
  logic [23:0] blk_len;
  logic [23:0] max_len;
  logic [31:0] begin_word;
  logic        have_begin;
  logic [ACW:0] pending;     // acknowledges owed for blocks already ended

  // descriptor queue
  dma_desc_t dq_in, dq_head;
  logic      dq_push, dq_pop, dq_empty, dq_full;

  sync_fifo #(.WIDTH($bits(dma_desc_t)), .DEPTH(2)) u_dq (
    .clk, .rst_n,
    .push (dq_push), .wdata (dq_in),
    .pop  (dq_pop),  .rdata (dq_head),
    .empty(dq_empty), .full (dq_full), .count ()
  );

  // ---------------- fill side ----------------
  logic        start_blk;
  logic        take_begin, take_data, end_ctrl, end_cut, seg_wrap;
  logic [3:0]  nb;
  logic [24:0] len_next;
  logic [11:0] seg_next;

  assign start_blk = (state == S_IDLE) && en && !req_empty &&
                     ({1'b0, ack_count} + pending < (ACW+1)'(ACK_DEPTH));

  always_comb begin
    nb         = ib_head.hi_valid ? 4'd8 : 4'd4;
    len_next   = {1'b0, blk_len} + 25'(nb);
    seg_next   = {1'b0, seg_bytes} + 12'(nb);
    take_begin = 1'b0;
    take_data  = 1'b0;
    end_ctrl   = 1'b0;
    end_cut    = 1'b0;
    if (state == S_MOVE && !ib_empty) begin
      if (ib_head.ctrl) begin
        if (blk_len == '0 && !have_begin) take_begin = 1'b1;
        else                              end_ctrl   = !dq_full;
      end else if (len_next > {1'b0, max_len}) begin
        end_cut = !dq_full;
      end else begin
        take_data = !bf_full && !dq_full;
      end
    end
    seg_wrap = take_data && (seg_next == 12'(SEG_BYTES));

    ib_pop   = take_begin || take_data || end_ctrl;
    req_pop  = start_blk;
    bf_push  = take_data;
    bf_wdata = ib_head.data;

    dq_push  = seg_wrap || end_ctrl || end_cut;
    dq_in    = '0;
    dq_in.addr   = seg_addr;
    dq_in.nbytes = seg_wrap ? 11'(SEG_BYTES) : seg_bytes;
    dq_in.last   = end_ctrl || end_cut;
    dq_in.ack.begin_ctrl     = have_begin ? begin_word : 32'h0;
    dq_in.ack.end_ctrl       = end_ctrl ? ib_head.data[31:0] : 32'h0;
    dq_in.ack.flags.no_begin = !have_begin;
    dq_in.ack.flags.no_end   = end_cut;
    dq_in.ack.len            = blk_len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      seg_addr   <= '0;
      seg_bytes  <= '0;
      blk_len    <= '0;
      max_len    <= '0;
      begin_word <= '0;
      have_begin <= 1'b0;
    end else begin
      if (start_blk) begin
        state      <= S_MOVE;
        seg_addr   <= req_head.addr;
        seg_bytes  <= '0;
        blk_len    <= '0;
        max_len    <= {req_head.max_len[23:3], 3'b000};
        have_begin <= 1'b0;
        begin_word <= '0;
      end
      if (take_begin) begin
        have_begin <= 1'b1;
        begin_word <= ib_head.data[31:0];
      end
      if (take_data) begin
        blk_len <= len_next[23:0];
        if (seg_wrap) begin
          seg_addr  <= seg_addr + 32'(SEG_BYTES);
          seg_bytes <= '0;
        end else begin
          seg_bytes <= seg_next[10:0];
        end
      end
      if (end_ctrl || end_cut) state <= S_IDLE;
    end
  end

  // ---------------- DMA side ----------------
  logic inflight;
  logic retire;

  assign dma_req    = !dq_empty && !inflight && (dq_head.nbytes != '0);
  assign dma_addr   = dq_head.addr;
  assign dma_nbytes = dq_head.nbytes;

  assign retire   = (!dq_empty && !inflight && dq_head.nbytes == '0) ||
                    (inflight && dma_done);
  assign dq_pop   = retire;
  assign ack_push = retire && dq_head.last;
  assign ack_msg  = dq_head.ack;
  assign block_done = ack_push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= 1'b0;
      pending  <= '0;
    end else begin
      if (dma_req && dma_start) inflight <= 1'b1;
      else if (inflight && dma_done) inflight <= 1'b0;
      pending <= pending + (ACW+1)'(dq_push && dq_in.last) - (ACW+1)'(ack_push);
    end
  end

  assign busy = (state == S_MOVE) || !dq_empty;

  a_start_only_on_req: assert property (@(posedge clk) disable iff (!rst_n)
    dma_start |-> dma_req) else $error("backend_ctrl: dma_start without dma_req");
  a_done_only_inflight: assert property (@(posedge clk) disable iff (!rst_n)
    dma_done |-> inflight) else $error("backend_ctrl: dma_done with no burst in flight");

endmodule
