// ack_fifo: the Acknowledge FIFO, from which the host learns which blocks
// have arrived in its memory.
//
// The backend pushes one message per completed block: the control words that
// framed it and its actual length with two status flags.  The host reads the
// oldest message with three single PCI reads: begin control word, end control
// word, then the length word; reading the length word removes the message.
// Reads of an empty FIFO return zero and remove nothing.  DEPTH is 15 in the
// S32PCI64.  Message contents and the three reads are from the document; the
// order of the reads and which one pops are this design's choice.
module ack_fifo
  import slink_pkg::*;
#(
  parameter int unsigned DEPTH = 15,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  ack_t        msg,
  input  logic [1:0]  rd_sel,    // 0 begin, 1 end, 2 length word
  input  logic        rd,        // host read strobe
  output logic [31:0] rd_word,   // word selected by rd_sel (combinational)
  output logic        empty,
  output logic        full,
  output logic [CW-1:0] count
);

  ack_t head;
  logic pop;

  assign pop = rd && (rd_sel == 2'd2) && !empty;

  sync_fifo #(.WIDTH($bits(ack_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push  (push && (!full || pop)),
    .wdata (msg),
    .pop   (pop),
    .rdata (head),
    .empty (empty),
    .full  (full),
    .count (count)
  );

  always_comb begin
    rd_word = '0;
    if (!empty) begin
      unique case (rd_sel)
        2'd0:    rd_word = head.begin_ctrl;
        2'd1:    rd_word = head.end_ctrl;
        2'd2:    rd_word = {head.flags, 6'b0, head.len};
        default: rd_word = '0;
      endcase
    end
  end

endmodule
