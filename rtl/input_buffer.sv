// input_buffer: the Input Buffer FIFO, 1024 entries of 64 bits (8 Kbytes of
// S-LINK data), with the flow control the document gives it.
//
// Entries come from the 32 to 64 map and leave, head first, to the backend
// control logic.  When the FIFO is 75% full (count >= 3/4 DEPTH) xoff is
// raised towards the Link Destination Card so that it stops sending; the
// remaining quarter absorbs the words the card still delivers after seeing
// it.  xoff is registered, so it follows the count by one cycle.  Should an
// entry still arrive when the FIFO is full it is dropped and the sticky
// overflow flag is set (cleared by reset); the document does not say what
// happens then.  Each entry carries two tag bits next to the 64 data bits.
module input_buffer
  import slink_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  ib_entry_t wdata,
  input  logic      pop,
  output ib_entry_t rdata,
  output logic      empty,
  output logic [CW-1:0] count,
  output logic      xoff,
  output logic      overflow
);

  localparam int unsigned XOFF_LEVEL = (DEPTH * 3) / 4;

  logic full;

  sync_fifo #(.WIDTH($bits(ib_entry_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push  (push && (!full || pop)),
    .wdata (wdata),
    .pop   (pop),
    .rdata (rdata),
    .empty (empty),
    .full  (full),
    .count (count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xoff     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      xoff <= (count >= CW'(XOFF_LEVEL));
      if (push && full && !pop) overflow <= 1'b1;
    end
  end

endmodule
