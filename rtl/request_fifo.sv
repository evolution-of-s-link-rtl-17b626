// request_fifo: the Request FIFO, into which the host writes where the next
// S-LINK data blocks go.
//
// A request costs the host two single PCI writes: the first writes the PCI
// address into a staging register, the second writes the block's maximum
// length and pushes the pair {address, length} into a FIFO of DEPTH entries
// (15 in the S32PCI64).  The backend sees the oldest request on head while
// empty is low and removes it with pop.  A length write into a full FIFO is
// dropped.  Address and length are from the document; the two-register
// write order and the 24-bit length are this design's choice.
module request_fifo
  import slink_pkg::*;
#(
  parameter int unsigned DEPTH = 15,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_addr,   // host writes the address word
  input  logic        wr_len,    // host writes the length word
  input  logic [31:0] wdata,
  input  logic        pop,
  output req_t        head,
  output logic        empty,
  output logic        full,
  output logic [CW-1:0] count
);

  logic [31:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       addr_q <= '0;
    else if (wr_addr) addr_q <= wdata;
  end

  req_t new_req;
  assign new_req = '{addr: addr_q, max_len: wdata[23:0]};

  sync_fifo #(.WIDTH($bits(req_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push  (wr_len && (!full || pop)),
    .wdata (new_req),
    .pop   (pop),
    .rdata (head),
    .empty (empty),
    .full  (full),
    .count (count)
  );

endmodule
