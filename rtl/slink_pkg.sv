// slink_pkg: types and constants shared by the S-LINK to PCI channel logic.
//
// The Input Buffer FIFO holds 64-bit entries made of one or two 32-bit
// S-LINK words, plus two tag bits of this design's own: whether the entry is
// a control word and whether its upper half is valid.  A request written by
// the host is a PCI address and a maximum block length; an acknowledge
// message holds the two control words that framed the block and the block's
// actual length.  The register offsets are this design's choice; the document
// names the registers and the five single cycles a block costs (two writes to
// the Request FIFO, three reads from the Acknowledge FIFO), not their map.
package slink_pkg;

  // One Input Buffer entry.  Data words: first S-LINK word in [31:0], second
  // in [63:32].  Control words: the word in [31:0].
  typedef struct packed {
    logic        ctrl;      // entry is an S-LINK control word
    logic        hi_valid;  // data[63:32] holds a word (data entries)
    logic [63:0] data;
  } ib_entry_t;

  // One host request: where to put the block and its maximum length.
  typedef struct packed {
    logic [31:0] addr;      // PCI byte address, 8-byte aligned
    logic [23:0] max_len;   // maximum block length in bytes
  } req_t;

  // Flags in the length word of an acknowledge message.
  typedef struct packed {
    logic        no_begin;  // block did not start with a control word
    logic        no_end;    // block cut at max_len before its end control word
  } ack_flags_t;

  // One acknowledge message.
  typedef struct packed {
    logic [31:0] begin_ctrl; // first control word of the block
    logic [31:0] end_ctrl;   // control word that ended the block
    ack_flags_t  flags;
    logic [23:0] len;        // bytes moved to host memory
  } ack_t;

  // One DMA burst handed to the PCI core's DMA engine.
  typedef struct packed {
    logic [31:0] addr;       // PCI byte address
    logic [10:0] nbytes;     // 0 .. 1024 bytes
    logic        last;       // last burst of the block: write ack when done
    ack_t        ack;        // message to store once the burst is done
  } dma_desc_t;

  // Largest single PCI burst: 128 words of 64 bits.
  localparam int unsigned BURST_WORDS = 128;

  // Register offsets inside one channel's 32-byte window (byte addresses).
  localparam logic [4:0] REG_CTRL     = 5'h00; // RW control
  localparam logic [4:0] REG_STATUS   = 5'h04; // RO FIFO occupancy, link state
  localparam logic [4:0] REG_REQ_ADDR = 5'h08; // WO request address
  localparam logic [4:0] REG_REQ_LEN  = 5'h0C; // WO request length, pushes
  localparam logic [4:0] REG_ACK_BEG  = 5'h10; // RO begin control word
  localparam logic [4:0] REG_ACK_END  = 5'h14; // RO end control word
  localparam logic [4:0] REG_ACK_LEN  = 5'h18; // RO flags+length, pops
  localparam logic [4:0] REG_IRQ      = 5'h1C; // RW [5:0] message threshold; RO [21:16] pending sources

  // Interrupt sources (bit positions in mask and pending fields).
  localparam int unsigned IRQ_REQ_EMPTY    = 0; // Request FIFO empty
  localparam int unsigned IRQ_REQ_NOT_FULL = 1; // Request FIFO has room
  localparam int unsigned IRQ_ACK_NOT_EMPTY= 2; // Acknowledge FIFO has a message
  localparam int unsigned IRQ_ACK_FULL     = 3; // Acknowledge FIFO full
  localparam int unsigned IRQ_ACK_THRESH   = 4; // messages >= threshold
  localparam int unsigned IRQ_LINK_DOWN    = 5; // LDC reports link down
  localparam int unsigned N_IRQ            = 6;

endpackage
