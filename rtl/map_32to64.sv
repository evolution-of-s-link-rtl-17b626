// map_32to64: the "32 to 64 Map" between the S-LINK connector and the Input
// Buffer FIFO.
//
// Consecutive 32-bit data words from the S-LINK destination card are merged
// into one 64-bit entry, the first word in the low half.  Control words are
// kept in stream order as entries of their own, tagged as control, so that the
// backend can take them out of the data stream later.  A control word that
// arrives while a single data word is waiting for its partner first flushes
// that word as a half entry (hi_valid low); the control word is then held one
// cycle and written next.  The map therefore writes at most one entry per
// cycle while accepting one S-LINK word per cycle.  Input words are taken in
// the cycle ld_valid is high (active-high versions of the LDC's write enable
// and control flag); en low drops them.  Merging 32 to 64 bits is from the
// document; the tagging and the flush rule are this design's choices.
module map_32to64
  import slink_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,        // channel enabled
  input  logic        ld_valid,  // S-LINK word present this cycle
  input  logic        ld_ctrl,   // the word is a control word
  input  logic [31:0] ld_data,
  output logic        out_push,
  output ib_entry_t   out_entry
);

  logic        lo_valid;
  logic [31:0] lo_data;
  logic        hold_valid;
  logic [31:0] hold_data;

  logic take;
  assign take = en && ld_valid;

  always_comb begin
    out_push  = 1'b0;
    out_entry = '0;
    if (hold_valid) begin
      out_push       = 1'b1;
      out_entry.ctrl = 1'b1;
      out_entry.data = {32'h0, hold_data};
    end else if (take && !ld_ctrl && lo_valid) begin
      out_push           = 1'b1;
      out_entry.hi_valid = 1'b1;
      out_entry.data     = {ld_data, lo_data};
    end else if (take && ld_ctrl && lo_valid) begin
      out_push       = 1'b1;
      out_entry.data = {32'h0, lo_data};
    end else if (take && ld_ctrl) begin
      out_push       = 1'b1;
      out_entry.ctrl = 1'b1;
      out_entry.data = {32'h0, ld_data};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_valid   <= 1'b0;
      lo_data    <= '0;
      hold_valid <= 1'b0;
      hold_data  <= '0;
    end else begin
      if (hold_valid) begin
        // lo_valid is low here: the hold was made by flushing it.
        hold_valid <= take && ld_ctrl;
        hold_data  <= ld_data;
        if (take && !ld_ctrl) begin
          lo_valid <= 1'b1;
          lo_data  <= ld_data;
        end
      end else if (take) begin
        if (ld_ctrl) begin
          hold_valid <= lo_valid;
          hold_data  <= ld_data;
          lo_valid   <= 1'b0;
        end else if (lo_valid) begin
          lo_valid <= 1'b0;
        end else begin
          lo_valid <= 1'b1;
          lo_data  <= ld_data;
        end
      end
    end
  end

endmodule
