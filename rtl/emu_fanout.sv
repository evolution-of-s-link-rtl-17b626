// emu_fanout: input routing of the FILAR emulator.
//
// The emulator runs the four-channel firmware on single-link hardware: the
// words of the one S-LINK connector (link 0) are copied to the inputs of all
// channels, and since that board has a single XOFF line, the XOFF lines of the
// channels are ORed onto it.  With emu_mode low every channel simply gets its
// own link and drives its own XOFF.  Purely combinational.  The copy and the
// OR are the document's; making the mode a strap input of one design, rather
// than separate firmware, is this design's choice.
module emu_fanout #(
  parameter int unsigned N_CH = 4
) (
  input  logic              emu_mode,
  // links (connector side)
  input  logic [N_CH-1:0]   link_valid,
  input  logic [N_CH-1:0]   link_ctrl,
  input  logic [31:0]       link_data [N_CH],
  input  logic [N_CH-1:0]   link_down,
  output logic [N_CH-1:0]   link_xoff,
  // channels (core side)
  output logic [N_CH-1:0]   ch_valid,
  output logic [N_CH-1:0]   ch_ctrl,
  output logic [31:0]       ch_data [N_CH],
  output logic [N_CH-1:0]   ch_down,
  input  logic [N_CH-1:0]   ch_xoff
);

  always_comb begin
    for (int i = 0; i < N_CH; i++) begin
      if (emu_mode) begin
        ch_valid[i]  = link_valid[0];
        ch_ctrl[i]   = link_ctrl[0];
        ch_data[i]   = link_data[0];
        ch_down[i]   = link_down[0];
        link_xoff[i] = |ch_xoff;
      end else begin
        ch_valid[i]  = link_valid[i];
        ch_ctrl[i]   = link_ctrl[i];
        ch_data[i]   = link_data[i];
        ch_down[i]   = link_down[i];
        link_xoff[i] = ch_xoff[i];
      end
    end
  end

endmodule
