// filar: logic of a four-channel S-LINK to PCI card (FILAR), top of the
// design.
//
// N_CH channels, each an S32PCI64-like core (32 to 64 map, Input Buffer,
// Request/Acknowledge/PCI Burst FIFOs, backend control, registers), share one
// PCI core: its target side reaches the channels' register windows and a few
// card-wide registers, its DMA engine is shared through a round-robin
// arbiter, and the channels' interrupts are ORed onto the one PCI interrupt.
// Each channel is enabled or disabled by its own control register, and has
// its own XOFF line, so the data flow of every channel is controlled
// separately.  With emu_mode high the card behaves as the FILAR emulator:
// link 0 feeds all channels and the channels' XOFF lines are ORed onto
// link 0's.  The optical transceivers, serdes, link protocol (HOLA), PCI core
// and temperature sensor are outside: their user-side signals are ports.
//
// Register space (byte address reg_addr, one-cycle strobes, read data valid
// the cycle after reg_rd):
//   0x00-0x7F  channel reg_addr[6:5], offset reg_addr[4:0] (see csr_regs)
//   0x80 TEMP  RO  [7:0] card temperature from the sensor
//   0x84 CARD  RO  [N_CH-1:0] per-channel interrupt, [8] emulator mode,
//                  [19:16] number of channels
// The per-channel message threshold resets to 24, the emulator's interrupt
// level, so the Acknowledge FIFOs hold 32 messages here.  Four channels, the
// per-channel enable and flow control, the emulator's copy and OR, the
// temperature register and the threshold of 24 follow the document; the
// FIFO depth of 32, the register map and the arbitration are this design's.
module filar
  import slink_pkg::*;
#(
  parameter int unsigned N_CH        = 4,
  parameter int unsigned IB_DEPTH    = 1024,
  parameter int unsigned BURST_DEPTH = BURST_WORDS,
  parameter int unsigned REQ_DEPTH   = 32,
  parameter int unsigned ACK_DEPTH   = 32,
  parameter logic [5:0]  THRESH_INIT = 6'd24,
  localparam int unsigned CHW        = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            emu_mode,
  // S-LINK destination cards, user side, one per channel
  input  logic [N_CH-1:0] ld_valid,
  input  logic [N_CH-1:0] ld_ctrl,
  input  logic [31:0]     ld_data   [N_CH],
  input  logic [N_CH-1:0] ld_down,
  output logic [N_CH-1:0] ld_xoff,
  output logic [3:0]      ld_url    [N_CH],
  output logic [N_CH-1:0] ld_utdo,
  output logic [N_CH-1:0] ld_ureset,
  // temperature sensor
  input  logic [7:0]      temperature,
  // PCI core target side
  input  logic            reg_wr,
  input  logic            reg_rd,
  input  logic [7:0]      reg_addr,
  input  logic [31:0]     reg_wdata,
  output logic [31:0]     reg_rdata,
  // PCI core DMA engine
  output logic            dma_req,
  output logic [31:0]     dma_addr,
  output logic [10:0]     dma_nbytes,
  output logic [CHW-1:0]  dma_chan,
  input  logic            dma_start,
  input  logic            dma_rd,
  output logic [63:0]     dma_rdata,
  input  logic            dma_done,
  // PCI interrupt and per-channel events
  output logic            irq,
  output logic [N_CH-1:0] ch_enabled,
  output logic [N_CH-1:0] ch_block_done
);

  // link routing (normal or emulator)
  logic [N_CH-1:0] c_valid, c_ctrl, c_down, c_xoff;
  logic [31:0]     c_data [N_CH];

  emu_fanout #(.N_CH(N_CH)) u_fan (
    .emu_mode,
    .link_valid (ld_valid), .link_ctrl (ld_ctrl), .link_data (ld_data),
    .link_down (ld_down), .link_xoff (ld_xoff),
    .ch_valid (c_valid), .ch_ctrl (c_ctrl), .ch_data (c_data),
    .ch_down (c_down), .ch_xoff (c_xoff)
  );

  // register decode
  logic            ch_space;
  logic [CHW-1:0]  ch_idx;
  assign ch_space = !reg_addr[7] && (int'(reg_addr[6:5]) < N_CH);
  assign ch_idx   = CHW'(reg_addr[6:5]);

  // channels
  logic [N_CH-1:0] c_req, c_start, c_rd, c_done, c_irq;
  logic [31:0]     c_addr   [N_CH];
  logic [10:0]     c_nbytes [N_CH];
  logic [63:0]     c_rdata  [N_CH];
  logic [31:0]     c_regrd  [N_CH];

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic sel_i;
    assign sel_i = ch_space && (ch_idx == CHW'(i));

    s32pci64_core #(
      .IB_DEPTH (IB_DEPTH), .BURST_DEPTH (BURST_DEPTH),
      .REQ_DEPTH (REQ_DEPTH), .ACK_DEPTH (ACK_DEPTH),
      .THRESH_INIT (THRESH_INIT)
    ) u_core (
      .clk, .rst_n,
      .ld_valid (c_valid[i]), .ld_ctrl (c_ctrl[i]), .ld_data (c_data[i]),
      .ld_down (c_down[i]), .ld_xoff (c_xoff[i]), .ld_url (ld_url[i]),
      .ld_utdo (ld_utdo[i]), .ld_ureset (ld_ureset[i]),
      .reg_wr (reg_wr && sel_i), .reg_rd (reg_rd && sel_i),
      .reg_addr (reg_addr[4:0]), .reg_wdata, .reg_rdata (c_regrd[i]),
      .dma_req (c_req[i]), .dma_addr (c_addr[i]), .dma_nbytes (c_nbytes[i]),
      .dma_start (c_start[i]), .dma_rd (c_rd[i]), .dma_rdata (c_rdata[i]),
      .dma_done (c_done[i]),
      .irq (c_irq[i]), .en (ch_enabled[i]), .block_done (ch_block_done[i])
    );
  end

  dma_arbiter #(.N_CH(N_CH)) u_arb (
    .clk, .rst_n,
    .ch_req (c_req), .ch_addr (c_addr), .ch_nbytes (c_nbytes),
    .ch_rdata (c_rdata), .ch_start (c_start), .ch_rd (c_rd), .ch_done (c_done),
    .eng_req (dma_req), .eng_addr (dma_addr), .eng_nbytes (dma_nbytes),
    .eng_chan (dma_chan), .eng_rdata (dma_rdata),
    .eng_start (dma_start), .eng_rd (dma_rd), .eng_done (dma_done)
  );

  assign irq = |c_irq;

  // read-data return: channel data is registered inside the channel, the
  // card registers here; the source is chosen by the registered address.
  logic           rd_ch_q;
  logic [CHW-1:0] rd_idx_q;
  logic [31:0]    card_rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ch_q   <= 1'b0;
      rd_idx_q  <= '0;
      card_rd_q <= '0;
    end else if (reg_rd) begin
      rd_ch_q  <= ch_space;
      rd_idx_q <= ch_idx;
      unique case (reg_addr)
        8'h80:   card_rd_q <= {24'h0, temperature};
        8'h84:   card_rd_q <= {12'h0, 4'(N_CH), 7'h0, emu_mode, 8'(c_irq)};
        default: card_rd_q <= '0;
      endcase
    end
  end

  assign reg_rdata = rd_ch_q ? c_regrd[rd_idx_q] : card_rd_q;

endmodule
