// slink_pci_top: the two designs of this repository side by side.
//
//  - filar: the four-channel S-LINK to PCI card logic (each channel an
//    S32PCI64-style core), with its FILAR-emulator mode.
//  - pci_blaster: the bus-exerciser firmware that sources or sinks
//    continuous DMA streams to benchmark a PC.
// They do not exchange signals: in practice they are separate FPGA loads,
// and the wrapper only brings both out so that they can be built and
// simulated together.  filar's ports keep their names; the exerciser's
// ports carry a blaster_ prefix.  Both share clk and rst_n here.
module slink_pci_top (
  input  logic        clk,
  input  logic        rst_n,
  // ---- filar ----
  input  logic        emu_mode,
  input  logic [3:0]  ld_valid,
  input  logic [3:0]  ld_ctrl,
  input  logic [31:0] ld_data   [4],
  input  logic [3:0]  ld_down,
  output logic [3:0]  ld_xoff,
  output logic [3:0]  ld_url    [4],
  output logic [3:0]  ld_utdo,
  output logic [3:0]  ld_ureset,
  input  logic [7:0]  temperature,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        dma_req,
  output logic [31:0] dma_addr,
  output logic [10:0] dma_nbytes,
  output logic [1:0]  dma_chan,
  input  logic        dma_start,
  input  logic        dma_rd,
  output logic [63:0] dma_rdata,
  input  logic        dma_done,
  output logic        irq,
  output logic [3:0]  ch_enabled,
  output logic [3:0]  ch_block_done,
  // ---- pci_blaster ----
  input  logic        blaster_reg_wr,
  input  logic        blaster_reg_rd,
  input  logic [5:0]  blaster_reg_addr,
  input  logic [31:0] blaster_reg_wdata,
  output logic [31:0] blaster_reg_rdata,
  output logic        blaster_wdma_req,
  output logic [31:0] blaster_wdma_addr,
  output logic [10:0] blaster_wdma_nbytes,
  input  logic        blaster_wdma_start,
  input  logic        blaster_wdma_rd,
  output logic [63:0] blaster_wdma_rdata,
  input  logic        blaster_wdma_done,
  output logic        blaster_rdma_req,
  output logic [31:0] blaster_rdma_addr,
  output logic [10:0] blaster_rdma_nbytes,
  input  logic        blaster_rdma_start,
  input  logic        blaster_rdma_wr,
  input  logic [63:0] blaster_rdma_wdata,
  input  logic        blaster_rdma_done
);

  filar u_filar (
    .clk, .rst_n, .emu_mode,
    .ld_valid, .ld_ctrl, .ld_data, .ld_down, .ld_xoff, .ld_url, .ld_utdo, .ld_ureset,
    .temperature,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
    .dma_req, .dma_addr, .dma_nbytes, .dma_chan, .dma_start, .dma_rd, .dma_rdata, .dma_done,
    .irq, .ch_enabled, .ch_block_done
  );

  pci_blaster u_blaster (
    .clk, .rst_n,
    .reg_wr (blaster_reg_wr), .reg_rd (blaster_reg_rd), .reg_addr (blaster_reg_addr),
    .reg_wdata (blaster_reg_wdata), .reg_rdata (blaster_reg_rdata),
    .wdma_req (blaster_wdma_req), .wdma_addr (blaster_wdma_addr),
    .wdma_nbytes (blaster_wdma_nbytes), .wdma_start (blaster_wdma_start),
    .wdma_rd (blaster_wdma_rd), .wdma_rdata (blaster_wdma_rdata), .wdma_done (blaster_wdma_done),
    .rdma_req (blaster_rdma_req), .rdma_addr (blaster_rdma_addr),
    .rdma_nbytes (blaster_rdma_nbytes), .rdma_start (blaster_rdma_start),
    .rdma_wr (blaster_rdma_wr), .rdma_wdata (blaster_rdma_wdata), .rdma_done (blaster_rdma_done)
  );

endmodule
