// pci_blaster: bus-exerciser firmware for the same board, used to measure
// how fast a PC's memory and PCI bridge can sink or source DMA data.
//
// Two independent engines, both programmed through a 64-byte register window
// and both able to run at the same time:
//  - PCI write mode sources data: each transfer is one DMA burst of WLEN
//    bytes to host address WADDR, filled with a known pattern, a 64-bit
//    counter that starts at zero when the mode is started and advances by one
//    per word across transfers.
//  - PCI read mode sinks data: each transfer is one DMA burst reading RLEN
//    bytes from RADDR; every word is accepted and only counted.
// Each mode repeats its transfer WCOUNT/RCOUNT times, or forever when its
// loop bit is set, until stopped.  Transfer lengths are 8..1024 bytes (one
// burst, as in the S-LINK interface).
//
// Registers (byte offsets, one-cycle strobes, read data the cycle after rd):
//   0x00 CTRL   RW [0] write mode run, [1] read mode run, [2] write loop,
//                  [3] read loop.  Setting a run bit starts the mode,
//                  clearing it stops the mode after the current transfer.
//   0x04 WADDR  0x08 WLEN  0x0C WCOUNT   (write mode)
//   0x10 RADDR  0x14 RLEN  0x18 RCOUNT   (read mode)
//   0x1C STATUS RO [0] write mode active, [1] read mode active
//   0x20 WDONE  RO write transfers done   0x24 RDONE RO read transfers done
//   0x28 WWORDS RO words written          0x2C RWORDS RO words read
// DMA ports follow the request/start/done handshake of the S-LINK channels:
// the engine pops pattern words through wdma_rd and delivers read words
// through rdma_wr.  The modes, the pattern, counted and endless runs are
// from the document; the register map, the pattern and the handshakes are
// this design's choices.
module pci_blaster (
  input  logic        clk,
  input  logic        rst_n,
  // register window (PCI target side)
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [5:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // DMA engine, PCI write direction (card -> host)
  output logic        wdma_req,
  output logic [31:0] wdma_addr,
  output logic [10:0] wdma_nbytes,
  input  logic        wdma_start,
  input  logic        wdma_rd,
  output logic [63:0] wdma_rdata,
  input  logic        wdma_done,
  // DMA engine, PCI read direction (host -> card)
  output logic        rdma_req,
  output logic [31:0] rdma_addr,
  output logic [10:0] rdma_nbytes,
  input  logic        rdma_start,
  input  logic        rdma_wr,
  input  logic [63:0] rdma_wdata,
  input  logic        rdma_done
);

  // one transfer sequencer per direction
  typedef struct packed {
    logic        run;
    logic        loop;
    logic [31:0] addr;
    logic [10:0] len;
    logic [31:0] count;
  } mode_cfg_t;

  mode_cfg_t   wcfg, rcfg;
  logic        w_act, r_act, w_infl, r_infl;
  logic [31:0] w_done, r_done, w_words, r_words;
  logic [63:0] pattern;

  logic w_go, r_go;   // a run bit is being set now
  assign w_go = reg_wr && reg_addr == 6'h00 && reg_wdata[0] && !wcfg.run;
  assign r_go = reg_wr && reg_addr == 6'h00 && reg_wdata[1] && !rcfg.run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcfg <= '0;
      rcfg <= '0;
    end else if (reg_wr) begin
      unique case (reg_addr)
        6'h00: begin
          wcfg.run  <= reg_wdata[0];
          rcfg.run  <= reg_wdata[1];
          wcfg.loop <= reg_wdata[2];
          rcfg.loop <= reg_wdata[3];
        end
        6'h04: wcfg.addr  <= reg_wdata;
        6'h08: wcfg.len   <= reg_wdata[10:0];
        6'h0C: wcfg.count <= reg_wdata;
        6'h10: rcfg.addr  <= reg_wdata;
        6'h14: rcfg.len   <= reg_wdata[10:0];
        6'h18: rcfg.count <= reg_wdata;
        default: ;
      endcase
    end
  end

  // write mode
  logic w_more, r_more;
  assign w_more = wcfg.run && (wcfg.loop || w_done < wcfg.count);
  assign r_more = rcfg.run && (rcfg.loop || r_done < rcfg.count);

  assign wdma_req    = w_act && !w_infl && w_more;
  assign wdma_addr   = wcfg.addr;
  assign wdma_nbytes = wcfg.len;
  assign wdma_rdata  = pattern;
  assign rdma_req    = r_act && !r_infl && r_more;
  assign rdma_addr   = rcfg.addr;
  assign rdma_nbytes = rcfg.len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_act <= 1'b0; w_infl <= 1'b0; w_done <= '0; w_words <= '0; pattern <= '0;
      r_act <= 1'b0; r_infl <= 1'b0; r_done <= '0; r_words <= '0;
    end else begin
      // write direction
      if (w_go) begin
        w_act <= 1'b1; w_done <= '0; w_words <= '0; pattern <= '0;
      end else begin
        if (wdma_req && wdma_start) w_infl <= 1'b1;
        if (wdma_rd) begin
          pattern <= pattern + 64'd1;
          w_words <= w_words + 32'd1;
        end
        if (w_infl && wdma_done) begin
          w_infl <= 1'b0;
          w_done <= w_done + 32'd1;
        end
        if (w_act && !w_infl && !w_more) w_act <= 1'b0;
      end
      // read direction
      if (r_go) begin
        r_act <= 1'b1; r_done <= '0; r_words <= '0;
      end else begin
        if (rdma_req && rdma_start) r_infl <= 1'b1;
        if (rdma_wr) r_words <= r_words + 32'd1;
        if (r_infl && rdma_done) begin
          r_infl <= 1'b0;
          r_done <= r_done + 32'd1;
        end
        if (r_act && !r_infl && !r_more) r_act <= 1'b0;
      end
    end
  end

  // read mode discards the data; only its arrival is counted
  logic unused_rdata;
  assign unused_rdata = ^rdma_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg_rdata <= '0;
    else if (reg_rd) begin
      unique case (reg_addr)
        6'h00: reg_rdata <= {28'h0, rcfg.loop, wcfg.loop, rcfg.run, wcfg.run};
        6'h04: reg_rdata <= wcfg.addr;
        6'h08: reg_rdata <= {21'h0, wcfg.len};
        6'h0C: reg_rdata <= wcfg.count;
        6'h10: reg_rdata <= rcfg.addr;
        6'h14: reg_rdata <= {21'h0, rcfg.len};
        6'h18: reg_rdata <= rcfg.count;
        6'h1C: reg_rdata <= {30'h0, r_act, w_act};
        6'h20: reg_rdata <= w_done;
        6'h24: reg_rdata <= r_done;
        6'h28: reg_rdata <= w_words;
        6'h2C: reg_rdata <= r_words;
        default: reg_rdata <= '0;
      endcase
    end
  end

  a_wstart: assert property (@(posedge clk) disable iff (!rst_n) wdma_start |-> wdma_req)
    else $error("pci_blaster: write start without request");
  a_rstart: assert property (@(posedge clk) disable iff (!rst_n) rdma_start |-> rdma_req)
    else $error("pci_blaster: read start without request");

endmodule
