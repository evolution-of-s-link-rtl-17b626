// pci_dma_model: behavioural model of the PCI core's DMA engine and of host
// memory, for testbenches only (kind: behavioural model; the real part is
// a commercial PCI IP core).
//
// When dma_req is high the model waits START_LAT cycles, pulses dma_start,
// then pops ceil(nbytes/8) 64-bit words through dma_rd, skipping a cycle with
// probability stall_pct/100 (PCI wait states, retries, other bus masters).
// Each word is reported on wr_valid/wr_addr/wr_data/wr_chan so the testbench
// can keep its own copy of host memory.  One cycle after the last word
// dma_done pulses.  Bursts and the longest burst are counted.
module pci_dma_model #(
  parameter int unsigned START_LAT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  stall_pct,
  input  logic        dma_req,
  input  logic [31:0] dma_addr,
  input  logic [10:0] dma_nbytes,
  input  logic [1:0]  dma_chan,
  output logic        dma_start,
  output logic        dma_rd,
  input  logic [63:0] dma_rdata,
  output logic        dma_done,
  output logic        wr_valid,
  output logic [31:0] wr_addr,
  output logic [63:0] wr_data,
  output logic [1:0]  wr_chan,
  output int          bursts,
  output int          max_burst_bytes
);

  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_XFER, M_DONE} mstate_t;
  mstate_t     st;
  int          wait_cnt, words_left;
  logic [31:0] cur_addr;
  logic [1:0]  cur_chan;
  logic        go;

  always_ff @(posedge clk) go <= ($urandom_range(99) >= int'(stall_pct));

  assign dma_start = (st == M_WAIT) && (wait_cnt == 0) && dma_req;
  assign dma_rd    = (st == M_XFER) && go && (words_left > 0);
  assign dma_done  = (st == M_DONE);
  assign wr_valid  = dma_rd;
  assign wr_addr   = cur_addr;
  assign wr_data   = dma_rdata;
  assign wr_chan   = cur_chan;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; wait_cnt <= 0; words_left <= 0; cur_addr <= '0; cur_chan <= '0;
      bursts <= 0; max_burst_bytes <= 0;
    end else begin
      unique case (st)
        M_IDLE: if (dma_req) begin st <= M_WAIT; wait_cnt <= int'(START_LAT); end
        M_WAIT: if (wait_cnt != 0) wait_cnt <= wait_cnt - 1;
                else if (dma_req) begin
                  st         <= M_XFER;
                  words_left <= (int'(dma_nbytes) + 7) / 8;
                  cur_addr   <= dma_addr;
                  cur_chan   <= dma_chan;
                  bursts     <= bursts + 1;
                  if (int'(dma_nbytes) > max_burst_bytes) max_burst_bytes <= int'(dma_nbytes);
                end
        M_XFER: begin
                  if (dma_rd) begin
                    words_left <= words_left - 1;
                    cur_addr   <= cur_addr + 8;
                  end
                  if (words_left == 0 || (dma_rd && words_left == 1)) st <= M_DONE;
                end
        M_DONE: st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
