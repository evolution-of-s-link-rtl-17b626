// dma_arbiter: shares the PCI core's one DMA engine between the channels of
// the FILAR.
//
// When the engine is free, the next requesting channel after the one served
// last is chosen (round robin) and registered; its burst (address, byte
// count) is then offered to the engine until the engine's start.  From start
// to done the engine's word pops and its done pulse go to that channel, and
// the engine reads that channel's PCI Burst FIFO head.  eng_chan names the
// channel being offered or served.  One burst is served at a time; choosing a
// channel costs one cycle.  The document puts four cores behind one PCI
// controller; how they share it is this design's choice.
module dma_arbiter #(
  parameter int unsigned N_CH = 4,
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // channel side
  input  logic [N_CH-1:0] ch_req,
  input  logic [31:0]     ch_addr   [N_CH],
  input  logic [10:0]     ch_nbytes [N_CH],
  input  logic [63:0]     ch_rdata  [N_CH],
  output logic [N_CH-1:0] ch_start,
  output logic [N_CH-1:0] ch_rd,
  output logic [N_CH-1:0] ch_done,
  // engine side
  output logic            eng_req,
  output logic [31:0]     eng_addr,
  output logic [10:0]     eng_nbytes,
  output logic [CHW-1:0]  eng_chan,
  output logic [63:0]     eng_rdata,
  input  logic            eng_start,
  input  logic            eng_rd,
  input  logic            eng_done
);

  typedef enum logic [1:0] {A_IDLE, A_OFFER, A_BUSY} astate_t;
  astate_t        state;
  logic [CHW-1:0] sel, last, pick;
  logic           any;

  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int k = 1; k <= N_CH; k++) begin
      automatic int unsigned c = (int'(last) + k) % N_CH;
      if (!any && ch_req[c]) begin
        any  = 1'b1;
        pick = CHW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      sel   <= '0;
      last  <= CHW'(N_CH - 1);
    end else begin
      unique case (state)
        A_IDLE:  if (any) begin
                   sel   <= pick;
                   state <= A_OFFER;
                 end
        A_OFFER: if (eng_start) begin
                   last  <= sel;
                   state <= A_BUSY;
                 end
        A_BUSY:  if (eng_done) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  assign eng_req    = (state == A_OFFER) && ch_req[sel];
  assign eng_addr   = ch_addr[sel];
  assign eng_nbytes = ch_nbytes[sel];
  assign eng_chan   = sel;
  assign eng_rdata  = ch_rdata[sel];

  always_comb begin
    ch_start = '0;
    ch_rd    = '0;
    ch_done  = '0;
    ch_start[sel] = (state == A_OFFER) && eng_start;
    ch_rd[sel]    = (state == A_BUSY) && eng_rd;
    ch_done[sel]  = (state == A_BUSY) && eng_done;
  end

  a_start_on_req: assert property (@(posedge clk) disable iff (!rst_n)
    eng_start |-> eng_req) else $error("dma_arbiter: start without request");

endmodule
