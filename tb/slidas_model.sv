// slidas_model: behavioural S-LINK data source for testbenches (kind:
// behavioural model of a stand-alone data generator and link card).
//
// send_packet() sends a begin control word, n data words base, base+1, ...,
// and an end control word, one word per cycle with a gap of up to max_gap
// idle cycles between words (words change on the falling clock edge).  The source obeys XOFF with XOFF_LAT cycles of
// delay, like a link card that still has words in flight when it sees XOFF.
// xoff_cycles counts cycles in which the source was held off.
module slidas_model #(
  parameter int unsigned XOFF_LAT = 4
) (
  input  logic        clk,
  input  logic        xoff,
  output logic        valid,
  output logic        ctrl,
  output logic [31:0] data,
  output int          xoff_cycles
);

  logic [XOFF_LAT-1:0] xoff_pipe = '0;
  int max_gap = 0;

  initial begin
    valid = 1'b0; ctrl = 1'b0; data = '0; xoff_cycles = 0;
  end

  always_ff @(posedge clk) xoff_pipe <= {xoff_pipe[XOFF_LAT-2:0], xoff};

  // Words change on the falling edge, so the DUT samples each once.
  task automatic send_word(input logic c, input logic [31:0] w);
    @(negedge clk);
    while (xoff_pipe[XOFF_LAT-1]) begin
      xoff_cycles++;
      valid = 1'b0;
      @(negedge clk);
    end
    valid = 1'b1; ctrl = c; data = w;
    if (max_gap > 0) repeat ($urandom_range(max_gap)) begin
      @(negedge clk);
      valid = 1'b0;
    end
  endtask

  task automatic send_packet(input logic [31:0] bw, input logic [31:0] ew,
                             input int n, input logic [31:0] base);
    send_word(1'b1, bw);
    for (int j = 0; j < n; j++) send_word(1'b0, base + 32'(j));
    send_word(1'b1, ew);
    @(negedge clk);
    valid = 1'b0; ctrl = 1'b0;
  endtask

endmodule
