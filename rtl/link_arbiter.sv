// link_arbiter: shares one serial link among the ring buffers of a group
// of channels.
//
// The SAMPA has four serial links for its 32 channels; the description
// only shows the channels' ring buffers feeding the links. This block is
// this design's own: a round-robin arbiter on the 32 MHz clock that grants
// one whole packet at a time. When the link is free it grants the next
// requesting channel after the one served last; it then waits for that
// packet's eop word before granting again.
//
// Interface: req[i] and in[i] come from ring buffer i, gnt[i] goes back
// to it for one cycle. out is the word stream of the granted channel;
// when no packet is in flight out.valid is low.
module link_arbiter
  import sampa_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic       clk32,
  input  logic       rst_n,
  input  logic       req [N],
  output logic       gnt [N],
  input  link_word_t in  [N],
  output link_word_t out
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          busy;
  logic [IW-1:0] cur, last;
  logic          found;
  logic [IW-1:0] pick;

  // Round-robin choice, starting after the last served channel.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= int'(N); k++)
      if (!found && req[(int'(last) + k) % int'(N)]) begin
        found = 1'b1;
        pick  = IW'((int'(last) + k) % int'(N));
      end
  end

  always_comb
    for (int i = 0; i < int'(N); i++)
      gnt[i] = !busy && found && (pick == IW'(i));

  always_ff @(posedge clk32 or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      last <= IW'(N - 1);
    end else if (!busy) begin
      if (found) begin
        busy <= 1'b1;
        cur  <= pick;
        last <= pick;
      end
    end else if (in[cur].valid && in[cur].eop) begin
      busy <= 1'b0;
    end

  assign out = busy ? in[cur] : '0;

endmodule
