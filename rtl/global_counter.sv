// global_counter: the chip-wide 20-bit time counter.
//
// A 20-bit binary counter clocked at 40 MHz gives the time reference
// stamped into every packet header as the start time of its window; it
// wraps after 2^20 counts (26.2 ms). The width and the 40 MHz clock follow
// the SAMPA description. Reset to zero and the enable input are this
// design's own. The count is read in other clock domains through
// gray_sync, which is why it must move by at most one per clock.
//
// Interface: count is a register, updated on every clk40 edge with en high.
module global_counter #(
  parameter int unsigned W = 20
) (
  input  logic         clk40,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] count
);

  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;

endmodule
