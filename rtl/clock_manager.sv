// clock_manager: derives the SAMPA clocks from the 320 MHz input.
//
// The chip has three clock inputs, 320, 40 and 10 MHz, but only the
// 320 MHz one is needed: the 40 and 10 MHz clocks can be divided from it
// instead of taken from their pins, and the 32 MHz clock of the ring
// buffer / serial link interface is always divided from it. That much
// follows the SAMPA description; the divider construction, the static
// source selection and the reset synchronisers are this design's own.
//
// How it works: three free-running counters on clk320 divide by 10, 8 and
// 32 and drive registered, 50 % duty clocks. Because the 32 MHz clock is a
// divide-by-10 of clk320, every clk32 period holds exactly ten clk320
// periods, one per bit of a 10-bit word; word_load marks the clk320 cycle,
// in the middle of a clk32 period, at which the serialiser takes the next
// word. sel_ext40 / sel_ext10 pick the external pins instead of the
// dividers; they are meant to be static after reset. Each output domain
// gets its own reset, asserted asynchronously and released synchronously
// two clock edges after rst_n rises. (Lint reports that these flops drive
// asynchronous resets; that is their purpose.)
//
// Timing: the derived clocks are high during reset; clk32 rises on the
// clk320 edge on which div10 wraps to 0, the first time ten clk320 edges
// after reset;
// word_load is high during the clk320 cycle with div10 == 5.
module clock_manager (
  input  logic clk320,
  input  logic clk40_ext,
  input  logic clk10_ext,
  input  logic rst_n,       // asynchronous, active low
  input  logic sel_ext40,   // 1: use clk40_ext, 0: clk320 / 8
  input  logic sel_ext10,   // 1: use clk10_ext, 0: clk320 / 32
  output logic clk32,
  output logic clk40,
  output logic clk10,
  output logic word_load,   // clk320 domain: serialiser loads a word
  output logic rst320_n,
  output logic rst32_n,
  output logic rst40_n,
  output logic rst10_n
);

  logic [3:0] div10;
  logic [2:0] div8;
  logic [4:0] div32;
  logic       clk32_r, clk40_div, clk10_div;

  always_ff @(posedge clk320 or negedge rst_n)
    if (!rst_n) begin
      div10     <= '0;
      div8      <= '0;
      div32     <= '0;
      clk32_r   <= 1'b1;   // high in reset: the first rising edge
      clk40_div <= 1'b1;   // after reset comes a full period later
      clk10_div <= 1'b1;
    end else begin
      div10     <= (div10 == 4'd9) ? 4'd0 : div10 + 4'd1;
      div8      <= div8 + 3'd1;
      div32     <= div32 + 5'd1;
      clk32_r   <= (div10 == 4'd9) || (div10 < 4'd4);
      clk40_div <= (div8 == 3'd7) || (div8 < 3'd3);
      clk10_div <= (div32 == 5'd31) || (div32 < 5'd15);
    end

  assign clk32     = clk32_r;
  assign clk40     = sel_ext40 ? clk40_ext : clk40_div;
  assign clk10     = sel_ext10 ? clk10_ext : clk10_div;
  assign word_load = (div10 == 4'd5);

  // Reset synchronisers, one per clock domain.
  logic [1:0] s320, s32, s40, s10;

  always_ff @(posedge clk320 or negedge rst_n)
    if (!rst_n) s320 <= '0; else s320 <= {s320[0], 1'b1};
  always_ff @(posedge clk32 or negedge rst_n)
    if (!rst_n) s32 <= '0; else s32 <= {s32[0], 1'b1};
  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) s40 <= '0; else s40 <= {s40[0], 1'b1};
  always_ff @(posedge clk10 or negedge rst_n)
    if (!rst_n) s10 <= '0; else s10 <= {s10[0], 1'b1};

  assign rst320_n = s320[1];
  assign rst32_n  = s32[1];
  assign rst40_n  = s40[1];
  assign rst10_n  = s10[1];

endmodule
