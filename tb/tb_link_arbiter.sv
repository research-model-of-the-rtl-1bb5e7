// tb_link_arbiter: self-checking test of the packet arbiter of a link.
//
// Eight packet sources behave like ring buffers: while a source has
// packets it raises req; on gnt it drops req and, two cycles later, sends
// its next packet (sop ... eop, id and sequence number in the words). The
// output stream must hold whole packets without interleaving, every packet
// exactly once and in order per source, grants must rotate (no source
// served twice while another waits), and gnt must only go to a requester.
`timescale 1ns/1ps
module tb_link_arbiter;
  import sampa_pkg::*;

  localparam int N = 8;

  logic clk32 = 0, rst_n = 0;
  always #15.625 clk32 = ~clk32;

  logic       req [N];
  logic       gnt [N];
  link_word_t in  [N];
  link_word_t out;

  link_arbiter #(.N(N)) dut (.clk32, .rst_n, .req, .gnt, .in, .out);

  int checks = 0, failures = 0;
  int pending [N];
  int seq [N];
  int rx_seq [N];

  for (genvar i = 0; i < N; i++) begin : g_src
    int state = 0;   // 0 idle, 1..2 wait, 3.. sending
    int len = 0, k = 0;
    always @(posedge clk32) if (rst_n) begin
      in[i] <= '0;
      if (state == 0) begin
        if (gnt[i]) begin
          if (!req[i]) begin failures++; $display("FAIL gnt without req on %0d", i); end
          state <= 1; len <= 1 + (seq[i] % 7); k <= 0;
        end
      end else if (state < 2) begin
        state <= state + 1;
      end else begin
        in[i] <= '{valid: 1'b1, sop: (k == 0), eop: (k == len - 1),
                   data: word_t'(i * 64 + seq[i] % 64)};
        k <= k + 1;
        if (k == len - 1) begin
          state <= 0; pending[i] <= pending[i] - 1; seq[i] <= seq[i] + 1;
        end
      end
    end
    assign req[i] = (state == 0) && pending[i] > 0;
  end

  // Checker.
  int cur = -1;
  int served_since [N];
  always @(posedge clk32) if (rst_n) begin
    for (int i = 0; i < N; i++) if (gnt[i]) begin
      // Rotation: a waiting source may see at most one grant per other source.
      for (int j = 0; j < N; j++)
        if (j != i && req[j]) begin
          served_since[j]++;
          checks++;
          if (served_since[j] > N - 1) begin failures++; $display("FAIL source %0d starved", j); end
        end
      served_since[i] = 0;
    end
    if (out.valid) begin
      int id, sq;
      id = int'(out.data) / 64; sq = int'(out.data) % 64;
      if (out.sop) begin
        checks++;
        if (cur != -1) begin failures++; $display("FAIL packets interleaved"); end
        cur = id;
        checks++;
        if (sq != rx_seq[id] % 64) begin failures++; $display("FAIL source %0d packet %0d out of order", id, sq); end
      end
      checks++;
      if (id != cur) begin failures++; $display("FAIL word of source %0d inside packet of %0d", id, cur); end
      if (out.eop) begin cur = -1; rx_seq[id]++; end
    end
  end

  initial begin : watchdog
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < N; i++) begin pending[i] = 0; seq[i] = 0; rx_seq[i] = 0; served_since[i] = 0; end
    #100 rst_n = 1;
    // All sources busy at once, then random refills.
    for (int i = 0; i < N; i++) pending[i] = 5;
    repeat (50) begin
      #1000;
      pending[$urandom_range(0, N - 1)] += $urandom_range(0, 3);
    end
    #20us;
    total = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pending[i] != 0 || rx_seq[i] != seq[i]) begin
        failures++; $display("FAIL source %0d: %0d pending, %0d sent, %0d received", i, pending[i], seq[i], rx_seq[i]);
      end
      total += rx_seq[i];
    end
    checks++;
    if (total < 40) begin failures++; $display("FAIL only %0d packets", total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
