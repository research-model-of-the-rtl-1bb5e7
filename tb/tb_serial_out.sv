// tb_serial_out: self-checking test of the serialiser.
//
// A word source on clk32 (clk320 / 10, as the clock manager makes it)
// presents packet words and idle cycles; a receiver on clk320 rebuilds the
// 10-bit words, LSB first, each 10 clk320 cycles after a word_load. Every
// received word must equal the word presented (the idle word 0 when no
// word was valid), at one word per clk32 period, and word_cnt must count
// the valid words.
`timescale 1ns/1ps
module tb_serial_out;
  import sampa_pkg::*;

  logic clk320 = 0, rst_n = 0;
  always #1.5625 clk320 = ~clk320;

  logic [3:0] div = 0;
  logic clk32 = 0, word_load;
  always @(posedge clk320) begin
    div   <= (div == 9) ? 0 : div + 1;
    clk32 <= (div == 9) || (div < 4);
  end
  assign word_load = (div == 5);

  link_word_t word;
  logic       sout;
  logic [31:0] word_cnt;

  serial_out dut (.clk320, .rst_n, .word_load, .word, .sout, .word_cnt);

  int checks = 0, failures = 0;
  word_t sent [$];
  int    nvalid = 0;

  // Source: a new word on every clk32 edge.
  always @(posedge clk32) if (rst_n) begin
    word.valid <= ($urandom_range(0, 3) != 0);
    word.data  <= word_t'($urandom);
    word.sop   <= 0;
    word.eop   <= 0;
  end

  // What the serialiser loads, recorded independently.
  always @(posedge clk320) if (rst_n && word_load) begin
    sent.push_back(word.valid ? word.data : IDLE_WORD);
    if (word.valid) nvalid++;
  end

  // Receiver: collects ten bits after each load.
  int    bitn = -1;
  word_t rx;
  always @(negedge clk320) if (rst_n) begin
    if (bitn >= 0) begin
      rx[bitn] = sout;
      bitn++;
      if (bitn == 10) begin
        checks++;
        if (sent.size() == 0 || rx != sent[0]) begin
          failures++;
          if (failures < 5) $display("FAIL received %h expected %h", rx, sent.size() ? sent[0] : 10'h3FF);
        end
        if (sent.size()) void'(sent.pop_front());
        bitn = 0;
      end
    end
  end
  always @(posedge clk320) if (rst_n && word_load && bitn < 0) bitn <= 0;

  initial begin : watchdog
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word = '0;
    #10 rst_n = 1;
    #20us;
    checks++;
    if (word_cnt != 32'(nvalid)) begin failures++; $display("FAIL word_cnt %0d expected %0d", word_cnt, nvalid); end
    checks++;
    if (checks < 500) begin failures++; $display("FAIL only %0d words", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
