// Self-checking testbench of drop_framer at its default size (groups of 16
// bits, 12 kept, 4 dropped).
//
// Streams random bits with random gaps and keeps its own list of all bits
// accepted. Every word must equal bits 16m .. 16m+11 of that list (first bit
// on word[0]) and must appear exactly one clock after the 16th bit of its
// group was accepted; no word may appear at any other time. Afterwards it
// checks that the number of words is the number of complete groups, i.e. that
// exactly 4 of every 16 bits were dropped.
module tb_drop_framer;
  import lfsr_extractor_pkg::*;

  localparam int unsigned G = SER_GROUP;
  localparam int unsigned K = SER_KEEP;
  localparam int unsigned NBITS = 16 * 300 + 5;

  logic clk = 1'b0;
  logic rst_n;
  logic bit_valid, bit_in;
  logic word_valid;
  logic [K-1:0] word;

  int checks = 0;
  int failures = 0;

  drop_framer dut (.clk, .rst_n, .bit_valid, .bit_in, .word_valid, .word);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit stream[$];
    int words = 0;
    int dropped = 0;
    rst_n = 1'b0; bit_valid = 1'b0; bit_in = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(word_valid == 1'b0, "no word after reset");
    while (stream.size() < NBITS) begin
      bit v, b;
      v = ($urandom_range(99) < 75);
      b = $urandom_range(1);
      @(negedge clk);
      bit_valid = v; bit_in = b;
      @(posedge clk);
      #1;
      if (v) begin
        stream.push_back(b);
        if ((stream.size() - 1) % G >= K) dropped++;
      end
      if (v && stream.size() % G == 0) begin
        logic [K-1:0] exp;
        int base;
        base = stream.size() - G;
        for (int i = 0; i < K; i++) exp[i] = stream[base + i];
        check(word_valid == 1'b1, "word one clock after 16th bit");
        check(word == exp, "word holds the first 12 bits of the group");
        words++;
      end else begin
        check(word_valid == 1'b0, "no word mid-group");
      end
    end
    @(negedge clk) bit_valid = 1'b0;
    repeat (3) begin
      @(posedge clk); #1;
      check(word_valid == 1'b0, "no word while idle");
    end
    check(words == NBITS / G, "one word per complete group");
    check(dropped == (NBITS / G) * (G - K) + (NBITS % G > K ? NBITS % G - K : 0),
          "4 of every 16 bits dropped");
    $display("words=%0d dropped=%0d", words, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
