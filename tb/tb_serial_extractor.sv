// Self-checking testbench of serial_extractor at its default size (63-bit
// LFSR, taps at cells 1 and 2).
//
// Feeds a biased raw bit stream (about 70 % ones) with random idle cycles and
// checks every generated bit against a reference that never models the
// register: it keeps the whole generated sequence x[], seeded with the reset
// cells, and extends it by x[n+63] = x[n] ^ x[n+1] ^ in[n]. It also checks the
// one-clock latency (gen_valid exactly one clock after each accepted input)
// and that idle cycles do not advance the register.
module tb_serial_extractor;
  import lfsr_extractor_pkg::*;

  localparam int unsigned N = LFSR_LEN;
  localparam int unsigned T = LFSR_TAP;
  localparam int unsigned NBITS = 4000;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_bit;
  logic gen_valid, gen_bit;

  int checks = 0;
  int failures = 0;

  serial_extractor dut (
    .clk, .rst_n, .in_valid, .in_bit, .gen_valid, .gen_bit
  );

  always #5 clk = ~clk;

  // Reference sequence of generated bits.
  bit seq[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted = 0;
    int stalls = 0;
    for (int j = 0; j < N; j++) seq.push_back(LFSR_SEED[j]);
    rst_n = 1'b0; in_valid = 1'b0; in_bit = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(gen_valid == 1'b0, "gen_valid low after reset");
    check(gen_bit == LFSR_SEED[N-1], "cell N holds seed after reset");
    while (accepted < NBITS) begin
      bit v, b;
      v = ($urandom_range(99) < 80);
      b = ($urandom_range(99) < 70);
      @(negedge clk);
      in_valid = v; in_bit = b;
      @(posedge clk);
      #1;
      check(gen_valid == v, "gen_valid one clock after in_valid");
      if (v) begin
        int n;
        n = seq.size() - N;
        seq.push_back(seq[n] ^ seq[n+T] ^ b);
        check(gen_bit == seq[$], "generated bit");
        accepted++;
      end else begin
        stalls++;
        check(gen_bit == seq[$], "stall holds the register");
      end
    end
    check(stalls > 0, "stalls exercised");
    $display("accepted=%0d stalls=%0d", accepted, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
