// Self-checking testbench of parallel_extractor at its default size (63-bit
// LFSR, 63 raw bits in and 47 bits out per clock, 16 dropped).
//
// Raw words are biased (each bit one with probability about 0.7) and arrive
// with random idle cycles. The reference is the serial recurrence
// x[n+63] = x[n] ^ x[n+1] ^ in[n] over the whole generated sequence, started
// from the reset cells; after each accepted word the output must hold the
// first 47 of the 63 bits that word generated. It checks the one-clock
// latency, one word per clock when input arrives back to back, and that idle
// cycles hold the register.
module tb_parallel_extractor;
  import lfsr_extractor_pkg::*;

  localparam int unsigned N = LFSR_LEN;
  localparam int unsigned K = PAR_WIDTH;
  localparam int unsigned KEEP = PAR_KEEP;
  localparam int unsigned T = LFSR_TAP;
  localparam int unsigned NWORDS = 1500;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [K-1:0] in_word;
  logic out_valid;
  logic [KEEP-1:0] out_word;

  // Loop bound kept in a variable so the simulator does not unroll the
  // reference loops.
  int unsigned k_rt = K;
  int unsigned keep_rt = KEEP;

  int checks = 0;
  int failures = 0;

  parallel_extractor dut (.clk, .rst_n, .in_valid, .in_word, .out_valid, .out_word);

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
    bit seq[$];
    int accepted = 0;
    int stalls = 0;
    int back_to_back = 0;
    bit prev_v = 0;
    logic [KEEP-1:0] last_exp;
    for (int j = 0; j < N; j++) seq.push_back(LFSR_SEED[j]);
    last_exp = LFSR_SEED[KEEP-1:0];
    rst_n = 1'b0; in_valid = 1'b0; in_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(out_valid == 1'b0, "out_valid low after reset");
    while (accepted < NWORDS) begin
      bit v;
      logic [K-1:0] w;
      v = ($urandom_range(99) < 70);
      for (int i = 0; i < k_rt; i++) w[i] = ($urandom_range(99) < 70);
      @(negedge clk);
      in_valid = v; in_word = w;
      @(posedge clk);
      #1;
      check(out_valid == v, "out_valid one clock after in_valid");
      if (v) begin
        int first;
        first = seq.size();
        for (int i = 0; i < k_rt; i++) begin
          int n;
          n = seq.size() - N;
          seq.push_back(seq[n] ^ seq[n+T] ^ w[i]);
        end
        for (int i = 0; i < keep_rt; i++) last_exp[i] = seq[first + i];
        accepted++;
        if (prev_v) back_to_back++;
      end else begin
        stalls++;
      end
      check(out_word == last_exp, v ? "output word" : "stall holds output");
      prev_v = v;
    end
    check(stalls > 0 && back_to_back > 0, "stalls and back-to-back words exercised");
    $display("accepted=%0d stalls=%0d back_to_back=%0d", accepted, stalls, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
