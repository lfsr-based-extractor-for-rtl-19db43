// Testbench of parallel_extractor in a narrower configuration than the
// default: a 63-cell LFSR producing K = 21 bits per clock (K < N), of which
// KEEP = 16 leave. Such a register needs N + K = 84 cells, 63 of them
// flip-flops.
//
// Each accepted 21-bit raw word must advance the generated sequence
// x[n+63] = x[n] ^ x[n+1] ^ raw[n] by 21 steps, and the output must hold the
// first 16 of those 21 new bits, one clock after the word was read. Random
// idle cycles check that the register holds while no input arrives.
module tb_parallel_extractor_narrow;
  import lfsr_extractor_pkg::*;

  localparam int unsigned N = LFSR_LEN;
  localparam int unsigned K = 21;
  localparam int unsigned KEEP = 16;
  localparam int unsigned T = LFSR_TAP;
  localparam int unsigned NWORDS = 3000;

  int unsigned k_rt = K;
  int unsigned keep_rt = KEEP;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [K-1:0] in_word;
  logic out_valid;
  logic [KEEP-1:0] out_word;

  int checks = 0;
  int failures = 0;

  parallel_extractor #(.K(K), .KEEP(KEEP)) dut (
    .clk, .rst_n, .in_valid, .in_word, .out_valid, .out_word
  );

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
    logic [KEEP-1:0] last_exp;
    for (int j = 0; j < N; j++) seq.push_back(LFSR_SEED[j]);
    // After reset the output shows cells N-K+1 .. N-K+KEEP of the seed.
    last_exp = LFSR_SEED[N-K +: KEEP];
    rst_n = 1'b0; in_valid = 1'b0; in_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(out_valid == 1'b0 && out_word == last_exp, "reset state");
    while (accepted < NWORDS) begin
      bit v;
      logic [K-1:0] w;
      v = ($urandom_range(99) < 80);
      for (int unsigned i = 0; i < k_rt; i++) w[i] = ($urandom_range(99) < 65);
      @(negedge clk);
      in_valid = v; in_word = w;
      @(posedge clk);
      #1;
      check(out_valid == v, "out_valid one clock after in_valid");
      if (v) begin
        int first;
        first = seq.size();
        for (int unsigned i = 0; i < k_rt; i++) begin
          int n;
          n = seq.size() - N;
          seq.push_back(seq[n] ^ seq[n+T] ^ w[i]);
        end
        for (int unsigned i = 0; i < keep_rt; i++) last_exp[i] = seq[first + i];
        accepted++;
      end else begin
        stalls++;
      end
      check(out_word == last_exp, v ? "output word" : "stall holds output");
    end
    check(stalls > 0, "stalls exercised");
    $display("accepted=%0d stalls=%0d", accepted, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
