// Workload testbench: the whole design processing a raw stream shaped like a
// physical generator's output.
//
// The stand-in source produces 16-bit samples of a narrow bell-shaped
// distribution (the sum of four uniform 12-bit numbers, centred on 20000 in
// the 16-bit range). Its upper bits are nearly constant and its bits are strongly
// correlated, so the raw bit stream is biased and correlated. The same raw bit
// stream (samples sent bit 0 first) feeds both halves of lfsr_extractor_top at
// its default parameters: the serial half bit by bit, the parallel half 63
// bits per clock, both at full rate.
//
// Checks: every output word against the recurrence x[n+63] = x[n] ^ x[n+1] ^
// raw[n]; the raw stream really is biased or correlated (so the test means
// something); and each half's output stream is close to unbiased and free of
// adjacent-bit correlation (fraction of ones, and fraction of equal
// neighbouring bits, both within 0.5 +- 0.015, five or more standard deviations
// for the sample sizes here, and the raw stream must lie outside that band).
// This is a sanity check of the whitening, not a
// full randomness test suite.
module tb_workload_gaussian_source;
  import lfsr_extractor_pkg::*;

  localparam int unsigned N = LFSR_LEN;
  localparam int unsigned T = LFSR_TAP;
  localparam int unsigned G = SER_GROUP;
  localparam int unsigned SK = SER_KEEP;
  localparam int unsigned PW = PAR_WIDTH;
  localparam int unsigned PK = PAR_KEEP;
  localparam int unsigned SAMPLES = 16 * 63 * 6;      // 16-bit raw samples
  localparam int unsigned NRAW = SAMPLES * 16;        // = 1512 parallel words
  localparam int unsigned SER_BITS = 16 * 2500;       // serial half: 2500 groups

  int unsigned sk_rt = SK;
  int unsigned pw_rt = PW;
  int unsigned pk_rt = PK;
  int unsigned nraw_rt = NRAW;

  logic clk = 1'b0;
  logic rst_n;
  logic ser_in_valid, ser_in_bit;
  logic ser_word_valid;
  logic [SK-1:0] ser_word;
  logic par_in_valid;
  logic [PW-1:0] par_in_word;
  logic par_out_valid;
  logic [PK-1:0] par_out_word;

  int checks = 0;
  int failures = 0;

  lfsr_extractor_top dut (
    .clk, .rst_n,
    .ser_in_valid, .ser_in_bit, .ser_word_valid, .ser_word,
    .par_in_valid, .par_in_word, .par_out_valid, .par_out_word
  );

  always #5 clk = ~clk;

  bit raw[];
  bit seq[];
  bit ser_out[$];
  bit par_out[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Fraction of ones and of equal neighbours, in parts per 10000.
  function automatic void stats(ref bit s[$], output int ones_pm, output int eq_pm);
    longint ones = 0, eq = 0;
    foreach (s[i]) begin
      ones += s[i];
      if (i > 0 && s[i] == s[i-1]) eq++;
    end
    ones_pm = int'(ones * 10000 / s.size());
    eq_pm = int'(eq * 10000 / (s.size() - 1));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_serial();
    int unsigned sp = 0;
    int unsigned groups = 0;
    while (sp < SER_BITS || groups < SER_BITS / G) begin
      @(negedge clk);
      ser_in_valid = (sp < SER_BITS);
      ser_in_bit = (sp < SER_BITS) ? raw[sp] : 1'b0;
      if (sp < SER_BITS) sp++;
      @(posedge clk); #1;
      if (ser_word_valid) begin
        for (int unsigned i = 0; i < sk_rt; i++) begin
          ser_out.push_back(ser_word[i]);
          check(ser_word[i] == seq[N + groups * G + i], "serial word bit");
        end
        groups++;
      end
    end
    @(negedge clk) ser_in_valid = 1'b0;
  endtask

  task automatic run_parallel();
    for (int unsigned w = 0; w < NRAW / PW; w++) begin
      logic [PW-1:0] word;
      for (int unsigned i = 0; i < pw_rt; i++) word[i] = raw[w * PW + i];
      @(negedge clk);
      par_in_valid = 1'b1; par_in_word = word;
      @(posedge clk); #1;
      check(par_out_valid, "parallel word every clock");
      for (int unsigned i = 0; i < pk_rt; i++) begin
        par_out.push_back(par_out_word[i]);
        check(par_out_word[i] == seq[N + w * PW + i], "parallel word bit");
      end
    end
    @(negedge clk) par_in_valid = 1'b0;
  endtask

  initial begin
    bit raw_q[$];
    int ones_pm, eq_pm;
    raw = new[NRAW];
    seq = new[N + NRAW];
    for (int unsigned s = 0; s < SAMPLES; s++) begin
      int unsigned v;
      v = $urandom_range(4095) + $urandom_range(4095) + $urandom_range(4095)
        + $urandom_range(4095) + 20000 - 8190;
      for (int unsigned b = 0; b < 16; b++) raw[s * 16 + b] = v[b];
    end
    for (int unsigned j = 0; j < N; j++) seq[j] = LFSR_SEED[j];
    for (int unsigned n = 0; n < nraw_rt; n++) seq[N + n] = seq[n] ^ seq[n + T] ^ raw[n];
    foreach (raw[i]) raw_q.push_back(raw[i]);
    stats(raw_q, ones_pm, eq_pm);
    $display("raw stream:      ones=%0d/10000 equal-neighbours=%0d/10000", ones_pm, eq_pm);
    check(ones_pm < 4850 || ones_pm > 5150 || eq_pm < 4850 || eq_pm > 5150,
          "raw stream is visibly biased or correlated");

    rst_n = 1'b0;
    ser_in_valid = 1'b0; ser_in_bit = 1'b0;
    par_in_valid = 1'b0; par_in_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    fork
      run_serial();
      run_parallel();
    join

    stats(ser_out, ones_pm, eq_pm);
    $display("serial output:   %0d bits, ones=%0d/10000 equal-neighbours=%0d/10000",
             ser_out.size(), ones_pm, eq_pm);
    check(ser_out.size() == SER_BITS / G * SK, "serial kept 12 of every 16 bits");
    check(ones_pm > 4850 && ones_pm < 5150, "serial output unbiased");
    check(eq_pm > 4850 && eq_pm < 5150, "serial output uncorrelated");
    stats(par_out, ones_pm, eq_pm);
    $display("parallel output: %0d bits, ones=%0d/10000 equal-neighbours=%0d/10000",
             par_out.size(), ones_pm, eq_pm);
    check(par_out.size() == NRAW / PW * PK, "parallel kept 47 of every 63 bits");
    check(ones_pm > 4850 && ones_pm < 5150, "parallel output unbiased");
    check(eq_pm > 4850 && eq_pm < 5150, "parallel output uncorrelated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
