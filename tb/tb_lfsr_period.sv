// Maximal-period check of the extractor LFSR at sizes small enough to walk a
// whole period.
//
// With the raw input held at 0 the extractor is a bare Fibonacci LFSR. The
// default 63-cell register (x^63 + x + 1) has period 2^63 - 1, which cannot be
// simulated, so the same RTL is run with 7 cells and the same tap spacing
// (x^7 + x + 1, also primitive): the serial version must return to its seed
// after exactly 127 steps and not before, and must visit 127 distinct
// non-zero states. The parallel version with N = K = 7 must return after
// exactly 127 words, since 7 steps per word and 7 is coprime to 127.
// A second pair of checks feeds all-ones input and compares the serial and
// parallel versions against each other over 200 words.
module tb_lfsr_period;

  localparam int unsigned N = 7;
  localparam logic [N-1:0] SEED = 7'h01;

  logic clk = 1'b0;
  logic rst_n;
  logic s_valid, s_bit, s_gvalid, s_gbit;
  logic p_valid;
  logic [N-1:0] p_word;
  logic p_ovalid;
  logic [N-1:0] p_out;

  int checks = 0;
  int failures = 0;

  serial_extractor #(.N(N), .TAP(1), .SEED(SEED)) u_ser (
    .clk, .rst_n, .in_valid(s_valid), .in_bit(s_bit),
    .gen_valid(s_gvalid), .gen_bit(s_gbit)
  );

  parallel_extractor #(.N(N), .K(N), .KEEP(N), .TAP(1), .SEED(SEED)) u_par (
    .clk, .rst_n, .in_valid(p_valid), .in_word(p_word),
    .out_valid(p_ovalid), .out_word(p_out)
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen[128];
    int steps;
    int distinct;
    bit ser_bits[$];
    rst_n = 1'b0; s_valid = 1'b0; s_bit = 1'b0; p_valid = 1'b0; p_word = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Serial, zero input: walk one full period.
    steps = 0; distinct = 0;
    foreach (seen[i]) seen[i] = 1'b0;
    do begin
      @(negedge clk); s_valid = 1'b1; s_bit = 1'b0;
      @(posedge clk); #1;
      steps++;
      if (!seen[u_ser.cells]) distinct++;
      seen[u_ser.cells] = 1'b1;
      check(u_ser.cells != '0, "serial LFSR never reaches all-zero");
    end while (u_ser.cells != SEED && steps < 300);
    check(steps == 127, "serial period is 2^7 - 1");
    check(distinct == 127, "serial visits 127 distinct states");
    @(negedge clk) s_valid = 1'b0;

    // Parallel, zero input: 7 steps per word, back at the seed after 127 words.
    steps = 0;
    do begin
      @(negedge clk); p_valid = 1'b1; p_word = '0;
      @(posedge clk); #1;
      steps++;
    end while (p_out != SEED && steps < 300);
    check(steps == 127, "parallel period is 127 words");
    @(negedge clk) p_valid = 1'b0;

    // Both from reset again, all-ones input: serial bits cut into 7-bit words
    // must equal the parallel words.
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      logic [N-1:0] exp;
      for (int i = 0; i < N; i++) begin
        @(negedge clk); s_valid = 1'b1; s_bit = 1'b1;
        @(posedge clk); #1;
        ser_bits.push_back(s_gbit);
      end
      @(negedge clk); s_valid = 1'b0; p_valid = 1'b1; p_word = '1;
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) exp[i] = ser_bits[w * N + i];
      check(p_out == exp, "parallel word equals 7 serial steps");
      @(negedge clk) p_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
