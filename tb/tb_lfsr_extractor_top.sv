// End-to-end testbench of lfsr_extractor_top at its default parameters (63-bit
// LFSR x^63 + x + 1; serial half 16-bit groups with 12 kept; parallel half
// 63 bits in, 47 out).
//
// A biased raw stream (each bit one with probability about 0.7, standing in
// for an unprocessed physical generator) is produced up front. The serial half
// reads it one bit per clock and the parallel half 63 bits per clock, both
// with random idle cycles and both starting from the reset seed. The reference
// extends the generated sequence x[] with x[n+63] = x[n] ^ x[n+1] ^ raw[n];
// because both halves see the same raw stream, both must reproduce this same
// sequence: serial word m is x[63+16m .. 63+16m+11], parallel word w is
// x[63+63w .. 63+63w+46]. Latencies are checked (serial word two clocks after
// the 16th raw bit of its group, parallel word one clock after its input word),
// and each mechanism is counted: stalls of each half, dropped bits of each
// half, back-to-back parallel words. One that never happens is a failure.
module tb_lfsr_extractor_top;
  import lfsr_extractor_pkg::*;

  localparam int unsigned N = LFSR_LEN;
  localparam int unsigned T = LFSR_TAP;
  localparam int unsigned G = SER_GROUP;
  localparam int unsigned SK = SER_KEEP;
  localparam int unsigned PW = PAR_WIDTH;
  localparam int unsigned PK = PAR_KEEP;
  localparam int unsigned SER_GROUPS = 250;
  localparam int unsigned PAR_WORDS = 300;

  // Loop bounds kept in variables so the simulator does not unroll loops.
  int unsigned sk_rt = SK;
  int unsigned pw_rt = PW;
  int unsigned pk_rt = PK;

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
  int ser_stalls = 0, par_stalls = 0, par_back_to_back = 0;
  int ser_words = 0, par_words = 0, ser_dropped = 0, par_dropped = 0;

  lfsr_extractor_top dut (
    .clk, .rst_n,
    .ser_in_valid, .ser_in_bit, .ser_word_valid, .ser_word,
    .par_in_valid, .par_in_word, .par_out_valid, .par_out_word
  );

  always #5 clk = ~clk;

  bit raw[];
  bit seq[];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The serial word leaves two clocks after the last raw bit of its group is
  // read: one clock through the LFSR cell, one through the framer.
  task automatic drive_serial();
    int unsigned sp = 0;
    bit due = 0;
    logic [SK-1:0] due_word = '0;
    while (sp < SER_GROUPS * G || due) begin
      bit v;
      v = (sp < SER_GROUPS * G) && ($urandom_range(99) < 80);
      @(negedge clk);
      ser_in_valid = v;
      ser_in_bit = v ? raw[sp] : 1'b0;
      @(posedge clk);
      #1;
      check(ser_word_valid == due, "serial word two clocks after last bit of group");
      if (due) begin
        check(ser_word == due_word, "serial word");
        ser_words++;
      end
      due = 0;
      if (!v && sp < SER_GROUPS * G) ser_stalls++;
      if (v) begin
        sp++;
        if ((sp - 1) % G >= SK) ser_dropped++;
        if (sp % G == 0) begin
          due = 1;
          for (int unsigned i = 0; i < sk_rt; i++) due_word[i] = seq[N + sp - G + i];
        end
      end
    end
    @(negedge clk) ser_in_valid = 1'b0;
  endtask

  task automatic drive_parallel();
    int unsigned wp = 0;
    bit prev_v = 0;
    while (wp < PAR_WORDS) begin
      bit v;
      logic [PW-1:0] w;
      v = ($urandom_range(99) < 75);
      for (int unsigned i = 0; i < pw_rt; i++) w[i] = raw[wp * PW + i];
      @(negedge clk);
      par_in_valid = v;
      par_in_word = v ? w : '0;
      @(posedge clk);
      #1;
      check(par_out_valid == v, "parallel word one clock after its input");
      if (v) begin
        logic [PK-1:0] exp;
        for (int unsigned i = 0; i < pk_rt; i++) exp[i] = seq[N + wp * PW + i];
        check(par_out_word == exp, "parallel word");
        if (prev_v) par_back_to_back++;
        par_words++;
        par_dropped += PW - PK;
        wp++;
      end else begin
        par_stalls++;
      end
      prev_v = v;
    end
    @(negedge clk) par_in_valid = 1'b0;
  endtask

  initial begin
    int unsigned nraw;
    nraw = PAR_WORDS * PW;
    raw = new[nraw];
    seq = new[N + nraw];
    foreach (raw[i]) raw[i] = ($urandom_range(99) < 70);
    for (int unsigned j = 0; j < N; j++) seq[j] = LFSR_SEED[j];
    for (int unsigned n = 0; n < nraw; n++) seq[N + n] = seq[n] ^ seq[n + T] ^ raw[n];

    rst_n = 1'b0;
    ser_in_valid = 1'b0; ser_in_bit = 1'b0;
    par_in_valid = 1'b0; par_in_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!ser_word_valid && !par_out_valid, "outputs idle after reset");

    fork
      drive_serial();
      drive_parallel();
    join

    check(ser_words == SER_GROUPS, "all serial words seen");
    check(par_words == PAR_WORDS, "all parallel words seen");
    check(ser_stalls > 0, "serial stall happened");
    check(par_stalls > 0, "parallel stall happened");
    check(par_back_to_back > 0, "back-to-back parallel words happened");
    check(ser_dropped == SER_GROUPS * (G - SK), "serial half dropped 4 of every 16 bits");
    check(par_dropped > 0, "parallel half dropped bits");
    $display("serial: words=%0d dropped_bits=%0d stalls=%0d", ser_words, ser_dropped, ser_stalls);
    $display("parallel: words=%0d dropped_bits=%0d stalls=%0d back_to_back=%0d",
             par_words, par_dropped, par_stalls, par_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
