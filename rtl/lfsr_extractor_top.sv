// LFSR randomness extractor: serial and parallel versions side by side.
//
// Both halves turn a biased, correlated raw bit stream from a physical random
// number generator into a whitened one by XORing the raw bits into the
// feedback of the maximal-length 63-bit LFSR x^63 + x + 1 and dropping a
// quarter of the generated bits:
//
//   serial half   - serial_extractor (1 raw bit in, 1 generated bit per clock)
//                   followed by drop_framer (12 of every 16 generated bits
//                   leave as a 12-bit word, 4 are dropped);
//   parallel half - parallel_extractor (63 raw bits in per clock, 63 bits
//                   generated per clock, 47 leave, 16 are dropped).
//
// The two halves have their own inputs and outputs; the random number
// generator itself is outside this design. Fed the same raw stream from the
// same seed, both produce the same generated sequence: the parallel half is
// 63 serial steps per clock. Timing: the serial word appears two clocks after
// the 16th raw bit of its group is read (one in the LFSR, one in the framer); the parallel word one clock after its
// raw word is read. All flops share clk and the synchronous active-low rst_n.
//
// Putting both versions in one top is this design's own arrangement; each
// version on its own follows the reference structure.
module lfsr_extractor_top #(
  parameter int unsigned N         = lfsr_extractor_pkg::LFSR_LEN,
  parameter int unsigned TAP       = lfsr_extractor_pkg::LFSR_TAP,
  parameter int unsigned SER_GROUP = lfsr_extractor_pkg::SER_GROUP,
  parameter int unsigned SER_KEEP  = lfsr_extractor_pkg::SER_KEEP,
  parameter int unsigned PAR_WIDTH = lfsr_extractor_pkg::PAR_WIDTH,
  parameter int unsigned PAR_KEEP  = lfsr_extractor_pkg::PAR_KEEP
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // serial extractor
  input  logic                 ser_in_valid,
  input  logic                 ser_in_bit,
  output logic                 ser_word_valid,
  output logic [SER_KEEP-1:0]  ser_word,
  // parallel extractor
  input  logic                 par_in_valid,
  input  logic [PAR_WIDTH-1:0] par_in_word,
  output logic                 par_out_valid,
  output logic [PAR_KEEP-1:0]  par_out_word
);

  logic gen_valid;
  logic gen_bit;

  serial_extractor #(.N(N), .TAP(TAP)) u_serial (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ser_in_valid),
    .in_bit   (ser_in_bit),
    .gen_valid(gen_valid),
    .gen_bit  (gen_bit)
  );

  drop_framer #(.GROUP(SER_GROUP), .KEEP(SER_KEEP)) u_framer (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (gen_valid),
    .bit_in    (gen_bit),
    .word_valid(ser_word_valid),
    .word      (ser_word)
  );

  parallel_extractor #(.N(N), .K(PAR_WIDTH), .KEEP(PAR_KEEP), .TAP(TAP)) u_parallel (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (par_in_valid),
    .in_word  (par_in_word),
    .out_valid(par_out_valid),
    .out_word (par_out_word)
  );

endmodule
