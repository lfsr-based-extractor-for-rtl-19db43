// Shared constants of the LFSR randomness extractor.
//
// The extractor whitens a raw, biased bit stream from a physical random number
// generator by XORing every raw bit into the feedback of a maximal-length
// Fibonacci LFSR and emitting the generated bits, minus a fixed share that is
// dropped so that the output never claims more entropy than the input holds.
//
// Conventions used by every module of the design:
//   * LFSR cell j (numbered 1..N as in the structure drawings) is bit j-1 of
//     a state vector, so cell 1 (the oldest bit, about to leave) is bit 0.
//   * The feedback taps are cells 1 and 1+TAP. With N = 63 and TAP = 1 the
//     generated sequence obeys x[n+63] = x[n] ^ x[n+1] ^ in[n], i.e. the
//     characteristic trinomial x^63 + x + 1, which is primitive, so the LFSR
//     has the maximal period 2^63 - 1.
//   * In a multi-bit word the bit generated (or read) first sits at bit 0.
//
// The 63-bit length, the taps at cells 1 and 2, the 16-bit grouping with 12
// bits kept, and the 63-bit parallel word with 47 bits kept are the values of
// the reference design. The reset seed is this design's own choice.
package lfsr_extractor_pkg;

  // LFSR length (number of state cells).
  localparam int unsigned LFSR_LEN = 63;
  // Second tap sits TAP cells above cell 1 (taps at cells 1 and 2).
  localparam int unsigned LFSR_TAP = 1;

  // Serial extractor: generated bits are framed in groups of SER_GROUP,
  // of which the first SER_KEEP are output and the rest dropped.
  localparam int unsigned SER_GROUP = 16;
  localparam int unsigned SER_KEEP  = 12;

  // Parallel extractor: PAR_WIDTH bits in per clock, PAR_KEEP bits out.
  localparam int unsigned PAR_WIDTH = 63;
  localparam int unsigned PAR_KEEP  = 47;

  // Reset value of the LFSR cells (own choice: any value works, because the
  // raw input bits are XORed into the feedback; a non-zero seed keeps the
  // register from starting in the all-zero state).
  localparam logic [LFSR_LEN-1:0] LFSR_SEED = 63'h2B3C_4D5E_6F70_8192;

endpackage
