// Parallel LFSR randomness extractor.
//
// Each clock with in_valid high it reads a K-bit raw word from the random
// number generator (bit i-1 = input i), lets the XOR module generate the next K
// bits of the LFSR sequence X[N+1..N+K], and shifts the register K places
// forward: cell j takes X[j+K]. For the reference configuration (N = K = 63)
// this replaces all 63 cells by the 63 new bits (64 -> 1, 65 -> 2, ...), which
// is exactly 63 steps of the serial extractor in one clock.
//
// The cells holding the K most recently generated bits are the output; of
// them the first KEEP (cells 1..47 for the reference design) leave on out_word
// and the remaining K-KEEP (cells 48..63) are dropped, so that no more bits
// leave than the input carries entropy for (12 of every 16 in the reference
// measurement; 47/63 is the nearest whole-word share).
//
// Interface and timing: in_valid/in_word in, out_valid/out_word out. There is
// no back-pressure: a word read on a rising edge appears on out_word after that
// edge with out_valid high for exactly one cycle, i.e. latency one clock and a
// throughput of one word (KEEP bits) per clock. With in_valid low the register
// holds and out_valid goes low (a stall). Reset (active-low, synchronous) loads
// SEED and clears out_valid.
//
// The register, the XOR equations, the 63-bit word and the 47/16 split are the
// reference structure. The valid handshake, the reset and its seed, and the
// choice of cells for K < N are this design's own.
module parallel_extractor #(
  parameter int unsigned   N    = lfsr_extractor_pkg::LFSR_LEN,
  parameter int unsigned   K    = lfsr_extractor_pkg::PAR_WIDTH,
  parameter int unsigned   KEEP = lfsr_extractor_pkg::PAR_KEEP,
  parameter int unsigned   TAP  = lfsr_extractor_pkg::LFSR_TAP,
  parameter logic [N-1:0]  SEED = lfsr_extractor_pkg::LFSR_SEED
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [K-1:0]    in_word,
  output logic            out_valid,
  output logic [KEEP-1:0] out_word
);

  if (KEEP > K || KEEP == 0) begin : g_bad_keep
    $error("parallel_extractor: need 0 < KEEP <= K");
  end

  logic [N-1:0] cells;      // LFSR cells 1..N
  logic [K-1:0] new_bits;   // cells N+1..N+K, from the XOR module

  parallel_xor_module #(.N(N), .K(K), .TAP(TAP)) u_xor (
    .state   (cells),
    .din     (in_word),
    .new_bits(new_bits)
  );

  // Shift K places forward: cell j <- cell j+K; the new bits fill the top.
  logic [N-1:0] next_cells;
  if (K == N) begin : g_full
    assign next_cells = new_bits;
  end else begin : g_part
    assign next_cells = {new_bits, cells[N-1:K]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cells     <= SEED;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cells <= next_cells;
      end
    end
  end

  // Cells N-K+1..N hold the latest K generated bits; keep the first KEEP.
  assign out_word = cells[N-K +: KEEP];

endmodule
