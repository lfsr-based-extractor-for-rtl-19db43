// XOR module of the parallel LFSR extractor.
//
// Purely combinational. Given the N LFSR cells (cell j on state[j-1]) and K raw
// input bits (input i on din[i-1]), it produces the K bits that N+1..N+K would
// hold after K serial LFSR steps:
//
//     X[N+i] = X[i] ^ X[i+TAP] ^ in[i],   i = 1..K
//
// For the reference 63-bit design (N = K = 63, TAP = 1) this is
// X64 = X1^X2^in1, X65 = X2^X3^in2, ..., X126 = X63^X64^in63. Where the second
// tap reaches past cell N (only the last TAP equations, e.g. X126 needs X64),
// the network uses the bit it has itself just generated, so those outputs are
// two XOR levels deep rather than one; every other output is a single
// three-input XOR. The equations and the reuse of X64 for X126 are the
// reference structure; the vector layout is this design's own.
//
// Interface: state[N-1:0], din[K-1:0] in; new_bits[K-1:0] out, new_bits[i-1]
// being cell N+i. No clock; zero latency.
module parallel_xor_module #(
  parameter int unsigned N   = lfsr_extractor_pkg::LFSR_LEN,
  parameter int unsigned K   = lfsr_extractor_pkg::PAR_WIDTH,
  parameter int unsigned TAP = lfsr_extractor_pkg::LFSR_TAP
) (
  input  logic [N-1:0] state,
  input  logic [K-1:0] din,
  output logic [K-1:0] new_bits
);

  // A parallel extractor built on an N-bit LFSR can output at most N bits.
  if (K > N || K == 0) begin : g_bad_width
    $error("parallel_xor_module: need 0 < K <= N");
  end
  if (TAP == 0 || TAP >= N) begin : g_bad_tap
    $error("parallel_xor_module: need 0 < TAP < N");
  end

  // Cells 1..N+K laid out as one vector: old state below, new bits above.
  function automatic logic [K-1:0] generate_bits(input logic [N-1:0] s,
                                                 input logic [K-1:0] d);
    logic [N+K-1:0] cells;
    cells = '0;
    cells[N-1:0] = s;
    for (int unsigned i = 0; i < K; i++) begin
      cells[N+i] = cells[i] ^ cells[i+TAP] ^ d[i];
    end
    return cells[N+K-1:N];
  endfunction

  always_comb begin
    new_bits = generate_bits(state, din);
  end

endmodule
