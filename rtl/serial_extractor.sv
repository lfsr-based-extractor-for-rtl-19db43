// Serial LFSR randomness extractor core.
//
// An N-cell Fibonacci LFSR (cells 1..N, cell j on bit j-1) whose feedback also
// takes one raw bit from the random number generator. Each clock with in_valid
// high:
//   new = X[1] ^ X[1+TAP] ^ in_bit      (reference design: taps at cells 1, 2)
//   every cell moves one place up (cell j <- cell j+1), cell 1 leaves, and the
//   new bit enters cell N, from where it is also the output.
// With N = 63 and TAP = 1 the feedback polynomial x^63 + x + 1 is primitive,
// so the LFSR alone has maximal period.
//
// Interface and timing: in_valid/in_bit in; gen_valid/gen_bit out. The bit
// generated from the input read on a rising edge is on gen_bit after that edge,
// with gen_valid high for that one cycle (latency one clock, one bit per clock,
// no back-pressure). in_valid low stalls the register. gen_bit is the complete
// generated stream; dropping the share that carries no entropy is done by
// drop_framer behind it. Reset (active-low, synchronous) loads SEED.
//
// The register, the taps and the feedback equation are the reference
// structure; the valid handshake, the reset and its seed are this design's own.
module serial_extractor #(
  parameter int unsigned  N    = lfsr_extractor_pkg::LFSR_LEN,
  parameter int unsigned  TAP  = lfsr_extractor_pkg::LFSR_TAP,
  parameter logic [N-1:0] SEED = lfsr_extractor_pkg::LFSR_SEED
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic gen_valid,
  output logic gen_bit
);

  if (TAP == 0 || TAP >= N) begin : g_bad_tap
    $error("serial_extractor: need 0 < TAP < N");
  end

  logic [N-1:0] cells;
  logic         feedback;

  always_comb begin
    feedback = cells[0] ^ cells[TAP] ^ in_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cells     <= SEED;
      gen_valid <= 1'b0;
    end else begin
      gen_valid <= in_valid;
      if (in_valid) begin
        cells <= {feedback, cells[N-1:1]};
      end
    end
  end

  // The newest bit sits in cell N.
  assign gen_bit = cells[N-1];

endmodule
