// Bit-dropping output stage of the serial extractor.
//
// Collects the generated bit stream in groups of GROUP bits (16 in the
// reference design, matching the 16-bit words of the raw input). Of each group
// the first KEEP bits (12) form one output word and the last GROUP-KEEP bits
// (4) are discarded. The reference measurement found 12 bits of Shannon
// entropy per 16 raw bits, so keeping 12 of 16 makes the output carry no more
// bits than the input holds entropy and makes the mapping irreversible.
//
// Interface and timing: bit_valid/bit_in in; word_valid/word out, the first
// kept bit of the group on word[0]. bit_valid low simply waits. When the last
// bit of a group is taken on a rising edge, the word appears after that edge
// with word_valid high for one cycle: one word per GROUP accepted bits. The
// group position restarts at 0 on reset (active-low, synchronous).
//
// The 16/12/4 split is the reference design's. Which 4 bits of a group are
// dropped (here the last four), the bit order inside the word and the
// handshake are this design's own choice.
module drop_framer #(
  parameter int unsigned GROUP = lfsr_extractor_pkg::SER_GROUP,
  parameter int unsigned KEEP  = lfsr_extractor_pkg::SER_KEEP
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bit_valid,
  input  logic            bit_in,
  output logic            word_valid,
  output logic [KEEP-1:0] word
);

  if (KEEP == 0 || KEEP >= GROUP) begin : g_bad_keep
    $error("drop_framer: need 0 < KEEP < GROUP");
  end

  localparam int unsigned PW = (GROUP > 1) ? $clog2(GROUP) : 1;

  logic [PW-1:0]   pos;       // position of the next bit inside its group
  logic [KEEP-1:0] collect;   // kept bits of the group being assembled

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos        <= '0;
      collect    <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (bit_valid) begin
        if (pos < PW'(KEEP)) begin
          collect[pos] <= bit_in;
        end
        if (pos == PW'(GROUP - 1)) begin
          pos        <= '0;
          word       <= collect;
          word_valid <= 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

  // At most one word per GROUP accepted bits, so never two words in a row.
  a_word_spacing : assert property (@(posedge clk) disable iff (!rst_n)
                                    word_valid |=> !word_valid)
    else $error("drop_framer: word_valid high on consecutive clocks");

endmodule
