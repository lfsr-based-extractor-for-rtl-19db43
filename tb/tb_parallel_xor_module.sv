// Self-checking testbench of parallel_xor_module at its default size
// (N = K = 63, taps at cells 1 and 2).
//
// For random LFSR states and random 63-bit input words the reference runs the
// serial LFSR 63 times, one bit at a time (new = c1 ^ c2 ^ in_i, shift up,
// new bit into cell 63) and collects the 63 generated bits; the XOR module must
// produce the same bits in one step. Corner vectors (all zeros, all ones, a
// single one) are included.
module tb_parallel_xor_module;
  import lfsr_extractor_pkg::*;

  localparam int unsigned N = LFSR_LEN;
  localparam int unsigned K = PAR_WIDTH;
  localparam int unsigned T = LFSR_TAP;

  logic [N-1:0] state;
  logic [K-1:0] din;
  logic [K-1:0] new_bits;

  // Loop bounds kept in variables so the simulator does not unroll the
  // reference loops.
  int unsigned n_rt = N;
  int unsigned k_rt = K;

  int checks = 0;
  int failures = 0;

  parallel_xor_module dut (.state, .din, .new_bits);

  function automatic logic [K-1:0] serial_steps(input logic [N-1:0] s,
                                                input logic [K-1:0] d);
    logic [N-1:0] c = s;
    logic [K-1:0] out;
    for (int i = 0; i < k_rt; i++) begin
      logic nb = c[0] ^ c[T] ^ d[i];
      c = {nb, c[N-1:1]};
      out[i] = nb;
    end
    return out;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

  task automatic apply(input logic [N-1:0] s, input logic [K-1:0] d);
    logic [K-1:0] exp;
    state = s; din = d;
    #1;
    exp = serial_steps(s, d);
    checks++;
    if (new_bits !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL state=%h din=%h got=%h exp=%h", s, d, new_bits, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply('1, '1);
    for (int j = 0; j < n_rt; j++) apply(N'(1) << j, '0);
    for (int j = 0; j < k_rt; j++) apply('0, K'(1) << j);
    for (int r = 0; r < 2000; r++) apply(N'(rand64()), K'(rand64()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
