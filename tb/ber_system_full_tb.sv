// ber_system_full_tb: the BER system at its default size (5476-bit blocks,
// 74 x 74 square interleaver) runs one block with 6 iterations at
// Eb/N0 = 1 dB. The reported error count must equal the reference decoder's
// on the same channel LLRs, bit_count must be 5476, the encoder output must
// match the reference encoder, and the run must take the expected number of
// clocks: K to generate, 3 through encoder and channel, K+1 words into the
// decoder, 2*I*(2K+5)+1 of decoding, K of output and 1 for the done pulse.
module ber_system_full_tb;
  import turbo_pkg::*;

  localparam int K = 5476, R = 74, ITER = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic [31:0] num_blocks, block_count, bit_count, err_count;
  logic [3:0]  iterations;
  logic [9:0]  sigma;
  logic [7:0]  llr_gain;
  logic [30:0] seed;

  ber_system dut (.clk, .rst_n, .start, .num_blocks, .iterations, .sigma, .llr_gain,
    .seed, .busy, .done, .block_count, .bit_count, .err_count);

  ber_ref_monitor #(.K(K), .R(R)) mon (.clk, .rst_n, .gen(dut.gen), .src_bit(dut.src_bit),
    .enc_valid(dut.enc_valid), .enc_bits(dut.enc_bits), .ch_valid(dut.ch_valid), .ch_llr(dut.ch_llr),
    .iterations, .s1_done(dut.u_dec.s1_done), .s2_done(dut.u_dec.s2_done),
    .corr_event(dut.u_dec.s2_out_valid && (dut.u_dec.u_siso2.r_num != (dut.u_dec.u_siso2.u_l0.mx))));

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, expect_cycles;
    real s2;
    s2 = 1.5 / (10.0 ** (1.0 / 10.0));
    sigma    = 10'($rtoi($sqrt(s2) * 256.0 + 0.5));
    llr_gain = 8'($rtoi(2.0 / s2 * 16.0 + 0.5));
    start = 0; num_blocks = 1; iterations = 4'(ITER); seed = 31'h5EED_1234;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t = 1;
    while (!done && t < 400000) begin
      @(negedge clk); t++;
    end
    expect_cycles = K + 3 + (K + 1) + 2 * ITER * (2 * K + 5) + 1 + K + 1;
    $display("bits %0d errors %0d (BER %f) in %0d clocks; channel errors %0d, corrected %0d, Log-MAP corrections %0d",
             bit_count, err_count, real'(err_count) / real'(bit_count), t, mon.n_flips, mon.n_corrected, mon.n_corrections);
    checks += 8;
    if (!done) begin failures++; $display("FAIL did not finish"); end
    if (bit_count != 32'(K)) begin failures++; $display("FAIL bit_count"); end
    if (block_count != 1) begin failures++; $display("FAIL block_count"); end
    if (int'(err_count) != mon.exp_errors) begin failures++; $display("FAIL err_count %0d exp %0d", err_count, mon.exp_errors); end
    if (mon.code_mismatches != 0) begin failures++; $display("FAIL encoder output"); end
    if (mon.n_siso1 != ITER || mon.n_siso2 != ITER) begin failures++; $display("FAIL SISO passes"); end
    if (mon.n_flips == 0 || mon.n_corrected == 0 || mon.n_corrections == 0 || mon.n_tails != 1) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    if (t != expect_cycles) begin failures++; $display("FAIL run took %0d clocks, expected %0d", t, expect_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
