// ber_system_tb: runs the whole BER system (K = 16, R = 4, the small
// interleaver) end to end. A noiseless run must decode every bit. Noisy runs
// at 1 dB and 3 dB with 6, 2 and 1 iterations must report exactly the error
// count that the reference decoder gives on the same channel LLRs
// (ber_ref_monitor), with bit_count = blocks*K. Also checks the encoder
// output against the reference encoder, the done pulse and block count, and
// that each mechanism occurred: blocks, zero-termination tails, SISO1 and
// SISO2 passes (2 per iteration), channel errors, errors corrected by the
// decoder and Log-MAP corrections.
module ber_system_tb;
  import turbo_pkg::*;

  localparam int K = 16, R = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic [31:0] num_blocks, block_count, bit_count, err_count;
  logic [3:0]  iterations;
  logic [9:0]  sigma;
  logic [7:0]  llr_gain;
  logic [30:0] seed;

  ber_system #(.K(K), .R(R)) dut (.clk, .rst_n, .start, .num_blocks, .iterations, .sigma, .llr_gain,
    .seed, .busy, .done, .block_count, .bit_count, .err_count);

  ber_ref_monitor #(.K(K), .R(R)) mon (.clk, .rst_n, .gen(dut.gen), .src_bit(dut.src_bit),
    .enc_valid(dut.enc_valid), .enc_bits(dut.enc_bits), .ch_valid(dut.ch_valid), .ch_llr(dut.ch_llr),
    .iterations, .s1_done(dut.u_dec.s1_done), .s2_done(dut.u_dec.s2_done),
    .corr_event(dut.u_dec.s2_out_valid && (dut.u_dec.u_siso2.r_num != (dut.u_dec.u_siso2.u_l0.mx))));

  // Eb/N0 in dB -> sigma (Q2.8) and Lc = 2/sigma^2 (Q4.4), code rate 1/3
  task automatic set_snr(real db);
    real s2;
    s2 = 1.5 / (10.0 ** (db / 10.0));
    sigma    = 10'($rtoi($sqrt(s2) * 256.0 + 0.5));
    llr_gain = 8'($rtoi(2.0 / s2 * 16.0 + 0.5));
  endtask

  task automatic run(int blocks, int iters, bit noiseless, real db);
    int e0, t;
    e0 = mon.exp_errors;
    num_blocks = 32'(blocks); iterations = 4'(iters); seed = 31'($urandom);
    if (noiseless) begin sigma = 0; llr_gain = 8'd32; end
    else set_snr(db);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t = 0;
    while (!done && t < blocks * (2 * iters * (2 * K + 5) + 3 * K + 40)) begin
      @(negedge clk); t++;
    end
    checks += 4;
    if (!done) begin failures++; $display("FAIL run did not finish"); end
    if (block_count != 32'(blocks)) begin failures++; $display("FAIL block_count %0d", block_count); end
    if (bit_count != 32'(blocks * K)) begin failures++; $display("FAIL bit_count %0d", bit_count); end
    if (int'(err_count) != mon.exp_errors - e0) begin
      failures++; $display("FAIL err_count %0d exp %0d", err_count, mon.exp_errors - e0);
    end
    if (noiseless) begin
      checks++;
      if (err_count != 0) begin failures++; $display("FAIL errors without noise"); end
    end
    $display("run: %0d blocks, %0d iterations, %s: bits %0d errors %0d (BER %f)", blocks, iters,
             noiseless ? "no noise" : "noisy", bit_count, err_count, real'(err_count) / real'(bit_count));
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; num_blocks = 1; iterations = 6; sigma = 0; llr_gain = 32; seed = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(10, 2, 1, 0.0);
    run(40, 6, 0, 1.0);
    run(40, 2, 0, 1.0);
    run(40, 1, 0, 3.0);
    checks += 2;
    if (mon.code_mismatches != 0) begin failures++; $display("FAIL encoder output differs from reference"); end
    if (mon.n_siso1 != mon.n_siso2 || mon.n_siso1 != 10 * 2 + 40 * 6 + 40 * 2 + 40 * 1) begin
      failures++; $display("FAIL SISO passes %0d/%0d", mon.n_siso1, mon.n_siso2);
    end
    $display("mechanisms: blocks %0d, tails %0d, SISO1 passes %0d, SISO2 passes %0d, channel flips %0d, corrected %0d, Log-MAP corrections %0d",
             mon.n_blocks, mon.n_tails, mon.n_siso1, mon.n_siso2, mon.n_flips, mon.n_corrected, mon.n_corrections);
    checks += 6;
    if (mon.n_blocks == 0)      begin failures++; $display("FAIL no blocks"); end
    if (mon.n_tails == 0)       begin failures++; $display("FAIL no tails"); end
    if (mon.n_siso1 == 0)       begin failures++; $display("FAIL no iterations"); end
    if (mon.n_flips == 0)       begin failures++; $display("FAIL no channel errors"); end
    if (mon.n_corrected == 0)   begin failures++; $display("FAIL nothing corrected"); end
    if (mon.n_corrections == 0) begin failures++; $display("FAIL no Log-MAP correction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
