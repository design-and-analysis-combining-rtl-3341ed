// ber_ref_monitor: testbench helper that watches the BER system's internal
// streams and predicts its error count independently.
//
// It records each message bit as the source produces it, the code bits
// leaving the encoder and the channel LLR words entering the decoder. When a
// block's tail word arrives it checks the code bits against the reference
// encoder, runs the reference turbo decoder (turbo_ref_pkg) on the same
// LLRs and adds the reference's bit errors to exp_errors. It also counts how
// often each mechanism occurred: blocks, tail words, SISO1 and SISO2 passes,
// channel bits received with the wrong sign, bits whose wrong channel sign
// the decoder corrected, and Log-MAP corrections applied in SISO2.
// Nothing is recorded while rst_n is low.
module ber_ref_monitor
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
#(
  parameter int K = 16,
  parameter int R = 4
) (
  input logic       clk,
  input logic       rst_n,
  input logic       gen,
  input logic       src_bit,
  input logic       enc_valid,
  input code_bits_t enc_bits,
  input logic       ch_valid,
  input llr_vec_t   ch_llr,
  input logic [3:0] iterations,
  input logic       s1_done,
  input logic       s2_done,
  input logic       corr_event
);

  int exp_errors = 0, code_mismatches = 0;
  int n_blocks = 0, n_tails = 0, n_siso1 = 0, n_siso2 = 0;
  int n_flips = 0, n_corrected = 0, n_corrections = 0;

  bit msg_q [$];
  code_bits_t code_q [$];
  llr_vec_t word_q [$];

  always @(posedge clk) if (rst_n) begin
    if (gen) msg_q.push_back(src_bit);
    if (enc_valid) code_q.push_back(enc_bits);
    if (s1_done) n_siso1++;
    if (s2_done) n_siso2++;
    if (corr_event) n_corrections++;
    if (ch_valid) begin
      word_q.push_back(ch_llr);
      if (word_q.size() == K + 1) process_block();
    end
  end

  task automatic process_block();
    bit msg[], sys[], p1[], p2[], tl[4], dec[];
    int ls[], lp1[], lp2[], tll[4];
    code_bits_t cw;
    msg = new[K]; ls = new[K]; lp1 = new[K]; lp2 = new[K];
    for (int k = 0; k < K; k++) msg[k] = msg_q.pop_front();
    encode(msg, R, sys, p1, p2, tl);
    for (int k = 0; k <= K; k++) begin
      llr_vec_t w;
      w  = word_q.pop_front();
      cw = code_q.pop_front();
      if (k < K) begin
        if (cw[2:0] != {p2[k], p1[k], sys[k]}) code_mismatches++;
        ls[k] = int'(w[LANE_SYS]); lp1[k] = int'(w[LANE_PAR1]); lp2[k] = int'(w[LANE_PAR2]);
        for (int i = 0; i < 3; i++) if ((w[i] < 0) != cw[i]) n_flips++;
      end else begin
        if (cw != {tl[3], tl[2], tl[1], tl[0]}) code_mismatches++;
        for (int i = 0; i < 4; i++) tll[i] = int'(w[i]);
        n_tails++;
      end
    end
    turbo(ls, lp1, lp2, tll, R, (iterations == 0) ? 1 : int'(iterations), 0, 1, dec);
    for (int k = 0; k < K; k++) begin
      if (dec[k] != msg[k]) exp_errors++;
      if ((ls[k] < 0) != msg[k] && dec[k] == msg[k]) n_corrected++;
    end
    n_blocks++;
  endtask

endmodule
