// turbo_decoder_tb: end-to-end test of the turbo decoder against the
// reference iterative decoder of turbo_ref_pkg.
//
// Blocks of random messages are encoded by the reference encoder, sent over
// a software BPSK/AWGN channel (Box-Muller noise, Eb/N0 from 0 to 3 dB, or no
// noise) and quantised to the decoder's channel LLRs. Each decoded bit must
// equal the reference decoder's decision for the same LLRs and iteration
// count; without noise it must equal the message. Checked for the mixed
// decoder (Max-Log-MAP then Log-MAP) at K = 16 (R = 4) and K = 64 (R = 8),
// and for the all-Log-MAP and all-Max-Log-MAP variants at K = 16. Also
// checked: 1, 2, 6 iterations and 0 (taken as 1); the latency from the tail
// word to the first decoded bit, 2*I*(2K+5)+1 clocks; exactly K output bits
// with out_last on the last; and that decoding corrects channel errors.
module turbo_decoder_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [3:0] iterations;
  logic       in_valid;
  llr_vec_t   in_llr;
  int         grp;      // 0: K = 16 decoders, 1: K = 64 decoder

  // index 0..2: K = 16 (design3, all Log-MAP, all Max-Log-MAP); 3: K = 64
  logic rdy [4], ov [4], ob [4], ol [4], bsy [4];

  turbo_decoder #(.K(16), .R(4)) d3 (.clk, .rst_n, .iterations, .in_valid(in_valid && grp == 0),
    .in_ready(rdy[0]), .in_llr, .out_valid(ov[0]), .out_bit(ob[0]), .out_last(ol[0]), .busy(bsy[0]));
  turbo_decoder #(.K(16), .R(4), .SISO1_ALGO(LOG_MAP), .SISO2_ALGO(LOG_MAP)) d1 (.clk, .rst_n, .iterations,
    .in_valid(in_valid && grp == 0), .in_ready(rdy[1]), .in_llr, .out_valid(ov[1]), .out_bit(ob[1]), .out_last(ol[1]), .busy(bsy[1]));
  turbo_decoder #(.K(16), .R(4), .SISO1_ALGO(MAX_LOG_MAP), .SISO2_ALGO(MAX_LOG_MAP)) d2 (.clk, .rst_n, .iterations,
    .in_valid(in_valid && grp == 0), .in_ready(rdy[2]), .in_llr, .out_valid(ov[2]), .out_bit(ob[2]), .out_last(ol[2]), .busy(bsy[2]));
  turbo_decoder #(.K(64), .R(8)) d3b (.clk, .rst_n, .iterations, .in_valid(in_valid && grp == 1),
    .in_ready(rdy[3]), .in_llr, .out_valid(ov[3]), .out_bit(ob[3]), .out_last(ol[3]), .busy(bsy[3]));

  int raw_errors = 0, dec_errors = 0, noisy_bits = 0;
  int ref_diff_algos = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int chan(bit b, real sigma, real lc);
    real y;
    int q;
    y = (b ? -1.0 : 1.0) + sigma * gauss();
    q = $rtoi($floor(4.0 * lc * y + 0.5));
    return (q > 127) ? 127 : (q < -128) ? -128 : q;
  endfunction

  task automatic run_block(int g, int R, int iters, real ebn0_db, bit noiseless);
    bit msg[], sys[], p1[], p2[], tl[4];
    int ls[], lp1[], lp2[], tll[4];
    bit exp_dec [3][];
    int K, I, nd, t_tail, t_first, lo, hi;
    real sigma, lc;
    K = R * R;
    I = (iters == 0) ? 1 : iters;
    msg = new[K];
    foreach (msg[i]) msg[i] = 1'($urandom);
    encode(msg, R, sys, p1, p2, tl);
    sigma = $sqrt(1.5 / (10.0 ** (ebn0_db / 10.0)));
    lc = 2.0 / (sigma * sigma);
    if (noiseless) begin sigma = 0.0; lc = 2.0; end
    ls = new[K]; lp1 = new[K]; lp2 = new[K];
    for (int k = 0; k < K; k++) begin
      ls[k] = chan(sys[k], sigma, lc); lp1[k] = chan(p1[k], sigma, lc); lp2[k] = chan(p2[k], sigma, lc);
    end
    for (int i = 0; i < 4; i++) tll[i] = chan(tl[i], sigma, lc);
    turbo(ls, lp1, lp2, tll, R, I, 0, 1, exp_dec[0]);
    if (g == 0) begin
      turbo(ls, lp1, lp2, tll, R, I, 1, 1, exp_dec[1]);
      turbo(ls, lp1, lp2, tll, R, I, 0, 0, exp_dec[2]);
      foreach (exp_dec[0][i]) if (exp_dec[1][i] != exp_dec[2][i]) ref_diff_algos++;
    end
    if (!noiseless) begin
      noisy_bits += K;
      foreach (msg[i]) begin
        if ((ls[i] < 0) != msg[i]) raw_errors++;
        if (exp_dec[0][i] != msg[i]) dec_errors++;
      end
    end
    // load
    grp = g;
    iterations = 4'(iters);
    for (int k = 0; k <= K; k++) begin
      @(negedge clk);
      checks++;
      if (!rdy[g == 0 ? 0 : 3]) begin failures++; $display("FAIL decoder not ready at word %0d", k); end
      in_valid = 1;
      if (k < K) in_llr = {llr_t'(0), llr_t'(lp2[k]), llr_t'(lp1[k]), llr_t'(ls[k])};
      else       in_llr = {llr_t'(tll[3]), llr_t'(tll[2]), llr_t'(tll[1]), llr_t'(tll[0])};
    end
    @(posedge clk); #1;
    t_tail = cyc;
    in_valid = 0;
    // collect
    lo = (g == 0) ? 0 : 3;
    hi = (g == 0) ? 2 : 3;
    nd = 0;
    t_first = -1;
    while (nd < K) begin
      @(posedge clk); #1;
      if (cyc - t_tail > 2 * I * (2 * K + 5) + K + 10) begin
        failures++; $display("FAIL timeout waiting for output"); break;
      end
      if (ov[lo]) begin
        if (t_first < 0) t_first = cyc;
        for (int d = lo; d <= hi; d++) begin
          bit e;
          e = (d == 3) ? exp_dec[0][nd] : exp_dec[d][nd];
          checks += 3;
          if (!ov[d]) begin failures++; $display("FAIL decoder %0d out of step", d); end
          if (ob[d] !== e) begin
            failures++; $display("FAIL dec %0d K=%0d I=%0d bit %0d got %0b exp %0b", d, K, I, nd, ob[d], e);
          end
          if (ol[d] !== (nd == K - 1)) begin failures++; $display("FAIL out_last at %0d", nd); end
          if (noiseless) begin
            checks++;
            if (ob[d] !== msg[nd]) begin failures++; $display("FAIL noiseless bit %0d", nd); end
          end
        end
        nd++;
      end
    end
    checks++;
    if (t_first - t_tail != 2 * I * (2 * K + 5) + 1) begin
      failures++; $display("FAIL latency %0d exp %0d", t_first - t_tail, 2 * I * (2 * K + 5) + 1);
    end
    @(posedge clk); #1;
    checks++;
    if (ov[lo] || !rdy[lo]) begin failures++; $display("FAIL not back to loading"); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int its [4] = '{1, 2, 6, 0};
    in_valid = 0; in_llr = '0; iterations = 1; grp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (its[i]) run_block(0, 4, its[i], 0.0, 1);
    foreach (its[i]) run_block(1, 8, its[i], 0.0, 1);
    for (int n = 0; n < 24; n++) run_block(0, 4, its[n % 3], 0.5 * (n % 7), 0);
    for (int n = 0; n < 12; n++) run_block(1, 8, its[n % 3], 0.5 * (n % 7), 0);
    $display("noisy bits %0d: channel errors %0d, decoded errors %0d; Log-MAP vs Max-Log-MAP decisions differed %0d times",
             noisy_bits, raw_errors, dec_errors, ref_diff_algos);
    checks++;
    if (!(dec_errors < raw_errors)) begin failures++; $display("FAIL decoding did not reduce errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
