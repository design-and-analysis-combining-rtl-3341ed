// ber_sweep_tb: the BER measurement grid of the mixed decoder. Eb/N0 runs
// from 0 to 3 dB in 0.5 dB steps, with 1, 2 and 6 iterations, for both block
// sizes: 16 bits (4 x 4 interleaver, 200 blocks per point) and 5476 bits
// (74 x 74, the default build, one block per point). The published
// evaluation used 100000 blocks per point, far beyond a quick simulation.
//
// Checks per point: the error count equals the reference decoder's on the
// same channel LLRs (ber_ref_monitor) and bit_count = blocks*K. Checks per
// curve: the BER at 3 dB is below the BER at 0 dB; for 5476-bit blocks at
// 3 dB, six iterations beat one. The measured BER is printed next to the
// published values of the mixed design for comparison only.
module ber_sweep_tb;
  import turbo_pkg::*;

  localparam int KS = 16, RS = 4;
  localparam int KL = 5476, RL = 74;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // published BER x 1e-3 of the mixed design, [size][iteration set][dB step]
  localparam real PUB [2][3][7] = '{
    '{'{103.092, 84.293, 67.076, 51.746, 38.558, 27.695, 19.107},
      '{ 91.401, 72.569, 55.707, 41.192, 29.251, 19.909, 12.951},
      '{ 88.033, 69.123, 52.440, 38.242, 26.781, 17.940, 11.494}},
    '{'{107.842, 87.404, 68.557, 51.699, 37.213, 25.416, 16.324},
      '{ 95.774, 73.441, 53.221, 36.063, 22.662, 13.149,  7.076},
      '{ 94.476, 71.521, 50.687, 33.294, 20.116, 11.267,  5.868}}};
  localparam int ITS [3] = '{1, 2, 6};

  // ---- two systems ----
  logic        start [2], busy [2], done [2];
  logic [31:0] num_blocks [2], block_count [2], bit_count [2], err_count [2];
  logic [3:0]  iterations [2];
  logic [9:0]  sigma [2];
  logic [7:0]  llr_gain [2];
  logic [30:0] seed [2];

  ber_system #(.K(KS), .R(RS)) sys_s (.clk, .rst_n, .start(start[0]), .num_blocks(num_blocks[0]),
    .iterations(iterations[0]), .sigma(sigma[0]), .llr_gain(llr_gain[0]), .seed(seed[0]), .busy(busy[0]),
    .done(done[0]), .block_count(block_count[0]), .bit_count(bit_count[0]), .err_count(err_count[0]));
  ber_system sys_l (.clk, .rst_n, .start(start[1]), .num_blocks(num_blocks[1]),
    .iterations(iterations[1]), .sigma(sigma[1]), .llr_gain(llr_gain[1]), .seed(seed[1]), .busy(busy[1]),
    .done(done[1]), .block_count(block_count[1]), .bit_count(bit_count[1]), .err_count(err_count[1]));

  ber_ref_monitor #(.K(KS), .R(RS)) mon_s (.clk, .rst_n, .gen(sys_s.gen), .src_bit(sys_s.src_bit),
    .enc_valid(sys_s.enc_valid), .enc_bits(sys_s.enc_bits), .ch_valid(sys_s.ch_valid), .ch_llr(sys_s.ch_llr),
    .iterations(iterations[0]), .s1_done(sys_s.u_dec.s1_done), .s2_done(sys_s.u_dec.s2_done), .corr_event(1'b0));
  ber_ref_monitor #(.K(KL), .R(RL)) mon_l (.clk, .rst_n, .gen(sys_l.gen), .src_bit(sys_l.src_bit),
    .enc_valid(sys_l.enc_valid), .enc_bits(sys_l.enc_bits), .ch_valid(sys_l.ch_valid), .ch_llr(sys_l.ch_llr),
    .iterations(iterations[1]), .s1_done(sys_l.u_dec.s1_done), .s2_done(sys_l.u_dec.s2_done), .corr_event(1'b0));

  real ber [2][3][7];

  function automatic int exp_errors(int s);
    return (s == 0) ? mon_s.exp_errors : mon_l.exp_errors;
  endfunction

  task automatic point(int s, int it, int db2, int blocks);
    int e0, k;
    real s2;
    k  = (s == 0) ? KS : KL;
    s2 = 1.5 / (10.0 ** ((0.5 * db2) / 10.0));
    sigma[s]      = 10'($rtoi($sqrt(s2) * 256.0 + 0.5));
    llr_gain[s]   = 8'($rtoi(2.0 / s2 * 16.0 + 0.5));
    iterations[s] = 4'(ITS[it]);
    num_blocks[s] = 32'(blocks);
    seed[s]       = 31'($urandom);
    e0 = exp_errors(s);
    @(negedge clk); start[s] = 1;
    @(negedge clk); start[s] = 0;
    while (!done[s]) @(negedge clk);
    checks += 2;
    if (bit_count[s] != 32'(blocks * k)) begin failures++; $display("FAIL bit_count"); end
    if (int'(err_count[s]) != exp_errors(s) - e0) begin
      failures++; $display("FAIL K=%0d %0d it %0.1f dB: err_count %0d exp %0d", k, ITS[it], 0.5 * db2,
                           err_count[s], exp_errors(s) - e0);
    end
    ber[s][it][db2] = real'(err_count[s]) / real'(bit_count[s]);
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      start[s] = 0; num_blocks[s] = 1; iterations[s] = 1; sigma[s] = 0; llr_gain[s] = 16; seed[s] = 1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int it = 0; it < 3; it++) for (int d = 0; d < 7; d++) point(0, it, d, 200);
      for (int it = 0; it < 3; it++) for (int d = 0; d < 7; d++) point(1, it, d, 1);
    join
    for (int s = 0; s < 2; s++) begin
      $display("block %0d bits: BER x 1e-3 measured (published)", (s == 0) ? KS : KL);
      for (int it = 0; it < 3; it++) begin
        string line;
        line = $sformatf("  %0d it:", ITS[it]);
        for (int d = 0; d < 7; d++) line = {line, $sformatf(" %0.1fdB %7.3f (%7.3f)", 0.5 * d, 1000.0 * ber[s][it][d], PUB[s][it][d])};
        $display("%s", line);
        checks++;
        if (!(ber[s][it][6] < ber[s][it][0])) begin failures++; $display("FAIL BER does not fall with Eb/N0"); end
      end
    end
    checks++;
    if (!(ber[1][2][6] < ber[1][0][6])) begin failures++; $display("FAIL iterations do not help at 3 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
