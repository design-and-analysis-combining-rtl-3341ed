// bpsk_channel_tb: with sigma = 0 every lane must give round(4*Lc*x)
// (x = +1 for bit 0, -1 for bit 1, halves rounded up) saturated to 8 bits, for several gains.
// With noise, each output is checked exactly against a model that combines
// the lane's noise sample (observed inside the generator) with the BPSK
// value, and over many words the mean and spread of the received LLRs must
// match Lc*(x + sigma*n). valid and last must pass with one clock of delay.
module bpsk_channel_tb;
  import turbo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_last, out_valid, out_last;
  code_bits_t in_bits;
  logic [9:0] sigma;
  logic [7:0] llr_gain;
  llr_vec_t out_llr;

  bpsk_channel dut (.clk, .rst_n, .in_valid, .in_bits, .in_last, .sigma, .llr_gain,
                    .out_valid, .out_llr, .out_last);

  function automatic int model(bit b, int n, int sg, int g);
    longint y, l, r;
    y = (b ? -1024 : 1024) + ((longint'(n) * sg) >>> 8);
    l = y * g;
    r = (l + 2048) >>> 12;
    return (r > 127) ? 127 : (r < -128) ? -128 : int'(r);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n [LANES];
    real sum, sumsq, m, v, lc, sg;
    int cnt;
    in_valid = 0; in_last = 0; in_bits = 0; sigma = 0; llr_gain = 16;
    @(negedge clk); rst_n = 1;
    // noiseless
    foreach (n[i]) ;
    for (int g = 8; g < 256; g += 37) begin
      for (int t = 0; t < 16; t++) begin
        llr_gain = 8'(g); sigma = 0;
        in_valid = 1; in_bits = 4'(t); in_last = (t == 15);
        @(negedge clk);
        checks += 2;
        if (!out_valid || out_last !== (t == 15)) begin failures++; $display("FAIL valid/last"); end
        for (int i = 0; i < LANES; i++) begin
          int e;
          // round half up, as a rounding adder before an arithmetic shift does
          e = $rtoi($floor((((t >> i) & 1) ? -4.0 : 4.0) * g / 16.0 + 0.5));
          e = (e > 127) ? 127 : (e < -128) ? -128 : e;
          checks++;
          if (int'(out_llr[i]) != e) begin failures++; $display("FAIL g=%0d lane %0d got %0d exp %0d", g, i, out_llr[i], e); end
        end
      end
    end
    in_valid = 0; in_last = 0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid without input"); end
    // noisy: sigma = 0.75, Lc = 2 (LLR scale 8 per unit)
    sigma = 10'd192; llr_gain = 8'd32;
    sum = 0; sumsq = 0; cnt = 0;
    for (int t = 0; t < 5000; t++) begin
      in_valid = 1; in_bits = 4'($urandom);
      n[0] = int'(dut.g_lane[0].u_awgn.sample);
      n[1] = int'(dut.g_lane[1].u_awgn.sample);
      n[2] = int'(dut.g_lane[2].u_awgn.sample);
      n[3] = int'(dut.g_lane[3].u_awgn.sample);
      @(negedge clk);
      for (int i = 0; i < LANES; i++) begin
        int e;
        real signed_rx;
        e = model(in_bits[i], n[i], 192, 32);
        checks++;
        if (int'(out_llr[i]) != e) begin failures++; $display("FAIL noisy lane %0d got %0d exp %0d", i, out_llr[i], e); end
        signed_rx = in_bits[i] ? -real'(out_llr[i]) : real'(out_llr[i]);
        sum += signed_rx; sumsq += signed_rx * signed_rx; cnt++;
      end
    end
    m = sum / cnt; v = sumsq / cnt - m * m;
    lc = 2.0; sg = 0.75;
    $display("received LLR mean %f (expect %f), std %f (expect %f)", m, 4.0 * lc, $sqrt(v), 4.0 * lc * sg);
    checks += 2;
    if (m < 4.0 * lc - 0.3 || m > 4.0 * lc + 0.3) begin failures++; $display("FAIL mean"); end
    if ($sqrt(v) < 4.0 * lc * sg * 0.93 || $sqrt(v) > 4.0 * lc * sg * 1.07) begin failures++; $display("FAIL spread"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
