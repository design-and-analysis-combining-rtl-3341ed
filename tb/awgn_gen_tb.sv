// awgn_gen_tb: checks the noise samples bit for bit against a reference
// model (two xorshift64 generators, twelve 10-bit fields, sum minus 6138)
// and statistically: over 20000 samples the mean must be near 0, the
// variance near 1 (1024^2 in Q.10), and about 68 % of the samples inside_1s one
// standard deviation, as for a Gaussian. en low must hold the sample.
module awgn_gen_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [63:0] SEED = 64'h0123_4567_89AB_CDEF;
  logic en;
  logic signed [15:0] sample;

  awgn_gen #(.SEED(SEED)) dut (.clk, .rst_n, .en, .sample);

  function automatic logic [63:0] step(logic [63:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 7);
    x = x ^ (x << 17);
    return x;
  endfunction

  function automatic int expected(logic [63:0] a, logic [63:0] b);
    int s;
    s = 0;
    for (int i = 0; i < 6; i++) s += int'(a[i*10 +: 10]) + int'(b[i*10 +: 10]);
    return s - 6138;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] m1, m2;
    real sum, sumsq, mean, var_;
    int inside_1s;
    localparam int N = 20000;
    m1 = SEED;
    m2 = {SEED[31:0], SEED[63:32]} ^ 64'hD1B5_4A32_D192_ED03;
    en = 1;
    sum = 0; sumsq = 0; inside_1s = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(sample) != expected(m1, m2)) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d got %0d exp %0d", i, sample, expected(m1, m2));
      end
      sum   += real'(sample) / 1024.0;
      sumsq += (real'(sample) / 1024.0) ** 2;
      if (sample > -16'sd1024 && sample < 16'sd1024) inside_1s++;
      if (i == 100) begin
        en = 0;
        @(negedge clk);
        checks++;
        if (int'(sample) != expected(m1, m2)) begin failures++; $display("FAIL hold"); end
        en = 1;
      end
      m1 = step(m1); m2 = step(m2);
      @(negedge clk);
    end
    mean = sum / N;
    var_ = sumsq / N - mean * mean;
    $display("mean %f variance %f within 1 sigma %0d of %0d", mean, var_, inside_1s, N);
    checks += 3;
    if (mean > 0.05 || mean < -0.05) begin failures++; $display("FAIL mean"); end
    if (var_ > 1.05 || var_ < 0.95) begin failures++; $display("FAIL variance"); end
    if (inside_1s < N * 64 / 100 || inside_1s > N * 72 / 100) begin failures++; $display("FAIL shape"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
