// awgn_gen: approximately Gaussian noise samples with zero mean and unit
// variance, in signed Q5.10 (1024 = 1.0).
//
// Two xorshift64 generators (shifts 13, 7, 17) each give 60 fresh bits per
// clock; these are cut into twelve 10-bit uniform numbers whose sum, minus
// its mean 6138, has variance 1024^2 - 1 (Irwin-Hall with n = 12): by the
// central limit theorem a close Gaussian, clipped at +-6 sigma. sample is
// computed from the current generator state; en advances both generators
// at the clock edge. The method is this design's choice.
module awgn_gen #(
  parameter logic [63:0] SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic signed [15:0] sample
);

  localparam logic [63:0] SEED2 = {SEED[31:0], SEED[63:32]} ^ 64'hD1B5_4A32_D192_ED03;

  function automatic logic [63:0] xs64(input logic [63:0] x);
    logic [63:0] t;
    t = x ^ (x << 13);
    t = t ^ (t >> 7);
    t = t ^ (t << 17);
    return t;
  endfunction

  logic [63:0] s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= (SEED  == '0) ? 64'h1 : SEED;
      s2 <= (SEED2 == '0) ? 64'h2 : SEED2;
    end else if (en) begin
      s1 <= xs64(s1);
      s2 <= xs64(s2);
    end
  end

  logic [119:0] pool;
  logic [13:0]  sum;

  always_comb begin
    pool = {s2[59:0], s1[59:0]};
    sum  = '0;
    for (int i = 0; i < 12; i++) sum = sum + 14'(pool[i*10 +: 10]);
    sample = 16'(signed'({2'b00, sum}) - 16'sd6138);
  end

endmodule
