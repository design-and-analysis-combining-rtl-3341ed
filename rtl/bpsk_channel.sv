// bpsk_channel: BPSK mapping, additive white Gaussian noise and conversion
// of the received values to channel LLRs, on the four lanes of a code word.
//
// Each bit is sent as x = +1 (bit 0) or -1 (bit 1); an independent awgn_gen
// per lane gives n ~ N(0,1), and the received value is y = x + sigma*n.
// The channel LLR is Lc*y with Lc = 2/sigma^2 the channel reliability; the
// caller supplies sigma (unsigned Q2.8) and llr_gain = Lc (unsigned Q4.4)
// for the Eb/N0 it wants (rate 1/3: sigma^2 = 3/(2*Eb/N0)). The LLR is
// rounded to Q5.2 and saturated to 8 bits. One clock of latency; out_last
// follows in_last. Every lane is computed on every word, so the tail word
// gets noise on all four of its bits. Word lengths are this design's choice.
module bpsk_channel
  import turbo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  code_bits_t in_bits,
  input  logic       in_last,
  input  logic [9:0] sigma,
  input  logic [7:0] llr_gain,
  output logic       out_valid,
  output llr_vec_t   out_llr,
  output logic       out_last
);

  localparam logic [63:0] SEEDS [LANES] = '{
    64'h9E37_79B9_7F4A_7C15, 64'hBF58_476D_1CE4_E5B9,
    64'h94D0_49BB_1331_11EB, 64'h2545_F491_4F6C_DD1D};

  logic signed [15:0] noise [LANES];
  llr_vec_t           llr;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    awgn_gen #(.SEED(SEEDS[i])) u_awgn (.clk, .rst_n, .en(in_valid), .sample(noise[i]));

    logic signed [27:0] scaled;   // Q.18
    logic signed [17:0] y;        // Q.10
    logic signed [27:0] l;        // Q.14
    logic signed [27:0] lr;       // Q.2
    always_comb begin
      scaled = 28'(noise[i]) * $signed({18'd0, sigma});
      y      = (in_bits[i] ? -18'sd1024 : 18'sd1024) + 18'(scaled >>> 8);
      l      = 28'(y) * $signed({20'd0, llr_gain});
      lr     = (l + 28'sd2048) >>> 12;
      if (lr > 28'sd127)       llr[i] = llr_t'(8'sd127);
      else if (lr < -28'sd128) llr[i] = llr_t'(-8'sd128);
      else                     llr[i] = llr_t'(lr);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_llr   <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) out_llr <= llr;
    end
  end

endmodule
