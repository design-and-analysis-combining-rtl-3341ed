// bit_source: pseudo-random message bits from a PRBS-31 linear feedback
// shift register (x^31 + x^28 + 1, Fibonacci form).
//
// load copies seed into the register (an all-zero seed becomes 1, since the
// all-zero state never leaves itself). Each clock with en the register
// shifts left, taking bit30 ^ bit27 into bit 0. bit_out is bit 30 of the
// current register, so the first bit after a load is seed[30]. The
// polynomial and seed handling are this design's choice.
module bit_source #(
  parameter logic [30:0] SEED = 31'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [30:0] seed,
  input  logic        en,
  output logic        bit_out
);

  logic [30:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lfsr <= (SEED == '0) ? 31'h1 : SEED;
    else if (load) lfsr <= (seed == '0) ? 31'h1 : seed;
    else if (en)   lfsr <= {lfsr[29:0], lfsr[30] ^ lfsr[27]};
  end

  assign bit_out = lfsr[30];

endmodule
