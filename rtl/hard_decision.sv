// hard_decision: the hard decision maker at the decoder output.
//
// During the last pass of the second SISO decoder each a-posteriori LLR
// arrives with its natural-order (deinterleaved) bit position; the sign is
// stored as the decided bit (LLR < 0 -> 1, LLR >= 0 -> 0). A start pulse then
// streams the K stored bits out in natural order, one per clock, with
// out_last on bit K-1. out_valid rises on the clock edge after the
// one that samples start (one edge to issue the read, one of RAM latency). A write-side bit array of K
// entries lets the LLRs arrive in any order.
module hard_decision
  import turbo_pkg::*;
#(
  parameter int unsigned K  = 5476,
  localparam int unsigned AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  ext_t          wr_llr,
  input  logic          start,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last
);

  logic          bits [K];
  logic          reading;
  logic [AW-1:0] rd_addr;
  logic          rd_valid, rd_last;
  logic          rd_bit;

  always_ff @(posedge clk) begin
    if (wr_en) bits[wr_addr] <= wr_llr[EXT_W-1];
    rd_bit <= bits[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      rd_addr  <= '0;
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
    end else begin
      rd_valid <= reading;
      rd_last  <= reading && (rd_addr == AW'(K-1));
      if (start) begin
        reading <= 1'b1;
        rd_addr <= '0;
      end else if (reading) begin
        if (rd_addr == AW'(K-1)) reading <= 1'b0;
        else                     rd_addr <= rd_addr + 1'b1;
      end
    end
  end

  assign out_valid = rd_valid;
  assign out_bit   = rd_bit;
  assign out_last  = rd_last;

endmodule
