// ber_counter: bit error counting for the bit error rate, BER = err_count /
// bit_count.
//
// Each clock with valid compares the original message bit with the decoded
// bit; bit_count counts compared bits and err_count the mismatches. clear
// zeroes both (and wins over valid). Both counters saturate at all ones
// rather than wrap. The division is left to whoever reads the counters.
module ber_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,
  input  logic        ref_bit,
  input  logic        dec_bit,
  output logic [31:0] bit_count,
  output logic [31:0] err_count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_count <= '0;
      err_count <= '0;
    end else if (clear) begin
      bit_count <= '0;
      err_count <= '0;
    end else if (valid) begin
      if (bit_count != '1) bit_count <= bit_count + 1'b1;
      if ((ref_bit != dec_bit) && (err_count != '1)) err_count <= err_count + 1'b1;
    end
  end

endmodule
