// ber_system: bit-error-rate test system around the mixed Max-Log-MAP /
// Log-MAP turbo decoder.
//
// Chain: bit_source (random message) -> turbo_encoder (rate 1/3, square
// block interleaver, zero termination) -> bpsk_channel (BPSK + AWGN ->
// channel LLRs) -> turbo_decoder (SISO1 Max-Log-MAP, SISO2 Log-MAP, hard
// decision) -> ber_counter, which compares each decoded bit with the
// original bit kept in a reference RAM.
//
// A start pulse clears the counters, loads the message seed and runs
// num_blocks blocks (0 is taken as 1), one at a time: K clocks to generate
// the message, K+3 clocks through encoder and channel, the decoding time of
// turbo_decoder, and K clocks of comparison. done pulses when the last block
// has been compared; bit_count / err_count is the BER. sigma, llr_gain and
// iterations must stay constant during a run. Running the three decoder
// variants side by side, as a comparison set-up would, is done by
// instantiating turbo_decoder with other algorithm parameters; this top
// carries only the mixed decoder.
module ber_system
  import turbo_pkg::*;
#(
  parameter int unsigned K  = 5476,
  parameter int unsigned R  = 74,
  localparam int unsigned AW = $clog2(K)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] num_blocks,
  input  logic [3:0]  iterations,
  input  logic [9:0]  sigma,
  input  logic [7:0]  llr_gain,
  input  logic [30:0] seed,
  output logic        busy,
  output logic        done,
  output logic [31:0] block_count,
  output logic [31:0] bit_count,
  output logic [31:0] err_count
);

  typedef enum logic [1:0] {S_IDLE, S_GEN, S_RUN} state_e;
  state_e        state;
  logic [AW-1:0] gen_cnt;
  logic [31:0]   blocks_target;

  // ---------------- message source ----------------
  logic src_bit, gen;
  assign gen = (state == S_GEN);

  bit_source u_src (.clk, .rst_n, .load(start && state == S_IDLE), .seed, .en(gen), .bit_out(src_bit));

  // ---------------- encoder and channel ----------------
  logic       enc_in_ready, enc_valid, enc_last;
  code_bits_t enc_bits;

  turbo_encoder #(.K(K), .R(R)) u_enc (
    .clk, .rst_n, .in_valid(gen), .in_ready(enc_in_ready), .in_bit(src_bit),
    .out_valid(enc_valid), .out_bits(enc_bits), .out_last(enc_last));

  logic     ch_valid;
  llr_vec_t ch_llr;

  bpsk_channel u_ch (
    .clk, .rst_n, .in_valid(enc_valid), .in_bits(enc_bits), .in_last(enc_last),
    .sigma, .llr_gain, .out_valid(ch_valid), .out_llr(ch_llr), .out_last());

  // ---------------- decoder ----------------
  logic dec_in_ready, dec_valid, dec_bit, dec_last;

  turbo_decoder #(.K(K), .R(R)) u_dec (
    .clk, .rst_n, .iterations, .in_valid(ch_valid), .in_ready(dec_in_ready), .in_llr(ch_llr),
    .out_valid(dec_valid), .out_bit(dec_bit), .out_last(dec_last), .busy());

  // ---------------- reference bits and BER ----------------
  logic [AW-1:0] ref_ptr, ref_raddr, ref_next;
  logic          ref_q;

  assign ref_next  = (ref_ptr == AW'(K-1)) ? '0 : ref_ptr + 1'b1;
  assign ref_raddr = dec_valid ? ref_next : ref_ptr;

  llr_ram #(.DEPTH(K), .WIDTH(1)) u_ref_ram (
    .clk, .we(gen), .waddr(gen_cnt), .wdata(src_bit), .raddr(ref_raddr), .rdata(ref_q));

  ber_counter u_ber (
    .clk, .rst_n, .clear(start && state == S_IDLE), .valid(dec_valid),
    .ref_bit(ref_q), .dec_bit, .bit_count, .err_count);

  // ---------------- run control ----------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      gen_cnt       <= '0;
      ref_ptr       <= '0;
      blocks_target <= '0;
      block_count   <= '0;
      done          <= 1'b0;
    end else begin
      done <= 1'b0;
      if (dec_valid) ref_ptr <= ref_next;
      case (state)
        S_IDLE: if (start) begin
          blocks_target <= (num_blocks == '0) ? 32'd1 : num_blocks;
          block_count   <= '0;
          gen_cnt       <= '0;
          ref_ptr       <= '0;
          state         <= S_GEN;
        end
        S_GEN: begin
          if (gen_cnt == AW'(K-1)) begin
            gen_cnt <= '0;
            state   <= S_RUN;
          end else begin
            gen_cnt <= gen_cnt + 1'b1;
          end
        end
        S_RUN: if (dec_valid && dec_last) begin
          block_count <= block_count + 1'b1;
          if (block_count + 1 == blocks_target) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_GEN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The encoder must be collecting while bits are generated, and the
  // decoder must be loading while the channel delivers words.
  assert property (@(posedge clk) disable iff (!rst_n) gen |-> enc_in_ready);
  assert property (@(posedge clk) disable iff (!rst_n) ch_valid |-> dec_in_ready);

endmodule
