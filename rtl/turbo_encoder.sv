// turbo_encoder: rate-1/3 parallel concatenated (turbo) encoder.
//
// It collects a block of K message bits (in_valid/in_ready), then encodes
// the block in one pass of K clocks: constituent encoder 1 takes bit k,
// constituent encoder 2 takes bit pi(k) of the square block interleaver, and
// each clock emits the data word {sys = u[k], par1, par2} on lanes 0..2 of
// out_bits (lane 3 is 0). One more clock terminates both encoders to the
// zero state and emits the tail word {sys1, par1, sys2, par2} with out_last.
// The words leave one per clock with no back-pressure; out_valid rises on
// the second clock edge after the edge that takes the K-th message bit. While the tail word is out
// the encoder already collects the next block.
module turbo_encoder
  import turbo_pkg::*;
#(
  parameter int unsigned K  = 5476,
  parameter int unsigned R  = 74,
  localparam int unsigned AW = $clog2(K)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  output logic       out_valid,
  output code_bits_t out_bits,
  output logic       out_last
);

  typedef enum logic [1:0] {S_COLLECT, S_ENC, S_TAIL} state_e;
  state_e state;

  logic          msg [K];
  logic [AW-1:0] cnt;
  logic          u_nat, u_int;
  logic          p_valid, p_tail;
  logic          g_load, g_step;
  logic [AW-1:0] g_lin, g_perm;

  block_interleaver #(.R(R)) u_intl (
    .clk, .rst_n, .load(g_load), .down(1'b0), .step(g_step), .lin(g_lin), .perm(g_perm));

  assign in_ready = (state == S_COLLECT);
  assign g_load   = (state == S_COLLECT) && in_valid && (cnt == AW'(K-1));
  assign g_step   = (state == S_ENC);

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) msg[cnt] <= in_bit;
    u_nat <= msg[g_lin];
    u_int <= msg[g_perm];
  end

  logic sys1, par1, sys2, par2;
  logic enc_en;
  assign enc_en = p_valid || p_tail;

  rsc_encoder u_rsc1 (.clk, .rst_n, .clear(g_load), .en(enc_en), .term(p_tail),
                      .u(u_nat), .sys(sys1), .par(par1), .state());
  rsc_encoder u_rsc2 (.clk, .rst_n, .clear(g_load), .en(enc_en), .term(p_tail),
                      .u(u_int), .sys(sys2), .par(par2), .state());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_COLLECT;
      cnt       <= '0;
      p_valid   <= 1'b0;
      p_tail    <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_bits  <= '0;
    end else begin
      p_valid <= (state == S_ENC);
      p_tail  <= (state == S_TAIL);
      case (state)
        S_COLLECT: if (in_valid) begin
          if (cnt == AW'(K-1)) begin
            cnt   <= '0;
            state <= S_ENC;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_ENC: begin
          if (cnt == AW'(K-1)) begin
            cnt   <= '0;
            state <= S_TAIL;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_TAIL:  state <= S_COLLECT;
        default: state <= S_COLLECT;
      endcase

      out_valid <= enc_en;
      out_last  <= p_tail;
      if (p_tail) begin
        out_bits[TAIL_SYS1] <= sys1;
        out_bits[TAIL_PAR1] <= par1;
        out_bits[TAIL_SYS2] <= sys2;
        out_bits[TAIL_PAR2] <= par2;
      end else begin
        out_bits[LANE_SYS]  <= sys1;
        out_bits[LANE_PAR1] <= par1;
        out_bits[LANE_PAR2] <= par2;
        out_bits[3]         <= 1'b0;
      end
    end
  end

endmodule
