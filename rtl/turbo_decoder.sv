// turbo_decoder: iterative decoder for the rate-1/3 turbo code, with the
// Max-Log-MAP algorithm in the first SISO decoder and Log-MAP in the second.
//
// Data flow per iteration (one SISO runs at a time):
//   SISO1 reads, in natural order k, the systematic LLR, parity-1 LLR and the
//   deinterleaved extrinsic of SISO2 (forced to 0 in the first iteration),
//   then the tail of encoder 1. Its extrinsic goes to LE12 at address k.
//   SISO2 reads, in interleaved order j, systematic and LE12 at pi(j) and the
//   parity-2 LLR at j, then the tail of encoder 2. Its extrinsic is written
//   to LE21 at pi(j) (deinterleaving); in the last iteration its a-posteriori
//   LLRs go to the hard decision maker, also at pi(j).
// pi is the square block interleaver (block_interleaver), its own inverse.
// Extrinsic = a-posteriori - a-priori - systematic, as the SISO computes it.
// The algorithm of each SISO is a parameter so that the all-Log-MAP and
// all-Max-Log-MAP variants can be built for comparison; the defaults are the
// mixed decoder.
//
// Interface: while in_ready is high the decoder takes K data words
// {sys, par1, par2, -} and then one tail word {sys1, par1, sys2, par2}
// (lanes of turbo_pkg). On the tail word it latches `iterations` (0 is
// taken as 1) and decodes; then it streams the K decided bits in natural
// order (out_valid, out_bit, out_last) and returns to loading.
// Timing: each half-iteration takes 2K+5 clocks; the first decoded bit
// leaves 2*I*(2K+5)+1 clocks after the tail word is accepted, I the number
// of iterations. The scheduling, memory organisation and word lengths are
// this design's own.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned K          = 5476,
  parameter int unsigned R          = 74,
  parameter algo_e       SISO1_ALGO = MAX_LOG_MAP,
  parameter algo_e       SISO2_ALGO = LOG_MAP,
  localparam int unsigned AW        = $clog2(K),
  localparam int unsigned IW        = $clog2(K + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic [3:0] iterations,
  input  logic     in_valid,
  output logic     in_ready,
  input  llr_vec_t in_llr,
  output logic     out_valid,
  output logic     out_bit,
  output logic     out_last,
  output logic     busy
);

  typedef enum logic [1:0] {S_LOAD, S_FEED, S_WAIT, S_OUT} state_e;

  state_e        state;
  logic          phase;        // 0: SISO1, 1: SISO2
  logic [3:0]    iter, iter_last;
  logic [IW-1:0] load_cnt, feed_cnt;
  llr_t          t_sys1, t_par1, t_sys2, t_par2;

  // ---------------- interleaver address generators ----------------
  logic          rd_load, rd_step, wr_load, wr_step;
  logic [AW-1:0] rd_lin, rd_perm, wr_lin, wr_perm;

  block_interleaver #(.R(R)) u_intl_rd (
    .clk, .rst_n, .load(rd_load), .down(1'b0), .step(rd_step), .lin(rd_lin), .perm(rd_perm));
  block_interleaver #(.R(R)) u_intl_wr (
    .clk, .rst_n, .load(wr_load), .down(1'b1), .step(wr_step), .lin(wr_lin), .perm(wr_perm));

  // ---------------- memories ----------------
  logic          loading_data;
  logic [AW-1:0] sys_raddr;
  llr_t          sys_q;
  logic [2*LLR_W-1:0] par_q;
  ext_t          le12_q, le21_q;

  assign loading_data = (state == S_LOAD) && in_valid && (load_cnt != IW'(K));
  assign sys_raddr    = phase ? rd_perm : rd_lin;

  llr_ram #(.DEPTH(K), .WIDTH(LLR_W)) u_sys_ram (
    .clk, .we(loading_data), .waddr(AW'(load_cnt)), .wdata(in_llr[LANE_SYS]),
    .raddr(sys_raddr), .rdata(sys_q));
  llr_ram #(.DEPTH(K), .WIDTH(2*LLR_W)) u_par_ram (
    .clk, .we(loading_data), .waddr(AW'(load_cnt)), .wdata({in_llr[LANE_PAR2], in_llr[LANE_PAR1]}),
    .raddr(rd_lin), .rdata(par_q));

  // SISO outputs
  logic          s1_in_ready, s1_out_valid, s1_done;
  logic          s2_in_ready, s2_out_valid, s2_done;
  logic [IW-1:0] s1_out_idx, s2_out_idx;
  ext_t          s1_ext, s2_ext, s2_llr;

  llr_ram #(.DEPTH(K), .WIDTH(EXT_W)) u_le12_ram (
    .clk, .we(s1_out_valid), .waddr(AW'(s1_out_idx)), .wdata(s1_ext),
    .raddr(rd_perm), .rdata(le12_q));
  llr_ram #(.DEPTH(K), .WIDTH(EXT_W)) u_le21_ram (
    .clk, .we(s2_out_valid), .waddr(wr_perm), .wdata(s2_ext),
    .raddr(rd_lin), .rdata(le21_q));

  // ---------------- feeding the active SISO ----------------
  logic feed_issue, p_valid, p_tail;
  ext_t f_la;
  llr_t f_ls, f_lp;

  assign feed_issue = (state == S_FEED);
  assign rd_step    = feed_issue && (feed_cnt != IW'(K));

  always_comb begin
    if (p_tail) begin
      f_la = '0;
      f_ls = phase ? t_sys2 : t_sys1;
      f_lp = phase ? t_par2 : t_par1;
    end else begin
      f_ls = sys_q;
      f_lp = phase ? llr_t'(par_q[2*LLR_W-1:LLR_W]) : llr_t'(par_q[LLR_W-1:0]);
      if (phase)            f_la = le12_q;
      else if (iter == '0)  f_la = '0;
      else                  f_la = le21_q;
    end
  end

  siso_decoder #(.ALGO(SISO1_ALGO), .K(K)) u_siso1 (
    .clk, .rst_n, .in_valid(p_valid && !phase), .in_ready(s1_in_ready),
    .in_la(f_la), .in_ls(f_ls), .in_lp(f_lp),
    .out_valid(s1_out_valid), .out_idx(s1_out_idx), .out_ext(s1_ext), .out_llr(), .done(s1_done));

  siso_decoder #(.ALGO(SISO2_ALGO), .K(K)) u_siso2 (
    .clk, .rst_n, .in_valid(p_valid && phase), .in_ready(s2_in_ready),
    .in_la(f_la), .in_ls(f_ls), .in_lp(f_lp),
    .out_valid(s2_out_valid), .out_idx(s2_out_idx), .out_ext(s2_ext), .out_llr(s2_llr), .done(s2_done));

  assign wr_step = s2_out_valid;

  // ---------------- hard decision ----------------
  logic hd_start;
  logic last_iter;
  assign last_iter = (iter == iter_last);

  hard_decision #(.K(K)) u_hd (
    .clk, .rst_n, .wr_en(s2_out_valid && last_iter), .wr_addr(wr_perm), .wr_llr(s2_llr),
    .start(hd_start), .out_valid, .out_bit, .out_last);

  // ---------------- control ----------------
  logic phase_done;
  assign phase_done = phase ? s2_done : s1_done;
  assign in_ready   = (state == S_LOAD);
  assign busy       = (state != S_LOAD) || (load_cnt != '0);

  always_comb begin
    rd_load  = 1'b0;
    wr_load  = 1'b0;
    hd_start = 1'b0;
    if (state == S_LOAD && in_valid && load_cnt == IW'(K)) rd_load = 1'b1;
    if (state == S_WAIT && phase_done) begin
      if (!phase) begin
        rd_load = 1'b1;
        wr_load = 1'b1;
      end else if (last_iter) begin
        hd_start = 1'b1;
      end else begin
        rd_load = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      phase     <= 1'b0;
      iter      <= '0;
      iter_last <= '0;
      load_cnt  <= '0;
      feed_cnt  <= '0;
      p_valid   <= 1'b0;
      p_tail    <= 1'b0;
      t_sys1    <= '0;
      t_par1    <= '0;
      t_sys2    <= '0;
      t_par2    <= '0;
    end else begin
      p_valid <= feed_issue;
      p_tail  <= feed_issue && (feed_cnt == IW'(K));
      case (state)
        S_LOAD: if (in_valid) begin
          if (load_cnt == IW'(K)) begin
            t_sys1    <= in_llr[TAIL_SYS1];
            t_par1    <= in_llr[TAIL_PAR1];
            t_sys2    <= in_llr[TAIL_SYS2];
            t_par2    <= in_llr[TAIL_PAR2];
            iter_last <= (iterations == '0) ? '0 : iterations - 1'b1;
            iter      <= '0;
            phase     <= 1'b0;
            feed_cnt  <= '0;
            load_cnt  <= '0;
            state     <= S_FEED;
          end else begin
            load_cnt <= load_cnt + 1'b1;
          end
        end
        S_FEED: begin
          if (feed_cnt == IW'(K)) state <= S_WAIT;
          else                    feed_cnt <= feed_cnt + 1'b1;
        end
        S_WAIT: if (phase_done) begin
          feed_cnt <= '0;
          if (!phase) begin
            phase <= 1'b1;
            state <= S_FEED;
          end else if (last_iter) begin
            state <= S_OUT;
          end else begin
            phase <= 1'b0;
            iter  <= iter + 1'b1;
            state <= S_FEED;
          end
        end
        S_OUT: if (out_valid && out_last) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

  // The active SISO must be ready whenever it is fed, and the write-side
  // interleaver must follow SISO2's output index.
  assert property (@(posedge clk) disable iff (!rst_n)
    p_valid |-> (phase ? s2_in_ready : s1_in_ready));
  assert property (@(posedge clk) disable iff (!rst_n)
    s2_out_valid |-> (IW'(wr_lin) == s2_out_idx));

endmodule
