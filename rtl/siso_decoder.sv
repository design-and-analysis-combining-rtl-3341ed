// siso_decoder: soft-in soft-out MAP decoder for the one-register recursive
// systematic code, in Max-Log-MAP or Log-MAP form (parameter ALGO).
//
// Trellis: two states s (the encoder register). Input u gives a = u ^ s,
// parity p = a and next state a. Branch metric, with LLRs ln P(0)/P(1):
//   gamma(s,u) = [u=0]*(La + Ls) + [p=0]*Lp
// Forward recursion  A_{k+1}(s') = max*_{s -> s'} (A_k(s) + gamma)
// Backward recursion B_k(s)      = max*_{s -> s'} (B_{k+1}(s') + gamma)
// Extrinsic  Le_k = max*(A0+Lp+B0', A1+B1') - max*(A0+B1', A1+Lp+B0'),
// a-posteriori L_k = La + Ls + Le_k. The max* unit is plain max for
// Max-Log-MAP and max plus ln(1+e^-|d|) for Log-MAP. Both metric vectors
// start as (0, -inf): the encoder starts in state 0 and the tail step drives
// it back to 0. Metrics are normalised every step by subtracting the larger.
//
// Schedule (this design's choice, no sliding window): the block arrives as
// K+1 items (in_valid & in_ready, gaps allowed): items 0..K-1 are the
// information bits, item K is the tail step with in_la = 0. Each item is
// stored with its forward metric A_k. After item K the decoder stops taking
// input and walks the store backwards, one index per clock after a one-cycle
// read latency, emitting out_valid with out_idx = K-1 down to 0 (the tail step
// gives no output). done pulses with the output of index 0, and the decoder
// is ready for the next block on the following clock. Latency: the last
// output comes K+2 clocks after the tail item is accepted.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter algo_e       ALGO = MAX_LOG_MAP,
  parameter int unsigned K    = 5476,
  localparam int unsigned IW  = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  ext_t          in_la,
  input  llr_t          in_ls,
  input  llr_t          in_lp,
  output logic          out_valid,
  output logic [IW-1:0] out_idx,
  output ext_t          out_ext,
  output ext_t          out_llr,
  output logic          done
);

  localparam int W = MET_W + 2;
  typedef logic signed [W-1:0] wide_t;
  localparam met_t NEG_INF = met_t'(-(2**(MET_W-2)));

  typedef struct packed {
    met_t a0;
    met_t a1;
    ext_t la;
    llr_t ls;
    llr_t lp;
  } entry_t;

  entry_t mem [K+1];
  entry_t rd;

  logic          fwd;           // 1: taking input, 0: backward pass
  logic [IW-1:0] cnt;           // forward item index
  met_t          a0, a1;        // forward metrics of the current index
  met_t          b0, b1;        // backward metrics of index+1
  logic          issuing;
  logic [IW-1:0] iss_idx;
  logic          rd_valid;
  logic [IW-1:0] rd_idx;

  assign in_ready = fwd;

  // ---------------- forward step ----------------
  wide_t f_gs, f_gp, f_n0, f_n1, f_m;
  assign f_gs = wide_t'(in_la) + wide_t'(in_ls);
  assign f_gp = wide_t'(in_lp);

  max_star #(.ALGO(ALGO), .W(W)) u_fa0 (
    .a(wide_t'(a0) + f_gs + f_gp), .b(wide_t'(a1) + f_gp), .y(f_n0));
  max_star #(.ALGO(ALGO), .W(W)) u_fa1 (
    .a(wide_t'(a0)), .b(wide_t'(a1) + f_gs), .y(f_n1));
  assign f_m = (f_n0 >= f_n1) ? f_n0 : f_n1;

  // ---------------- backward step ----------------
  wide_t r_gs, r_gp, r_n0, r_n1, r_m, r_num, r_den, r_ext;
  assign r_gs = wide_t'(rd.la) + wide_t'(rd.ls);
  assign r_gp = wide_t'(rd.lp);

  max_star #(.ALGO(ALGO), .W(W)) u_bb0 (
    .a(wide_t'(b0) + r_gs + r_gp), .b(wide_t'(b1)), .y(r_n0));
  max_star #(.ALGO(ALGO), .W(W)) u_bb1 (
    .a(wide_t'(b1) + r_gs), .b(wide_t'(b0) + r_gp), .y(r_n1));
  assign r_m = (r_n0 >= r_n1) ? r_n0 : r_n1;

  // u = 0 branches (after removing the common La+Ls) and u = 1 branches
  max_star #(.ALGO(ALGO), .W(W)) u_l0 (
    .a(wide_t'(rd.a0) + r_gp + wide_t'(b0)), .b(wide_t'(rd.a1) + wide_t'(b1)), .y(r_num));
  max_star #(.ALGO(ALGO), .W(W)) u_l1 (
    .a(wide_t'(rd.a0) + wide_t'(b1)), .b(wide_t'(rd.a1) + r_gp + wide_t'(b0)), .y(r_den));
  assign r_ext = r_num - r_den;

  // ---------------- metric store ----------------
  always_ff @(posedge clk) begin
    if (fwd && in_valid)
      mem[cnt] <= '{a0: a0, a1: a1, la: in_la, ls: in_ls, lp: in_lp};
    rd <= mem[iss_idx];
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd       <= 1'b1;
      cnt       <= '0;
      a0        <= '0;
      a1        <= NEG_INF;
      b0        <= '0;
      b1        <= NEG_INF;
      issuing   <= 1'b0;
      iss_idx   <= '0;
      rd_valid  <= 1'b0;
      rd_idx    <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_ext   <= '0;
      out_llr   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;

      if (fwd && in_valid) begin
        a0 <= met_t'(f_n0 - f_m);
        a1 <= met_t'(f_n1 - f_m);
        if (cnt == IW'(K)) begin
          fwd     <= 1'b0;
          issuing <= 1'b1;
          iss_idx <= IW'(K);
          b0      <= '0;
          b1      <= NEG_INF;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end

      rd_valid <= issuing;
      rd_idx   <= iss_idx;
      if (issuing) begin
        if (iss_idx == '0) issuing <= 1'b0;
        else               iss_idx <= iss_idx - 1'b1;
      end

      if (rd_valid) begin
        b0 <= met_t'(r_n0 - r_m);
        b1 <= met_t'(r_n1 - r_m);
        if (rd_idx != IW'(K)) begin
          out_valid <= 1'b1;
          out_idx   <= rd_idx;
          out_ext   <= sat_ext(r_ext);
          out_llr   <= sat_ext(r_gs + r_ext);
        end
        if (rd_idx == '0) begin
          done <= 1'b1;
          fwd  <= 1'b1;
          cnt  <= '0;
          a0   <= '0;
          a1   <= NEG_INF;
        end
      end
    end
  end

endmodule
