// siso_decoder_tb: runs the Max-Log-MAP and Log-MAP forms of the SISO
// decoder (K = 16 and K = 37) on random a-priori/systematic/parity LLRs and
// compares every extrinsic and a-posteriori output, bit for bit, with the
// enumerated-trellis reference of turbo_ref_pkg. Also checks the output
// order (K-1 down to 0), the done pulse, the latency (last output K+2 clocks
// after the tail item), back-to-back blocks and input gaps, and that the
// Log-MAP correction changes at least some outputs.
module siso_decoder_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int diff_algos = 0;

  // two sizes, two algorithms
  localparam int KA = 16, KB = 37;

  logic in_valid;
  ext_t in_la;
  llr_t in_ls, in_lp;

  logic rdy [4];
  logic ov [4];
  logic [5:0] oidx [4];
  ext_t oext [4], ollr [4];
  logic odone [4];
  logic valid_to [4];

  siso_decoder #(.ALGO(MAX_LOG_MAP), .K(KA)) d0 (.clk, .rst_n, .in_valid(valid_to[0]), .in_ready(rdy[0]),
    .in_la, .in_ls, .in_lp, .out_valid(ov[0]), .out_idx(oidx[0][4:0]), .out_ext(oext[0]), .out_llr(ollr[0]), .done(odone[0]));
  siso_decoder #(.ALGO(LOG_MAP), .K(KA)) d1 (.clk, .rst_n, .in_valid(valid_to[1]), .in_ready(rdy[1]),
    .in_la, .in_ls, .in_lp, .out_valid(ov[1]), .out_idx(oidx[1][4:0]), .out_ext(oext[1]), .out_llr(ollr[1]), .done(odone[1]));
  siso_decoder #(.ALGO(MAX_LOG_MAP), .K(KB)) d2 (.clk, .rst_n, .in_valid(valid_to[2]), .in_ready(rdy[2]),
    .in_la, .in_ls, .in_lp, .out_valid(ov[2]), .out_idx(oidx[2]), .out_ext(oext[2]), .out_llr(ollr[2]), .done(odone[2]));
  siso_decoder #(.ALGO(LOG_MAP), .K(KB)) d3 (.clk, .rst_n, .in_valid(valid_to[3]), .in_ready(rdy[3]),
    .in_la, .in_ls, .in_lp, .out_valid(ov[3]), .out_idx(oidx[3]), .out_ext(oext[3]), .out_llr(ollr[3]), .done(odone[3]));
  assign oidx[0][5] = 1'b0;
  assign oidx[1][5] = 1'b0;

  int sel;   // which decoders get the current stream
  always_comb for (int i = 0; i < 4; i++) valid_to[i] = in_valid && (sel == i / 2);

  int exp_ext [2][], exp_llr [2][];
  int got_ext [2][], got_llr [2][];
  int cyc;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic run_block(int which, int K, bit gaps);
    int la[], ls[], lp[], e[], l[];
    int ti, expect_idx, t_tail, t_last;
    bit got_done;
    la = new[K + 1]; ls = new[K + 1]; lp = new[K + 1];
    for (int k = 0; k <= K; k++) begin
      la[k] = (k == K) ? 0 : int'($urandom_range(400)) - 200;
      ls[k] = int'($urandom_range(255)) - 128;
      lp[k] = int'($urandom_range(255)) - 128;
    end
    for (int a = 0; a < 2; a++) begin
      siso(la, ls, lp, a[0], e, l);
      exp_ext[a] = e; exp_llr[a] = l;
    end
    sel = which;
    // feed
    for (int k = 0; k <= K; k++) begin
      if (gaps) begin
        in_valid <= 0;
        repeat ($urandom_range(2)) @(posedge clk);
      end
      checks++;
      if (!rdy[2*which]) begin failures++; $display("FAIL not ready at item %0d", k); end
      in_valid <= 1; in_la <= ext_t'(la[k]); in_ls <= llr_t'(ls[k]); in_lp <= llr_t'(lp[k]);
      @(posedge clk);
    end
    in_valid <= 0;
    #1 t_tail = cyc;
    // collect
    expect_idx = K - 1;
    got_done = 0;
    ti = 0;
    while (!got_done && ti < 4 * K + 20) begin
      @(posedge clk); #1;
      ti++;
      if (ov[2*which]) begin
        for (int a = 0; a < 2; a++) begin
          checks += 3;
          if (int'(oidx[2*which+a]) != expect_idx) begin
            failures++; $display("FAIL idx got %0d exp %0d", oidx[2*which+a], expect_idx);
          end
          if (int'(oext[2*which+a]) != exp_ext[a][expect_idx]) begin
            failures++; $display("FAIL K=%0d algo=%0d ext[%0d] got %0d exp %0d", K, a, expect_idx, oext[2*which+a], exp_ext[a][expect_idx]);
          end
          if (int'(ollr[2*which+a]) != exp_llr[a][expect_idx]) begin
            failures++; $display("FAIL K=%0d algo=%0d llr[%0d] got %0d exp %0d", K, a, expect_idx, ollr[2*which+a], exp_llr[a][expect_idx]);
          end
        end
        if (oext[2*which] != oext[2*which+1]) diff_algos++;
        if (odone[2*which]) begin
          got_done = 1;
          t_last = cyc;
          checks += 2;
          if (expect_idx != 0) begin failures++; $display("FAIL done at idx %0d", expect_idx); end
          // tail item accepted on edge t_tail; last output visible K+2 edges later
          if (t_last - t_tail != K + 2) begin
            failures++; $display("FAIL latency %0d exp %0d", t_last - t_tail, K + 2);
          end
        end
        expect_idx--;
      end
    end
    checks++;
    if (!got_done || expect_idx != -1) begin failures++; $display("FAIL block incomplete"); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_la = 0; in_ls = 0; in_lp = 0; sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 6; n++) run_block(0, KA, n[0]);
    for (int n = 0; n < 6; n++) run_block(1, KB, n[0]);
    checks++;
    if (diff_algos == 0) begin failures++; $display("FAIL Log-MAP never differed from Max-Log-MAP"); end
    $display("Log-MAP and Max-Log-MAP extrinsics differed on %0d outputs", diff_algos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
