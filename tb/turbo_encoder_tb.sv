// turbo_encoder_tb: feeds random blocks (K = 16 with R = 4, and K = 64 with
// R = 8) and compares every code word and the tail word with the reference
// encoder of turbo_ref_pkg; checks that exactly K+1 words come out per block
// with out_last on the tail, and that out_valid rises on the second clock
// edge after the edge that takes the K-th message bit.
module turbo_encoder_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv [2], ir [2], ib, ov [2], ol [2];
  code_bits_t ob [2];

  turbo_encoder #(.K(16), .R(4)) e16 (.clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]), .in_bit(ib),
    .out_valid(ov[0]), .out_bits(ob[0]), .out_last(ol[0]));
  turbo_encoder #(.K(64), .R(8)) e64 (.clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]), .in_bit(ib),
    .out_valid(ov[1]), .out_bits(ob[1]), .out_last(ol[1]));

  task automatic run(int e, int R);
    bit msg[], sys[], p1[], p2[], tl[4];
    int K, n;
    K = R * R;
    msg = new[K];
    foreach (msg[i]) msg[i] = 1'($urandom);
    encode(msg, R, sys, p1, p2, tl);
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      checks++;
      if (!ir[e]) begin failures++; $display("FAIL not ready"); end
      iv[e] = 1; ib = msg[k];
    end
    @(negedge clk); iv[e] = 0;
    checks++;
    if (ov[e]) begin failures++; $display("FAIL output one clock after last bit"); end
    @(negedge clk);
    checks++;
    if (ov[e]) begin failures++; $display("FAIL output two clocks after last bit"); end
    n = 0;
    for (int t = 0; t < K + 1; t++) begin
      @(negedge clk);
      checks++;
      if (!ov[e]) begin failures++; $display("FAIL gap in output at word %0d", t); end
      else begin
        checks += 2;
        if (t < K) begin
          if (ob[e] !== {1'b0, p2[t], p1[t], sys[t]}) begin
            failures++; $display("FAIL K=%0d word %0d got %b exp %b", K, t, ob[e], {1'b0, p2[t], p1[t], sys[t]});
          end
          if (ol[e]) begin failures++; $display("FAIL early last"); end
        end else begin
          if (ob[e] !== {tl[3], tl[2], tl[1], tl[0]}) begin
            failures++; $display("FAIL K=%0d tail got %b exp %b", K, ob[e], {tl[3], tl[2], tl[1], tl[0]});
          end
          if (!ol[e]) begin failures++; $display("FAIL no last on tail"); end
        end
      end
    end
    @(negedge clk);
    checks++;
    if (ov[e]) begin failures++; $display("FAIL extra word"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv[0] = 0; iv[1] = 0; ib = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) run(0, 4);
    repeat (5) run(1, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
