// hard_decision_tb: writes random LLRs in a scrambled order, starts the
// read-out and checks that the K bits leave in natural order, each the sign
// of its LLR (negative -> 1), with out_last on the last one, starting two
// clocks after start. Repeated for three blocks.
module hard_decision_tb;
  import turbo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K = 36;
  logic wr_en, start, out_valid, out_bit, out_last;
  logic [5:0] wr_addr;
  ext_t wr_llr;

  hard_decision #(.K(K)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_llr, .start, .out_valid, .out_bit, .out_last);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expb [K];
    int order [K];
    wr_en = 0; start = 0; wr_addr = 0; wr_llr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      foreach (order[i]) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        int v;
        v = int'($urandom_range(1000)) - 500;
        if (i == 0) v = 0;                 // zero decides for 0
        expb[order[i]] = (v < 0);
        @(negedge clk);
        wr_en = 1; wr_addr = 6'(order[i]); wr_llr = ext_t'(v);
      end
      @(negedge clk); wr_en = 0; start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL output one clock after start"); end
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        checks += 3;
        if (!out_valid) begin failures++; $display("FAIL no valid at bit %0d", k); end
        if (out_bit !== expb[k]) begin failures++; $display("FAIL bit %0d got %0b exp %0b", k, out_bit, expb[k]); end
        if (out_last !== (k == K - 1)) begin failures++; $display("FAIL last at %0d", k); end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL extra output"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
