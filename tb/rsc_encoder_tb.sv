// rsc_encoder_tb: encodes random blocks and checks each systematic and
// parity bit against the recursion p_k = u_k ^ p_{k-1}; after each block a
// tail step must emit the register as its systematic bit, parity 0, and
// leave the register at 0. clear must zero the register.
module rsc_encoder_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, en, term, u, sys, par, state;
  rsc_encoder dut (.clk, .rst_n, .clear, .en, .term, .u, .sys, .par, .state);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit r;
    clear = 0; en = 0; term = 0; u = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      r = 0;
      for (int k = 0; k < 25; k++) begin
        @(negedge clk);
        en = 1; term = 0; u = 1'($urandom);
        #1;
        r = u ^ r;
        checks += 2;
        if (sys !== u) begin failures++; $display("FAIL sys"); end
        if (par !== r) begin failures++; $display("FAIL parity at %0d", k); end
      end
      @(negedge clk);
      term = 1; u = 1'($urandom);
      #1;
      checks += 2;
      if (sys !== r) begin failures++; $display("FAIL tail sys"); end
      if (par !== 1'b0) begin failures++; $display("FAIL tail parity"); end
      @(negedge clk);
      en = 0; term = 0;
      checks++;
      if (state !== 1'b0) begin failures++; $display("FAIL not terminated"); end
    end
    // clear
    @(negedge clk); en = 1; u = 1;
    @(negedge clk); en = 0; clear = 1;
    @(negedge clk); clear = 0;
    checks++;
    if (state !== 1'b0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
