// block_interleaver_tb: walks the address generator up and down over whole
// blocks (R = 4, i.e. the 16-bit interleaver, and R = 74, the 5476-bit one)
// and compares lin and perm with i and (i mod R)*R + i div R. Also checks
// that perm is a permutation and that applying it twice gives the identity.
module block_interleaver_tb;
  import turbo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, down, step;
  logic [3:0]  lin4, perm4;
  logic [12:0] lin74, perm74;

  block_interleaver #(.R(4))  u4  (.clk, .rst_n, .load, .down, .step, .lin(lin4),  .perm(perm4));
  block_interleaver #(.R(74)) u74 (.clk, .rst_n, .load, .down, .step, .lin(lin74), .perm(perm74));

  task automatic walk(int R, bit dn, int n_steps);
    bit seen[];
    int K, i;
    K = R * R;
    seen = new[K];
    load <= 1; down <= dn; step <= 0;
    @(posedge clk);
    load <= 0; step <= 1;
    for (int n = 0; n < n_steps; n++) begin
      int l, p;
      #1;
      i = dn ? (K - 1 - (n % K)) : (n % K);
      l = (R == 4) ? int'(lin4) : int'(lin74);
      p = (R == 4) ? int'(perm4) : int'(perm74);
      checks += 3;
      if (l != i) begin failures++; $display("FAIL R=%0d lin %0d exp %0d", R, l, i); end
      if (p != pi(i, R)) begin failures++; $display("FAIL R=%0d perm(%0d) %0d exp %0d", R, i, p, pi(i, R)); end
      if (pi(p, R) != i) begin failures++; $display("FAIL R=%0d not an involution at %0d", R, i); end
      if (n < K) begin
        checks++;
        if (seen[p]) begin failures++; $display("FAIL R=%0d address %0d repeated", R, p); end
        seen[p] = 1;
      end
      @(posedge clk);
    end
    step <= 0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; down = 0; step = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    walk(4, 0, 40);
    walk(4, 1, 40);
    walk(74, 0, 5476 + 10);
    walk(74, 1, 5476 + 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
