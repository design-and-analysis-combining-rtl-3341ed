// bit_source_tb: compares the generator's bits with a reference sequence
// produced by the defining recurrence b[n+31] = b[n+3] ^ b[n] of x^31+x^28+1
// (b[0..30] are the seed bits 30 down to 0), after reset and after loading
// other seeds, including the all-zero seed (taken as 1). Also checks that en
// low holds the sequence and that ones and zeros are balanced (not for the
// seed 1, whose first bits are mostly zeros).
module bit_source_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, en, bit_out;
  logic [30:0] seed;

  bit_source #(.SEED(31'h1234567)) dut (.clk, .rst_n, .load, .seed, .en, .bit_out);

  // Called on a falling edge with the register holding s; en is high.
  task automatic run(logic [30:0] s, int n, bit check_balance);
    bit b[];
    int ones;
    b = new[n + 31];
    if (s == 0) s = 31'h1;
    for (int i = 0; i < 31; i++) b[i] = s[30 - i];
    for (int i = 0; i < n; i++) b[i + 31] = b[i + 3] ^ b[i];
    ones = 0;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (bit_out !== b[i]) begin failures++; $display("FAIL seed %h bit %0d", s, i); end
      ones += b[i];
      if (i % 97 == 5) begin
        en = 0;
        @(negedge clk);
        checks++;
        if (bit_out !== b[i]) begin failures++; $display("FAIL hold at %0d", i); end
        en = 1;
      end
      @(negedge clk);
    end
    if (check_balance) checks++;
    if (check_balance && ones < n * 4 / 10 || ones > n * 6 / 10) begin failures++; $display("FAIL balance %0d/%0d", ones, n); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 1; seed = 0;
    @(negedge clk);
    rst_n = 1;
    run(31'h1234567, 2000, 1);
    for (int t = 0; t < 3; t++) begin
      logic [30:0] s;
      s = (t == 2) ? 31'h0 : 31'($urandom);
      load = 1; seed = s;
      @(negedge clk);
      load = 0;
      run(s, 1000, t != 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
