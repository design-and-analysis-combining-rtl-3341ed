// ber_counter_tb: drives random reference/decoded bit pairs with random
// valid and checks both counters against a running model; checks clear.
module ber_counter_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, valid, ref_bit, dec_bit;
  logic [31:0] bit_count, err_count;

  ber_counter dut (.clk, .rst_n, .clear, .valid, .ref_bit, .dec_bit, .bit_count, .err_count);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, ne;
    clear = 0; valid = 0; ref_bit = 0; dec_bit = 0;
    @(negedge clk); rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      nb = 0; ne = 0;
      for (int i = 0; i < 1000; i++) begin
        valid = 1'($urandom); ref_bit = 1'($urandom);
        dec_bit = ($urandom_range(9) == 0) ? !ref_bit : ref_bit;
        if (valid) begin nb++; if (ref_bit != dec_bit) ne++; end
        @(negedge clk);
        checks += 2;
        if (bit_count != 32'(nb)) begin failures++; $display("FAIL bits %0d exp %0d", bit_count, nb); end
        if (err_count != 32'(ne)) begin failures++; $display("FAIL errs %0d exp %0d", err_count, ne); end
      end
      checks++;
      if (ne == 0) begin failures++; $display("FAIL no errors generated"); end
      clear = 1; valid = 1; ref_bit = 0; dec_bit = 1;
      @(negedge clk);
      clear = 0; valid = 0;
      checks += 2;
      if (bit_count != 0) begin failures++; $display("FAIL clear bits"); end
      if (err_count != 0) begin failures++; $display("FAIL clear errs"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
