// max_star_tb: checks both forms of the Jacobian-logarithm unit against a
// real-arithmetic reference, max(a,b) + round(4*ln(1+exp(-|a-b|/4))) for
// Log-MAP and max(a,b) for Max-Log-MAP, on every difference 0..40 and on
// random operands.
module max_star_tb;
  import turbo_pkg::*;

  localparam int W = 16;
  logic signed [W-1:0] a, b, y_max, y_log;
  int checks = 0, failures = 0;

  max_star #(.ALGO(MAX_LOG_MAP), .W(W)) u_max (.a, .b, .y(y_max));
  max_star #(.ALGO(LOG_MAP),     .W(W)) u_log (.a, .b, .y(y_log));

  task automatic check(int av, int bv);
    int mx, d, corr;
    a = W'(av); b = W'(bv);
    #1;
    mx   = (av > bv) ? av : bv;
    d    = (av > bv) ? av - bv : bv - av;
    corr = $rtoi($floor(4.0 * $ln(1.0 + $exp(-real'(d) / 4.0)) + 0.5));
    checks += 2;
    if (int'(y_max) != mx) begin
      failures++;
      $display("FAIL max-log a=%0d b=%0d got %0d exp %0d", av, bv, y_max, mx);
    end
    if (int'(y_log) != mx + corr) begin
      failures++;
      $display("FAIL log-map a=%0d b=%0d got %0d exp %0d", av, bv, y_log, mx + corr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d <= 40; d++) begin
      check(100, 100 - d);
      check(-50 - d, -50);
    end
    repeat (2000) begin
      check(int'($urandom_range(6000)) - 3000, int'($urandom_range(6000)) - 3000);
      check(int'($urandom_range(200)) - 100, int'($urandom_range(200)) - 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
