// llr_ram_tb: fills the RAM with random words, reads every address back and
// checks the one-cycle read latency and read-before-write behaviour when
// both ports hit the same address.
module llr_ram_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 100, WIDTH = 10;
  logic we;
  logic [6:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  llr_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i); wdata = WIDTH'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); raddr = 7'(i);
      @(negedge clk);
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL addr %0d got %0h exp %0h", i, rdata, model[i]); end
    end
    // same-address write and read: old contents come out, new ones next
    repeat (20) begin
      int a;
      logic [WIDTH-1:0] old_v, new_v;
      a = $urandom_range(DEPTH - 1);
      old_v = model[a]; new_v = WIDTH'($urandom);
      @(negedge clk); we = 1; waddr = 7'(a); raddr = 7'(a); wdata = new_v;
      @(negedge clk); we = 0;
      checks++;
      if (rdata !== old_v) begin failures++; $display("FAIL read-during-write addr %0d", a); end
      model[a] = new_v;
      @(negedge clk);
      checks++;
      if (rdata !== new_v) begin failures++; $display("FAIL after write addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
