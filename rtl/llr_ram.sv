// llr_ram: simple dual-port RAM for one block of LLRs (or bits).
//
// One write port and one read port on the same clock. The read is
// synchronous: rdata holds mem[raddr] one clock after raddr is presented, so
// the array maps onto block RAM. Writing and reading the same address in one
// cycle returns the old contents. Depth and width are parameters; the default
// depth is one block of 5476 bits. There is no reset: callers never read a
// word before writing it in the same block.
module llr_ram #(
  parameter int unsigned DEPTH = 5476,
  parameter int unsigned WIDTH = 10,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
