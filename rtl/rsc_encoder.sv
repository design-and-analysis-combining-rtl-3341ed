// rsc_encoder: recursive systematic convolutional encoder with one memory
// element, generator G(D) = [1, 1/(1+D)].
//
// The register s holds the previous feedback value. For input u the feedback
// is a = u ^ s, the parity bit is a and the register takes a on the clock
// edge when en is high. With term high the input is replaced by s itself,
// which makes a = 0: one such tail step drives the register back to zero
// (zero termination), and sys then gives the tail bit to transmit.
// sys and par are combinational from u, term and the register; clear zeroes
// the register at the next edge and wins over en. The choice of feed-forward
// polynomial 1 is this design's; the one memory element and the zero
// termination follow the design description.
module rsc_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic term,
  input  logic u,
  output logic sys,
  output logic par,
  output logic state
);

  logic s;

  always_comb begin
    sys = term ? s : u;
    par = sys ^ s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     s <= 1'b0;
    else if (clear) s <= 1'b0;
    else if (en)    s <= par;
  end

  assign state = s;

endmodule
