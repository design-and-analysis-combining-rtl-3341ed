// block_interleaver: address generator of the square block interleaver.
//
// A block of K = R*R bits is written row by row into an R x R array and read
// column by column, so position i maps to pi(i) = (i mod R)*R + (i div R).
// This transpose is its own inverse: the same generator also serves as the
// deinterleaver. The generator walks the linear index lin = row*R + col up
// (load with down=0 starts at 0) or down (load with down=1 starts at K-1),
// one position per step, keeping row and column counters so that no divider
// is needed; perm = col*R + row is the interleaved address.
//
// Timing: load and step take effect at the next clock edge; lin and perm are
// registered outputs. Stepping past the end wraps around.
module block_interleaver #(
  parameter int unsigned R  = 74,
  localparam int unsigned K  = R * R,
  localparam int unsigned AW = $clog2(K),
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          down,
  input  logic          step,
  output logic [AW-1:0] lin,
  output logic [AW-1:0] perm
);

  logic [RW-1:0] row, col;
  logic          dir_down;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0; col <= '0; dir_down <= 1'b0;
    end else if (load) begin
      dir_down <= down;
      row <= down ? RW'(R-1) : '0;
      col <= down ? RW'(R-1) : '0;
    end else if (step) begin
      if (!dir_down) begin
        if (col == RW'(R-1)) begin
          col <= '0;
          row <= (row == RW'(R-1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end else begin
        if (col == '0) begin
          col <= RW'(R-1);
          row <= (row == '0) ? RW'(R-1) : row - 1'b1;
        end else begin
          col <= col - 1'b1;
        end
      end
    end
  end

  assign lin  = AW'(row) * AW'(R) + AW'(col);
  assign perm = AW'(col) * AW'(R) + AW'(row);

endmodule
