// On-the-fly generator of 3X for a serial operand X (LSB first).
//
// 3X = X + 2X, and 2X is X delayed by one clock, so a one-bit serial adder
// with a stored carry produces bit i of 3X in the same clock as bit i of X
// arrives. The output is combinational from `x`, the delayed bit and the
// carry. Because every word ends in two zero bits, the carry is back to 0
// when the next word starts, so no word-boundary control is needed.
// Synchronous active-high reset.
//
// Serial addition of X and 2X is as described in the document; placing a
// single generator at the input and passing 3X along the array beside X is
// this design's choice.
module x3_gen (
  input  logic clk,
  input  logic rst,
  input  logic x,    // bit i of X
  output logic x3    // bit i of 3X
);

  logic x_d, cy;

  always_comb begin
    x3 = x ^ x_d ^ cy;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_d <= 1'b0;
      cy  <= 1'b0;
    end else begin
      x_d <= x;
      cy  <= (x & x_d) | (x & cy) | (x_d & cy);
    end
  end

endmodule
