// Serial adder that converts the downloaded most significant part (MSP) of
// a product from redundant form to binary, LSB first.
//
// Each clock it adds one bit of each of up to three streams (sum bits,
// carry bits, and a correction bit) and its own carry, which can reach 2 and
// is therefore two bits wide. `start` marks bit 0 of an MSP: on that clock
// the stored carry is replaced by `cinit` (1 for the Booth multiplier, whose
// correction stream is a one's complement, 0 for the 3X multiplier, which
// ties `k` low and so never needs more than a one-bit carry).
//
// Timing: `sum` and `first` are registered, one clock after the inputs;
// `first` is high with MSP bit 0. Synchronous active-high reset.
//
// A serial adder at the end of the download chain is what the document
// names; the third input and the two-bit carry are this design's, needed by
// its sign handling for negative Booth digits.
module msp_adder (
  input  logic clk,
  input  logic rst,
  input  logic start,  // bit 0 of an MSP is on s/c/k
  input  logic cinit,  // carry into bit 0
  input  logic s,
  input  logic c,
  input  logic k,
  output logic sum,
  output logic first
);

  logic [1:0] cy;
  logic [2:0] total;

  always_comb begin
    total = 3'(s) + 3'(c) + 3'(k) + (start ? 3'(cinit) : 3'(cy));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cy    <= '0;
      sum   <= 1'b0;
      first <= 1'b0;
    end else begin
      cy    <= total[2:1];
      sum   <= total[0];
      first <= start;
    end
  end

endmodule
