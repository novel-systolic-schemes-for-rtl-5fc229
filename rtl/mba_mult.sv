// Systolic serial-parallel multiplier, parallel factor in Modified Booth form.
//
// Computes P = A * X where A is an N-bit two's complement number given as
// K = N/2 radix-4 Booth digits (already recoded; no encoder is included)
// and X is an unsigned M-bit number that enters serially, LSB first. Each
// word on `x` is L = M+1 bits long: the M bits of X followed by one zero bit,
// and `r` is raised together with that zero bit. Words may follow each other
// with no gap, so the unit accepts a new multiplication every L clocks
// (full occupancy of the serial input); idle clocks (x = 0, r = 0) may be
// inserted between words.
//
// Structure: K mba_cell instances, cell 0 at the input/output end. X and R
// move from cell j to cell j+1, partial sums from cell j+1 to cell j, one
// register per cell each way. Cell 0's sum is the least significant part
// (LSP) of the product. When a word has passed, each cell's carry and the
// two sum bits that were still in flight towards it form, in carry-save
// form, the most significant part (MSP); the cells download them
// progressively (following R) into three serial streams that shift towards
// cell 0 and are added by msp_adder. A negative partial product lacks its
// sign extension above bit L-1; the cells put ~neg_j (then 1) into the
// third stream and the adder starts with carry 1, which subtracts
// sum_j neg_j*4^j from the MSP and makes the result exact.
//
// Output timing, counting the clock in which X bit 0 is on `x` as 0:
//   p_l carries LSP bit i (product bit i), i = 0..L-1, in clock i+1;
//   p_h carries MSP bit k (product bit L+k), k = 0..N-1, in clock L+2+k;
//   ph_first is high in clock L+2. Together p_l and p_h give the L+N-bit
//   two's complement product.
// The MSP leaves in N clocks, so L >= N is required (long serial operands;
// with shorter X pad it with zeros).
//
// The array, its retimed (systolic) form, the word format with one zero
// bit and R, the carry seeding and the progressive download into a serial
// adder follow the document. The sign-correction stream, the chain layout,
// the L >= N rule, the default sizes and the reset are this design's.
module mba_mult
  import spmult_pkg::*;
#(
  parameter int N = 32,  // bits of the parallel factor A (even)
  parameter int M = 32   // bits of the serial factor X
) (
  input  logic         clk,
  input  logic         rst,
  input  booth_digit_t digits [N/2],  // Booth digits of A, digit 0 least significant
  input  logic         x,
  input  logic         r,
  output logic         p_l,
  output logic         p_h,
  output logic         ph_first
);

  localparam int K = N / 2;
  localparam int L = M + 1;

  logic x_c   [K+1];
  logic r_c   [K+1];
  logic r2_c  [K];
  logic s_c   [K+1];
  logic chs_c [K+1];
  logic chc_c [K+1];
  logic chn_c [K+1];

  assign x_c[0]   = x;
  assign r_c[0]   = r;
  assign s_c[K]   = 1'b0;
  assign chs_c[K] = 1'b0;
  assign chc_c[K] = 1'b0;
  assign chn_c[K] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_cell
    logic s_out, chs_out, chc_out, chn_out;
    mba_cell u_cell (
      .clk    (clk),
      .rst    (rst),
      .d      (digits[j]),
      .x_in   (x_c[j]),
      .r_in   (r_c[j]),
      .s_in   (s_c[j+1]),
      .chs_in (chs_c[j+1]),
      .chc_in (chc_c[j+1]),
      .chn_in (chn_c[j+1]),
      .x_out  (x_c[j+1]),
      .r_out  (r_c[j+1]),
      .r2_out (r2_c[j]),
      .s_out  (s_out),
      .chs_out(chs_out),
      .chc_out(chc_out),
      .chn_out(chn_out)
    );
    assign s_c[j]   = s_out;
    assign chs_c[j] = chs_out;
    assign chc_c[j] = chc_out;
    assign chn_c[j] = chn_out;
  end

  assign p_l = s_c[0];

  msp_adder u_conv (
    .clk  (clk),
    .rst  (rst),
    .start(r2_c[0]),
    .cinit(1'b1),
    .s    (chs_c[0]),
    .c    (chc_c[0]),
    .k    (chn_c[0]),
    .sum  (p_h),
    .first(ph_first)
  );

  initial begin
    assert (N % 2 == 0 && N >= 2) else $error("mba_mult: N must be even");
    assert (L >= N) else $error("mba_mult: word length M+1 must be at least N");
  end

  // R comes with the zero bit that closes a word.
  a_r_with_zero: assert property (@(posedge clk) disable iff (rst) r |-> !x);

endmodule
