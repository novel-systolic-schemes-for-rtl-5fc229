// Systolic serial-parallel multiplier based on the 3X product.
//
// Computes P = A * X for an unsigned N-bit parallel factor A in plain binary
// and an unsigned M-bit serial factor X (LSB first). A is split into K = N/2
// bit pairs; pair j contributes (a[2j] + 2 a[2j+1]) * X * 4^j, i.e. 0, X, 2X
// or 3X. 2X is X one clock late; 3X is made once at the input by x3_gen and
// travels along the array beside X. No recoding of A is needed.
//
// Each word on `x` is L = M+2 bits: X followed by two zero bits (3X is two
// bits longer than X), and `r` is raised with the second zero bit. Words
// may follow each other with no gap, one multiplication every L clocks;
// idle clocks (x = 0, r = 0) may be inserted between words.
//
// Structure: x3_gen, then K x3_cell instances, cell 0 at the input/output
// end; X, 3X and R move up the array, partial sums down it, one register
// per cell each way. Cell 0's sum is the least significant part (LSP).
// When a word has passed, each cell's carry and two in-flight sum bits
// form the most significant part (MSP) in carry-save form; the cells
// download it progressively into two serial streams that msp_adder adds.
//
// Output timing, counting the clock in which X bit 0 is on `x` as 0:
//   p_l carries product bit i, i = 0..L-1, in clock i+1;
//   p_h carries product bit L+k, k = 0..N-1, in clock L+2+k;
//   ph_first is high in clock L+2.
// The MSP leaves in N clocks, so L >= N is required.
//
// The bit-pair selection of 0/X/2X/3X, the serial 3X adder, the two zero
// bits with R on the second, the retimed array and the download follow the
// document. Generating 3X once at the input, the chain layout, the L >= N
// rule, the default sizes and the reset are this design's.
module x3_mult #(
  parameter int N = 32,  // bits of the parallel factor A (even)
  parameter int M = 32   // bits of the serial factor X
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] a,
  input  logic         x,
  input  logic         r,
  output logic         p_l,
  output logic         p_h,
  output logic         ph_first
);

  localparam int K = N / 2;
  localparam int L = M + 2;

  logic x_c   [K+1];
  logic x3_c  [K+1];
  logic r_c   [K+1];
  logic r2_c  [K];
  logic s_c   [K+1];
  logic chs_c [K+1];
  logic chc_c [K+1];

  x3_gen u_gen (.clk(clk), .rst(rst), .x(x), .x3(x3_c[0]));

  assign x_c[0]   = x;
  assign r_c[0]   = r;
  assign s_c[K]   = 1'b0;
  assign chs_c[K] = 1'b0;
  assign chc_c[K] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_cell
    logic s_out, chs_out, chc_out;
    x3_cell u_cell (
      .clk    (clk),
      .rst    (rst),
      .a2     (a[2*j +: 2]),
      .x_in   (x_c[j]),
      .x3_in  (x3_c[j]),
      .r_in   (r_c[j]),
      .s_in   (s_c[j+1]),
      .chs_in (chs_c[j+1]),
      .chc_in (chc_c[j+1]),
      .x_out  (x_c[j+1]),
      .x3_out (x3_c[j+1]),
      .r_out  (r_c[j+1]),
      .r2_out (r2_c[j]),
      .s_out  (s_out),
      .chs_out(chs_out),
      .chc_out(chc_out)
    );
    assign s_c[j]   = s_out;
    assign chs_c[j] = chs_out;
    assign chc_c[j] = chc_out;
  end

  assign p_l = s_c[0];

  msp_adder u_conv (
    .clk  (clk),
    .rst  (rst),
    .start(r2_c[0]),
    .cinit(1'b0),
    .s    (chs_c[0]),
    .c    (chc_c[0]),
    .k    (1'b0),
    .sum  (p_h),
    .first(ph_first)
  );

  initial begin
    assert (N % 2 == 0 && N >= 2) else $error("x3_mult: N must be even");
    assert (L >= N) else $error("x3_mult: word length M+2 must be at least N");
  end

  // R comes with the second of the two zero bits that close a word.
  a_r_with_zeros: assert property (@(posedge clk) disable iff (rst) r |-> !x && !$past(x));

endmodule
