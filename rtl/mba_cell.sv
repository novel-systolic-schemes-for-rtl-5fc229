// One cell of the systolic Modified Booth serial-parallel multiplier.
//
// Cell j holds Booth digit w_j of the parallel factor and adds w_j*X, one
// bit per clock, into a sum stream that flows towards cell 0 while X and the
// word-boundary signal R flow the other way, one register per cell in each
// direction (the retimed, systolic arrangement). The register that delays X
// on its way to cell j+1 also provides this cell's 2X bit, so a single X
// line serves both terms.
//
// Word boundary. R arrives together with the last bit of a word (the zero
// bit that lets 2X finish). In the two clocks after R the two sum bits that
// arrive from cell j+1 still belong to the finished word: they are steered
// into the download chain instead of the adder (the two delayed copies of R
// are ORed to drive that switch), and the cell's final carry of that word is
// downloaded with the first of them while the adder restarts with carry
// w_j<0 (the +1 of the two's complement). The download chain holds, per
// cell, one stage of each of three serial streams that shift towards cell 0
// one cell per clock: sum bits, carry bits (carry, then 0) and the sign
// correction ~neg_j, then 1 (see mba_mult).
//
// Timing: every output is a register; x_out, r_out lag x_in, r_in by one
// clock, r2_out by two. Synchronous active-high reset; it loads the carry
// with d.neg so the cell is idle-stable (sum 0) with X = 0.
//
// The cell content (generator, full adder, X/R/sum delays, OR-driven
// switch, carry seeded with 1 for negative digits, download registers)
// follows the document; the stream layout of the download registers and the
// sign-correction stream are this design's choices.
module mba_cell
  import spmult_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  booth_digit_t d,       // Booth digit w_j (static)
  input  logic         x_in,    // X from cell j-1 (or the input)
  input  logic         r_in,    // R from cell j-1 (or the input)
  input  logic         s_in,    // partial sum from cell j+1
  input  logic         chs_in,  // download chain, sum stream, from cell j+1
  input  logic         chc_in,  // download chain, carry stream
  input  logic         chn_in,  // download chain, sign-correction stream
  output logic         x_out,
  output logic         r_out,
  output logic         r2_out,
  output logic         s_out,   // partial sum to cell j-1
  output logic         chs_out,
  output logic         chc_out,
  output logic         chn_out
);

  logic x_q, r_q, r_q2, sum_q, carry;
  logic chs_q, chc_q, chn_q;
  logic pp, divert, add_in, cin, fa_s, fa_c;

  mb_cell u_pp (.x(x_in), .x2(x_q), .d(d), .pp(pp));

  always_comb begin
    divert = r_q | r_q2;
    add_in = divert ? 1'b0 : s_in;
    cin    = r_q ? d.neg : carry;
    {fa_c, fa_s} = 2'(pp) + 2'(add_in) + 2'(cin);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q   <= 1'b0;
      r_q   <= 1'b0;
      r_q2  <= 1'b0;
      sum_q <= 1'b0;
      carry <= d.neg;
      chs_q <= 1'b0;
      chc_q <= 1'b0;
      chn_q <= 1'b0;
    end else begin
      x_q   <= x_in;
      r_q   <= r_in;
      r_q2  <= r_q;
      sum_q <= fa_s;
      carry <= fa_c;
      if (r_q) begin
        chs_q <= s_in;
        chc_q <= carry;
        chn_q <= ~d.neg;
      end else if (r_q2) begin
        chs_q <= s_in;
        chc_q <= 1'b0;
        chn_q <= 1'b1;
      end else begin
        chs_q <= chs_in;
        chc_q <= chc_in;
        chn_q <= chn_in;
      end
    end
  end

  assign x_out   = x_q;
  assign r_out   = r_q;
  assign r2_out  = r_q2;
  assign s_out   = sum_q;
  assign chs_out = chs_q;
  assign chc_out = chc_q;
  assign chn_out = chn_q;

endmodule
