// One cell of the systolic serial-parallel multiplier based on 3X.
//
// Cell j holds the bit pair (a[2j+1], a[2j]) of the binary parallel factor
// A. Each clock a 4:1 mux picks the current bit of 0, X, 2X or 3X according
// to that pair, and a full adder adds it, the partial sum arriving from cell
// j+1 and the cell's carry. X and 3X travel from cell j to cell j+1 with the
// word-boundary signal R, one register per cell; partial sums travel the
// other way, one register per cell. The register delaying X also supplies
// this cell's 2X bit.
//
// Word boundary. R arrives with the second of the two zero bits that close a
// word. During the two following clocks the sum bits still arriving from
// cell j+1 belong to the finished word: a switch driven by the OR of the two
// delayed copies of R steers them into the download chain instead of the
// adder, and the cell's final carry goes into the carry stream with the
// first of them while the adder restarts with carry 0. The chain (one stage
// of a sum stream and of a carry stream per cell) shifts towards cell 0 one
// cell per clock.
//
// Timing: all outputs are registers; x_out, x3_out, r_out lag their inputs
// by one clock, r2_out by two. Synchronous active-high reset.
//
// The mux, adder and download switch follow the document; the stream
// layout of the download chain is this design's.
module x3_cell (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] a2,       // a[2j+1:2j]
  input  logic       x_in,
  input  logic       x3_in,
  input  logic       r_in,
  input  logic       s_in,     // partial sum from cell j+1
  input  logic       chs_in,   // download chain, sum stream, from cell j+1
  input  logic       chc_in,   // download chain, carry stream
  output logic       x_out,
  output logic       x3_out,
  output logic       r_out,
  output logic       r2_out,
  output logic       s_out,
  output logic       chs_out,
  output logic       chc_out
);

  logic x_q, x3_q, r_q, r_q2, sum_q, carry, chs_q, chc_q;
  logic pp, divert, add_in, cin, fa_s, fa_c;

  always_comb begin
    unique case (a2)
      2'd0: pp = 1'b0;
      2'd1: pp = x_in;
      2'd2: pp = x_q;
      2'd3: pp = x3_in;
    endcase
    divert = r_q | r_q2;
    add_in = divert ? 1'b0 : s_in;
    cin    = r_q ? 1'b0 : carry;
    {fa_c, fa_s} = 2'(pp) + 2'(add_in) + 2'(cin);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q   <= 1'b0;
      x3_q  <= 1'b0;
      r_q   <= 1'b0;
      r_q2  <= 1'b0;
      sum_q <= 1'b0;
      carry <= 1'b0;
      chs_q <= 1'b0;
      chc_q <= 1'b0;
    end else begin
      x_q   <= x_in;
      x3_q  <= x3_in;
      r_q   <= r_in;
      r_q2  <= r_q;
      sum_q <= fa_s;
      carry <= fa_c;
      if (r_q) begin
        chs_q <= s_in;
        chc_q <= carry;
      end else if (r_q2) begin
        chs_q <= s_in;
        chc_q <= 1'b0;
      end else begin
        chs_q <= chs_in;
        chc_q <= chc_in;
      end
    end
  end

  assign x_out   = x_q;
  assign x3_out  = x3_q;
  assign r_out   = r_q;
  assign r2_out  = r_q2;
  assign s_out   = sum_q;
  assign chs_out = chs_q;
  assign chc_out = chc_q;

endmodule
