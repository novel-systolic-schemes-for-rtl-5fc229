// Two systolic serial-parallel multipliers, side by side.
//
// mba_* : the multiplier whose parallel factor is given in Modified Booth
//         form (signed N-bit A as N/2 radix-4 digits); words of M+1 bits.
// x3_*  : the multiplier whose parallel factor is plain unsigned binary,
//         using bit pairs to select 0, X, 2X or 3X; words of M+2 bits.
// Both take the serial factor X LSB first at one bit per clock with no
// gaps between words, and deliver each product as a serial LSP on p_l
// followed, overlapped with the next word, by a serial MSP on p_h (see
// mba_mult and x3_mult for the exact clock of every bit). The two units
// share the clock only; each has its own synchronous reset so that one can
// be given a new parallel factor while the other keeps running.
//
// The two units are the two schemes the document proposes; placing them in
// one top with separate resets and 32-bit defaults is this design's choice.
module spmult_top
  import spmult_pkg::*;
#(
  parameter int MBA_N = 32,
  parameter int MBA_M = 32,
  parameter int X3_N  = 32,
  parameter int X3_M  = 32
) (
  input  logic             clk,
  // Modified Booth multiplier
  input  logic             mba_rst,
  input  booth_digit_t     mba_digits [MBA_N/2],
  input  logic             mba_x,
  input  logic             mba_r,
  output logic             mba_p_l,
  output logic             mba_p_h,
  output logic             mba_ph_first,
  // 3X multiplier
  input  logic             x3_rst,
  input  logic [X3_N-1:0]  x3_a,
  input  logic             x3_x,
  input  logic             x3_r,
  output logic             x3_p_l,
  output logic             x3_p_h,
  output logic             x3_ph_first
);

  mba_mult #(.N(MBA_N), .M(MBA_M)) u_mba (
    .clk     (clk),
    .rst     (mba_rst),
    .digits  (mba_digits),
    .x       (mba_x),
    .r       (mba_r),
    .p_l     (mba_p_l),
    .p_h     (mba_p_h),
    .ph_first(mba_ph_first)
  );

  x3_mult #(.N(X3_N), .M(X3_M)) u_x3 (
    .clk     (clk),
    .rst     (x3_rst),
    .a       (x3_a),
    .x       (x3_x),
    .r       (x3_r),
    .p_l     (x3_p_l),
    .p_h     (x3_p_h),
    .ph_first(x3_ph_first)
  );

endmodule
