// End-to-end testbench of spmult_top at its default sizes (N = M = 32 for
// both multipliers). Both units run at the same time, each fed words back
// to back (one multiplication per word time) with occasional idle clocks,
// and every product bit and output time is checked against A*X worked out
// here. It also counts that each mechanism of the design was exercised:
// full-rate back-to-back words, idle gaps, MSP downloads, negative Booth
// digits, the Booth digit "-0", and the 0/X/2X/3X selections of the 3X
// unit; a mechanism that never occurred counts as a failure.
module tb_spmult_top;
  import spmult_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  booth_digit_t mba_digits [16];
  logic         mba_rst, mba_x, mba_r, mba_p_l, mba_p_h, mba_ph_first;
  logic [31:0]  x3_a;
  logic         x3_rst, x3_x, x3_r, x3_p_l, x3_p_h, x3_ph_first;

  spmult_top dut (.*);

  logic done0, done1;
  int c0, f0, c1, f1, b0, b1, g0, g1, nneg, n3;
  int checks, failures;
  int mba_dl, x3_dl, neg_zero, sel [4];

  mba_mult_run #(.N(32), .M(32), .NSEG(8), .NW(16), .SEED(21)) run_mba (
    .clk, .rst(mba_rst), .x(mba_x), .r(mba_r), .digits(mba_digits),
    .p_l(mba_p_l), .p_h(mba_p_h), .ph_first(mba_ph_first),
    .done(done0), .checks(c0), .failures(f0),
    .n_back_to_back(b0), .n_gap(g0), .n_neg_digit(nneg)
  );
  x3_mult_run #(.N(32), .M(32), .NSEG(8), .NW(16), .SEED(22)) run_x3 (
    .clk, .rst(x3_rst), .x(x3_x), .r(x3_r), .a(x3_a),
    .p_l(x3_p_l), .p_h(x3_p_h), .ph_first(x3_ph_first),
    .done(done1), .checks(c1), .failures(f1),
    .n_back_to_back(b1), .n_gap(g1), .n_sel3(n3)
  );

  // mechanism counters
  logic mba_rst_q = 1, x3_rst_q = 1;
  initial begin
    mba_dl = 0; x3_dl = 0; neg_zero = 0;
    foreach (sel[i]) sel[i] = 0;
  end
  always @(posedge clk) begin
    mba_rst_q <= mba_rst;
    x3_rst_q  <= x3_rst;
    if (!mba_rst && mba_ph_first) mba_dl++;
    if (!x3_rst && x3_ph_first) x3_dl++;
    if (mba_rst_q && !mba_rst)
      foreach (mba_digits[j]) if (mba_digits[j].neg && !mba_digits[j].nz) neg_zero++;
    if (x3_rst_q && !x3_rst)
      for (int j = 0; j < 16; j++) sel[x3_a[2*j +: 2]]++;
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #1;
    wait (done0 && done1);
    checks = c0 + c1;
    failures = f0 + f1;
    $display("mechanism counts:");
    need("mba back-to-back words", b0);
    need("mba idle gaps", g0);
    need("mba MSP downloads", mba_dl);
    need("mba negative digits", nneg);
    need("mba digit -0", neg_zero);
    need("x3 back-to-back words", b1);
    need("x3 idle gaps", g1);
    need("x3 MSP downloads", x3_dl);
    need("x3 pairs selecting 0", sel[0]);
    need("x3 pairs selecting X", sel[1]);
    need("x3 pairs selecting 2X", sel[2]);
    need("x3 pairs selecting 3X", sel[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
