// Testbench for mba_mult: checks every product bit, the output timing and
// full-rate operation (words back to back) at the default size (N = M = 32)
// and at the tightest legal size (N = 8, M = 7, word length equal to N, so
// each MSP leaves just as the next one is downloaded), and a long serial
// operand case (N = 64, M = 192).
module tb_mba_mult;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done0, done1;
  int c0, f0, c1, f1, b0, b1, g0, g1, n0, n1;
  int checks, failures;

  spmult_pkg::booth_digit_t dg0 [16];
  logic rst0, x0, r0, pl0, ph0, phf0;
  mba_mult #(.N(32), .M(32)) dut0 (
    .clk, .rst(rst0), .digits(dg0), .x(x0), .r(r0), .p_l(pl0), .p_h(ph0), .ph_first(phf0)
  );
  spmult_pkg::booth_digit_t dg1 [4];
  logic rst1, x1, r1, pl1, ph1, phf1;
  mba_mult #(.N(8), .M(7)) dut1 (
    .clk, .rst(rst1), .digits(dg1), .x(x1), .r(r1), .p_l(pl1), .p_h(ph1), .ph_first(phf1)
  );

  mba_mult_run #(.N(32), .M(32), .SEED(11)) run0 (
    .clk, .rst(rst0), .x(x0), .r(r0), .digits(dg0), .p_l(pl0), .p_h(ph0), .ph_first(phf0),
    .done(done0), .checks(c0), .failures(f0),
    .n_back_to_back(b0), .n_gap(g0), .n_neg_digit(n0)
  );
  mba_mult_run #(.N(8), .M(7), .NSEG(12), .SEED(5)) run1 (
    .clk, .rst(rst1), .x(x1), .r(r1), .digits(dg1), .p_l(pl1), .p_h(ph1), .ph_first(phf1),
    .done(done1), .checks(c1), .failures(f1),
    .n_back_to_back(b1), .n_gap(g1), .n_neg_digit(n1)
  );

  spmult_pkg::booth_digit_t dg2 [32];
  logic rst2, x2, r2, pl2, ph2, phf2, done2;
  int c2, f2, b2, g2, n2;
  mba_mult #(.N(64), .M(192)) dut2 (
    .clk, .rst(rst2), .digits(dg2), .x(x2), .r(r2), .p_l(pl2), .p_h(ph2), .ph_first(phf2)
  );
  mba_mult_run #(.N(64), .M(192), .NSEG(5), .NW(10), .SEED(9)) run2 (
    .clk, .rst(rst2), .x(x2), .r(r2), .digits(dg2), .p_l(pl2), .p_h(ph2), .ph_first(phf2),
    .done(done2), .checks(c2), .failures(f2),
    .n_back_to_back(b2), .n_gap(g2), .n_neg_digit(n2)
  );

  initial begin
    #1;
    wait (done0 && done1 && done2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    checks++;
    if (b0 == 0 || b1 == 0 || g0 == 0 || n0 == 0) failures++;
    $display("back-to-back %0d/%0d gaps %0d/%0d negative digits %0d/%0d", b0, b1, g0, g1, n0, n1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
