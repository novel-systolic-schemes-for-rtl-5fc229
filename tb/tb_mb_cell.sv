// Testbench for mb_cell. For every Booth digit (-2, -1, -0, 0, +1, +2) and
// many random 16-bit X it streams X (plus one zero bit) through the
// generator, bit i of X on `x` and bit i-1 on `x2`, and checks
// arithmetically that sum_i pp_i 2^i + neg equals w*X modulo 2^17, i.e. the
// generator really produces the two's complement partial product once the
// +1 is added. Combinational block; a clock only paces the stimulus.
module tb_mb_cell;
  import spmult_pkg::*;

  localparam int M = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic x, x2, pp;
  booth_digit_t d;
  int checks = 0, failures = 0;

  mb_cell dut (.x, .x2, .d, .pp);

  initial begin
    automatic int vals [6] = '{-2, -1, 0, 0, 1, 2};
    for (int k = 0; k < 6; k++) begin
      int v;
      v = vals[k];
      d.neg = (v < 0) || (k == 2);   // k == 2 is the digit -0
      d.two = (v == 2) || (v == -2);
      d.nz  = (v != 0);
      for (int n = 0; n < 200; n++) begin
        logic [M-1:0] xv;
        logic [M:0]   acc;
        longint       expv;
        xv = M'($urandom);
        if (n == 0) xv = '1;
        if (n == 1) xv = '0;
        acc = '0;
        for (int i = 0; i <= M; i++) begin
          x  = (i < M) ? xv[i] : 1'b0;
          x2 = (i > 0) ? xv[i-1] : 1'b0;
          @(posedge clk);
          acc[i] = pp;
        end
        expv = longint'(v) * longint'(xv);
        checks++;
        if ((acc + (M+1)'(d.neg)) != (M+1)'(expv)) begin
          failures++;
          $display("mb_cell: w=%0d X=%h got %h expected %h", v, xv, acc + (M+1)'(d.neg), (M+1)'(expv));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
