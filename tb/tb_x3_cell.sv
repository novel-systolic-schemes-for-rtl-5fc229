// Testbench for a single x3_cell, exercised as it sits in the array.
//
// Words of L = M+2 bits (M random bits of X, then two zero bits, R on the
// second; 3X supplied on x3_in alongside) are fed
// back to back, together with random bits on the partial-sum input s_in and
// on the three chain inputs. The checks are arithmetic: for every word, the
// sum bits the cell emits (s_out, one clock late) plus 2^L times the final
// carry must equal a2*X plus the s_in bits the cell was meant to add;
// s_in bits in the two clocks after R must instead appear on chs_out, the
// finished carry, then 0, on chc_out, and in every other clock
// the chain must shift its inputs through with one clock of delay. x_out,
// r_out and r2_out are checked as one- and two-clock delays.
module tb_x3_cell;

  localparam int M = 12;
  localparam int L = M + 2;
  localparam int NW = 40;
  localparam int T = NW * L + 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, x_in, x3_in, r_in, s_in, chs_in, chc_in;
  logic [1:0] a2;
  logic x_out, x3_out, r_out, r2_out, s_out, chs_out, chc_out;
  int checks = 0, failures = 0;

  x3_cell dut (.*);

  bit xh [T], x3h [T], rh [T], sh [T], csh [T], cch [T];
  bit so [T], xo [T], x3o [T], ro [T], r2o [T], cso [T], cco [T];

  task automatic chk(bit ok, string what, int t);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("x3_cell: %s wrong at clock %0d", what, t);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 12; rep++) begin
      int v;
      logic [M-1:0] xs [NW];
      v = rep % 4;
      a2 = 2'(v);
      for (int w = 0; w < NW; w++) xs[w] = M'($urandom);
      for (int t = 0; t < T; t++) begin
        int w, i;
        w = t / L; i = t % L;
        xh[t]  = (w < NW && i < M) ? xs[w][i] : 1'b0;
        x3h[t] = (w < NW) ? 1'((3 * longint'(xs[w])) >> i) : 1'b0;
        rh[t]  = (w < NW && i == L - 1);
        sh[t]  = 1'($urandom);
        csh[t] = 1'($urandom);
        cch[t] = 1'($urandom);
      end
      rst = 1;
      x_in = 0; x3_in = 0; r_in = 0; s_in = 0; chs_in = 0; chc_in = 0;
      repeat (2) @(negedge clk);
      rst = 0;
      for (int t = 0; t < T; t++) begin
        x_in = xh[t]; x3_in = x3h[t]; r_in = rh[t]; s_in = sh[t];
        chs_in = csh[t]; chc_in = cch[t];
        @(posedge clk);
        @(negedge clk);
        so[t] = s_out; xo[t] = x_out; x3o[t] = x3_out; ro[t] = r_out; r2o[t] = r2_out;
        cso[t] = chs_out; cco[t] = chc_out;
      end
      // delays
      for (int t = 0; t < T; t++) begin
        chk(xo[t] == xh[t], "x_out", t);
        chk(x3o[t] == x3h[t], "x3_out", t);
        chk(ro[t] == rh[t], "r_out", t);
        if (t > 0) chk(r2o[t] == rh[t-1], "r2_out", t);
      end
      // arithmetic per word; so[t] is the sum bit of clock t
      for (int w = 0; w < NW; w++) begin
        longint lhs, rhs;
        int t0, cend;
        t0 = w * L;
        lhs = 0; rhs = longint'(v) * longint'(xs[w]);
        for (int i = 0; i < L; i++) begin
          lhs += longint'(so[t0 + i]) << i;
          if (!(w > 0 && i < 2)) rhs += longint'(sh[t0 + i]) << i;
        end
        // final carry is downloaded in the clock after R, seen one clock later
        cend = int'(cco[t0 + L]);
        lhs += longint'(cend) << L;
        chk(lhs == rhs, "word sum", t0);
        // download of the next word's first two s_in bits and the side streams
        chk(cso[t0 + L] == sh[t0 + L], "chs first", t0 + L);
        chk(cso[t0 + L + 1] == sh[t0 + L + 1], "chs second", t0 + L + 1);
        chk(cco[t0 + L + 1] == 1'b0, "chc second", t0 + L + 1);
      end
      // chain shifts elsewhere
      for (int t = 0; t < T; t++) begin
        bit ld;
        ld = (t % L == 0 || t % L == 1) && t >= L && t < NW * L + 2;
        if (!ld) begin
          chk(cso[t] == csh[t], "chs shift", t);
          chk(cco[t] == cch[t], "chc shift", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
