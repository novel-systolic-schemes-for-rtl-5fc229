// Stimulus and checker for one x3_mult (connected outside), used by the
// testbenches.
//
// For NSEG segments it resets the multiplier, picks an unsigned parallel
// factor A (fixed corner values first, then random) and streams NW serial
// words X, each followed by two zero bits with R on the second, back to
// back with, now and then, a few idle clocks between them. Every output bit
// is recorded by clock number; at the end of the segment each word's
// product is rebuilt from the p_l bits at start+1+i and the p_h bits at
// start+L+2+k and compared with A*X computed here, and ph_first is checked
// to rise exactly at start+L+2 and nowhere else. `done` rises when all
// segments are checked.
module x3_mult_run
#(
  parameter int N    = 32,
  parameter int M    = 32,
  parameter int NSEG = 6,
  parameter int NW   = 12,
  parameter int SEED = 1
) (
  input  logic clk,
  output logic rst,
  output logic x,
  output logic r,
  output logic [N-1:0] a,
  input  logic p_l,
  input  logic p_h,
  input  logic ph_first,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_back_to_back,   // word boundaries with no idle clock
  output int   n_gap,            // word boundaries with idle clocks
  output int   n_sel3            // bit pairs selecting 3X
);

  // Internal copies, initialised where declared, drive the ports through
  // continuous assignments so the connected nets are defined from time 0.
  bit rst_v = 1'b1, x_v = 1'b0, r_v = 1'b0, done_v = 1'b0;
  logic [N-1:0] a_v = '0;
  int checks_v = 0, failures_v = 0, n_back_to_back_v = 0, n_gap_v = 0, n_sel3_v = 0;
  assign rst = rst_v;
  assign x = x_v;
  assign r = r_v;
  assign a = a_v;
  assign done = done_v;
  assign checks = checks_v;
  assign failures = failures_v;
  assign n_back_to_back = n_back_to_back_v;
  assign n_gap = n_gap_v;
  assign n_sel3 = n_sel3_v;

  localparam int K = N / 2;
  localparam int L = M + 2;
  localparam int MAXC = 4096;
  localparam int W = L + N + 8;  // width of the reference products


  bit pl_h  [MAXC];
  bit ph_h  [MAXC];
  bit phf_h [MAXC];
  int starts[NW];
  logic [M-1:0] xs [NW];

  function automatic logic [N-1:0] pick_a(int seg);
    logic [N-1:0] v;
    case (seg)
      0: v = '1;                          // all pairs select 3X
      1: v = {(N/2){2'b10}};              // all pairs select 2X
      2: v = {(N/2){2'b01}};              // all pairs select X
      3: v = {1'b1, {(N-1){1'b0}}};      // single top bit
      default: begin
        for (int i = 0; i < N; i++) v[i] = 1'($urandom);
      end
    endcase
    return v;
  endfunction

  initial begin
    void'($urandom(SEED));
    done_v = 0; checks_v = 0; failures_v = 0;
    n_back_to_back_v = 0; n_gap_v = 0; n_sel3_v = 0;
    rst_v = 1; x_v = 0; r_v = 0; a_v = '0;
    for (int seg = 0; seg < NSEG; seg++) begin
      int cyc, nxt;
      a_v = pick_a(seg);
      for (int j = 0; j < K; j++) if (a_v[2*j +: 2] == 2'b11) n_sel3_v++;
      rst_v = 1; x_v = 0; r_v = 0;
      repeat (2) @(negedge clk);
      rst_v = 0;
      for (int i = 0; i < MAXC; i++) begin pl_h[i] = 0; ph_h[i] = 0; phf_h[i] = 0; end
      cyc = 0;
      for (int w = 0; w < NW; w++) begin
        int gap;
        gap = (w > 0 && $urandom_range(3) == 0) ? $urandom_range(3) + 1 : 0;
        if (w > 0) begin
          if (gap == 0) n_back_to_back_v++; else n_gap_v++;
        end
        for (int i = 0; i < M; i++) xs[w][i] = 1'($urandom);
        if (w == 1) xs[w] = '1;
        for (int g = 0; g < gap; g++) begin
          x_v = 0; r_v = 0;
          @(posedge clk); cyc++; @(negedge clk);
          pl_h[cyc] = p_l; ph_h[cyc] = p_h; phf_h[cyc] = ph_first;
        end
        starts[w] = cyc;
        for (int i = 0; i < L; i++) begin
          x_v = (i < M) ? xs[w][i] : 1'b0;
          r_v = (i == L - 1);
          @(posedge clk); cyc++; @(negedge clk);
          pl_h[cyc] = p_l; ph_h[cyc] = p_h; phf_h[cyc] = ph_first;
        end
      end
      x_v = 0; r_v = 0;
      nxt = cyc + L + N + 4;
      while (cyc < nxt) begin
        @(posedge clk); cyc++; @(negedge clk);
        pl_h[cyc] = p_l; ph_h[cyc] = p_h; phf_h[cyc] = ph_first;
      end
      // check every word
      for (int w = 0; w < NW; w++) begin
        logic signed [W-1:0] exp_p, got_p, mask;
        exp_p = $signed({{(W-N){1'b0}}, a_v}) * $signed({{(W-M){1'b0}}, xs[w]});
        mask  = (W'(1) <<< (L + N)) - 1;
        got_p = '0;
        for (int i = 0; i < L; i++) got_p[i] = pl_h[starts[w] + 1 + i];
        for (int k = 0; k < N; k++) got_p[L + k] = ph_h[starts[w] + L + 2 + k];
        checks_v++;
        if ((got_p & mask) != (exp_p & mask)) begin
          failures_v++;
          $display("x3_mult N=%0d M=%0d: A=%h X=%h got %h expected %h", N, M, a_v, xs[w],
                   got_p & mask, exp_p & mask);
        end
        checks_v++;
        if (!phf_h[starts[w] + L + 2]) begin
          failures_v++;
          $display("x3_mult: ph_first missing for word %0d", w);
        end
      end
      // ph_first exactly once per word
      begin
        int n;
        n = 0;
        for (int i = 0; i <= cyc; i++) n += int'(phf_h[i]);
        checks_v++;
        if (n != NW) begin
          failures_v++;
          $display("x3_mult: %0d ph_first pulses for %0d words", n, NW);
        end
      end
    end
    done_v = 1;
  end

endmodule
