// Testbench for x3_gen. Random 20-bit words X, each followed by two zero
// bits, are streamed back to back (the generator gets no word-boundary
// signal), and every output bit is compared with the matching bit of 3*X
// computed here, including the two bits produced during the zero bits.
module tb_x3_gen;
  localparam int M = 20;
  localparam int L = M + 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, x, x3;
  int checks = 0, failures = 0;

  x3_gen dut (.*);

  initial begin
    rst = 1; x = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int w = 0; w < 300; w++) begin
      logic [M-1:0] xv;
      logic [L-1:0] e;
      xv = M'($urandom);
      if (w == 0) xv = '1;
      e = L'(3 * longint'(xv));
      for (int i = 0; i < L; i++) begin
        x = (i < M) ? xv[i] : 1'b0;
        #1;
        checks++;
        if (x3 !== e[i]) begin
          failures++;
          if (failures < 10) $display("x3_gen: X=%h bit %0d got %b expected %b", xv, i, x3, e[i]);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
