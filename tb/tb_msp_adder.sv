// Testbench for msp_adder. Frames of NB clocks carry random bits on s, c
// and k with `start` on the first clock and a random `cinit`; frames follow
// each other back to back. Each frame's output bits (one clock late) must
// equal the low NB bits of S + C + K + cinit computed here, and `first`
// must mark the frame's first output bit.
module tb_msp_adder;
  localparam int NB = 24;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, start, cinit, s, c, k, sum, first;
  int checks = 0, failures = 0;

  msp_adder dut (.*);

  initial begin
    rst = 1; start = 0; cinit = 0; s = 0; c = 0; k = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 400; f++) begin
      logic [NB-1:0] sv, cv, kv, got, expv;
      logic ci;
      sv = NB'($urandom); cv = NB'($urandom); kv = NB'($urandom);
      if (f % 4 == 0) kv = '0;
      if (f == 1) begin sv = '1; cv = '1; kv = '1; end
      ci = 1'($urandom);
      expv = sv + cv + kv + NB'(ci);
      for (int i = 0; i < NB; i++) begin
        start = (i == 0); cinit = ci;
        s = sv[i]; c = cv[i]; k = kv[i];
        @(negedge clk);
        got[i] = sum;
        checks++;
        if (first !== (i == 0)) begin
          failures++;
          $display("msp_adder: first wrong in frame %0d bit %0d", f, i);
        end
      end
      checks++;
      if (got !== expv) begin
        failures++;
        if (failures < 10) $display("msp_adder: frame %0d got %h expected %h", f, got, expv);
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
