// tb_soft_input: every (alpha, plane, side bit) combination is compared
// with the Laplacian flip probability and the log-likelihood ratio computed
// here in floating point; the result must appear one cycle after the input.
module tb_soft_input;
  logic clk = 0, rst_n = 0, in_valid = 0, si_bit = 0;
  logic [1:0] plane = 0;
  logic [2:0] alpha_idx = 0;
  logic out_valid;
  logic [8:0] p0, p1;
  logic signed [5:0] llr;
  int checks = 0, failures = 0;

  soft_input dut (.*);

  always #5 clk = ~clk;

  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 4; b++)
        for (int s = 0; s < 2; s++) begin
          real alpha, pflip;
          int pf, ep1, el;
          alpha = 2.0 ** (a - 5);
          pflip = 0.5 * $exp(-alpha * (2.0 ** (b - 1)));
          pf = rnd(256.0 * pflip);
          if (pf < 1) pf = 1;
          ep1 = s ? 256 - pf : pf;
          el = rnd(4.0 * $ln(real'((ep1 > 255) ? 255 : ep1) / real'(256 - ((ep1 > 255) ? 255 : ep1))));
          if (el > 31) el = 31;
          if (el < -31) el = -31;
          @(negedge clk);
          in_valid = 1; alpha_idx = 3'(a); plane = 2'(b); si_bit = s[0];
          @(negedge clk);
          in_valid = 0;
          checks++;
          if (!out_valid || int'(p1) != ep1 || int'(p0) != 256 - ep1 || int'(llr) != el) begin
            failures++;
            $display("FAIL a=%0d b=%0d s=%0d: p1=%0d llr=%0d want %0d %0d", a, b, s, p1, llr, ep1, el);
          end
          // side bit 1 must never give a negative LLR, 0 never a positive one
          checks++;
          if ((s == 1 && llr < 0) || (s == 0 && llr > 0)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
