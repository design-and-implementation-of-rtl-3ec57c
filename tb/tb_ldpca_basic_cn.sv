// tb_ldpca_basic_cn: exhaustive check of the 3-input minimum-value
// generator against a sort of the three inputs.
module tb_ldpca_basic_cn;
  localparam int W = 4;
  logic [W-1:0] x0, x1, x2, min_1st, min_2nd;
  int checks = 0, failures = 0;

  ldpca_basic_cn #(.W(W)) dut (.*);

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 16; c++) begin
          int s [3];
          int t;
          x0 = W'(a); x1 = W'(b); x2 = W'(c);
          s[0] = a; s[1] = b; s[2] = c;
          for (int i = 0; i < 2; i++)
            for (int j = 0; j < 2 - i; j++)
              if (s[j] > s[j+1]) begin t = s[j]; s[j] = s[j+1]; s[j+1] = t; end
          #1;
          checks++;
          if (min_1st != W'(s[0]) || min_2nd != W'(s[1])) begin
            failures++;
            if (failures < 5) $display("FAIL %0d %0d %0d -> %0d %0d", a, b, c, min_1st, min_2nd);
          end
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
