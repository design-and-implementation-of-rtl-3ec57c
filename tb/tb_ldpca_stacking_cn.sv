// tb_ldpca_stacking_cn: exhaustive check of the 4-input minimum-value
// generator: two sorted pairs in, the two smallest of all four out.
module tb_ldpca_stacking_cn;
  localparam int W = 3;
  logic [W-1:0] m1a, m2a, m1b, m2b, min_1st, min_2nd;
  int checks = 0, failures = 0;

  ldpca_stacking_cn #(.W(W)) dut (.*);

  initial begin
    for (int a1 = 0; a1 < 8; a1++)
      for (int a2 = a1; a2 < 8; a2++)
        for (int b1 = 0; b1 < 8; b1++)
          for (int b2 = b1; b2 < 8; b2++) begin
            int s [4];
            int t;
            m1a = W'(a1); m2a = W'(a2); m1b = W'(b1); m2b = W'(b2);
            s[0] = a1; s[1] = a2; s[2] = b1; s[3] = b2;
            for (int i = 0; i < 3; i++)
              for (int j = 0; j < 3 - i; j++)
                if (s[j] > s[j+1]) begin t = s[j]; s[j] = s[j+1]; s[j+1] = t; end
            #1;
            checks++;
            if (min_1st != W'(s[0]) || min_2nd != W'(s[1])) failures++;
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
