// tb_ldpca_deaccumulator: the merged syndrome of a segment must equal the
// XOR of the plain syndrome bits in that segment, for segments that start
// at the first bit and segments that do not.
module tb_ldpca_deaccumulator;
  localparam int GROUP = 66;
  logic [GROUP-1:0] acc_syn;
  logic syn_a, syn_b, syn_c;
  int checks = 0, failures = 0;

  ldpca_deaccumulator #(.GROUP(GROUP), .FIRST(0),  .LAST(7))  u_a (.acc_syn(acc_syn), .syn(syn_a));
  ldpca_deaccumulator #(.GROUP(GROUP), .FIRST(8),  .LAST(15)) u_b (.acc_syn(acc_syn), .syn(syn_b));
  ldpca_deaccumulator #(.GROUP(GROUP), .FIRST(64), .LAST(65)) u_c (.acc_syn(acc_syn), .syn(syn_c));

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [GROUP-1:0] s;
      logic a;
      for (int i = 0; i < GROUP; i++) s[i] = $urandom % 2;
      a = 0;
      for (int i = 0; i < GROUP; i++) begin a ^= s[i]; acc_syn[i] = a; end
      #1;
      checks += 3;
      if (syn_a != ^s[7:0])   failures++;
      if (syn_b != ^s[15:8])  failures++;
      if (syn_c != ^s[65:64]) failures++;
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
