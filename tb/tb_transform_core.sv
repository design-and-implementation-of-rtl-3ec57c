// tb_transform_core: forward transform against the matrix product C X C^T,
// inverse transform against a row-then-column evaluation of the inverse
// equations (with the integer halving of the odd terms), one block per
// cycle in a continuous stream.
module tb_transform_core;
  localparam int IW = 16, OW = 20;
  logic clk = 0, rst_n = 0, in_valid = 0, sel = 1;
  logic signed [IW-1:0] x [16];
  logic signed [OW-1:0] y [16];
  logic out_valid;
  int checks = 0, failures = 0;
  int expq [$];

  transform_core #(.IW(IW), .OW(OW)) dut (.*);

  always #5 clk = ~clk;

  int C [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};

  function automatic void inv1(ref int a [4]);
    int e0, e1, e2, e3;
    e0 = a[0] + a[2]; e1 = a[0] - a[2];
    e2 = (a[1] >>> 1) - a[3]; e3 = a[1] + (a[3] >>> 1);
    a[0] = e0 + e3; a[1] = e1 + e2; a[2] = e1 - e2; a[3] = e0 - e3;
  endfunction

  initial begin
    for (int k = 0; k < 16; k++) x[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int xi [16];
      int yo [16];
      sel = (t % 2 == 0);
      for (int k = 0; k < 16; k++) begin
        xi[k] = sel ? int'($urandom % 511) - 255 : int'($urandom % 4001) - 2000;
        x[k] = IW'(xi[k]);
      end
      if (sel) begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            int s;
            s = 0;
            for (int a = 0; a < 4; a++)
              for (int b = 0; b < 4; b++) s += C[i][a] * xi[4*a + b] * C[j][b];
            yo[4*i + j] = s;
          end
      end else begin
        int v [4];
        int m [16];
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++) v[j] = xi[4*i + j];
          inv1(v);
          for (int j = 0; j < 4; j++) m[4*i + j] = v[j];
        end
        for (int j = 0; j < 4; j++) begin
          for (int i = 0; i < 4; i++) v[i] = m[4*i + j];
          inv1(v);
          for (int i = 0; i < 4; i++) yo[4*i + j] = v[i];
        end
      end
      in_valid = 1;
      @(negedge clk);
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 16; k++)
        if (int'(y[k]) != yo[k]) begin
          failures++;
          $display("FAIL t=%0d k=%0d got %0d want %0d", t, k, y[k], yo[k]);
          break;
        end
    end
    in_valid = 0;
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
