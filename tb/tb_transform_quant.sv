// tb_transform_quant: the forward path (transform + quantisation) and the
// inverse path (de-quantisation + inverse transform + rounding) are checked
// against the equations evaluated here, over random blocks and qp values,
// with two cycles of latency. A round trip through both paths at small qp
// must return the residual within +-3.
module tb_transform_quant;
  logic clk = 0, rst_n = 0, in_valid = 0, sel = 1;
  logic [5:0] qp = 0;
  logic signed [15:0] din [16];
  logic signed [15:0] dout [16];
  logic out_valid;
  int checks = 0, failures = 0;

  transform_quant dut (.*);

  always #5 clk = ~clk;

  int C [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  int MF [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                    '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  int V [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                   '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  function automatic int cls(int k);
    int i, j;
    i = k / 4; j = k % 4;
    return (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
  endfunction

  function automatic void inv1(ref longint a [4]);
    longint e0, e1, e2, e3;
    e0 = a[0] + a[2]; e1 = a[0] - a[2];
    e2 = (a[1] >>> 1) - a[3]; e3 = a[1] + (a[3] >>> 1);
    a[0] = e0 + e3; a[1] = e1 + e2; a[2] = e1 - e2; a[3] = e0 - e3;
  endfunction

  task automatic forward_ref(input int xi [16], input int q, output int lv [16]);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        longint s, m, qb;
        s = 0;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++) s += C[i][a] * xi[4*a + b] * C[j][b];
        qb = 15 + q / 6;
        m = ((s < 0 ? -s : s) * MF[q % 6][cls(4*i + j)] + (longint'(1) << qb) / 6) >> qb;
        lv[4*i + j] = int'(s < 0 ? -m : m);
      end
  endtask

  task automatic inverse_ref(input int lv [16], input int q, output int xo [16]);
    longint v [4];
    longint m [16];
    for (int k = 0; k < 16; k++) m[k] = longint'(lv[k]) * V[q % 6][cls(k)] * (longint'(1) << (q / 6));
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) v[j] = m[4*i + j];
      inv1(v);
      for (int j = 0; j < 4; j++) m[4*i + j] = v[j];
    end
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < 4; i++) v[i] = m[4*i + j];
      inv1(v);
      for (int i = 0; i < 4; i++) xo[4*i + j] = int'((v[i] + 32) >>> 6);
    end
  endtask

  task automatic run(input logic s, input int q, input int d [16], output int o [16]);
    sel = s; qp = 6'(q);
    for (int k = 0; k < 16; k++) din[k] = 16'(d[k]);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid) failures++;        // not yet: two cycles of latency
    @(negedge clk);
    checks++;
    if (!out_valid) failures++;
    for (int k = 0; k < 16; k++) o[k] = int'(dout[k]);
  endtask

  initial begin
    for (int k = 0; k < 16; k++) din[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int xi [16];
      int lv [16];
      int lr [16];
      int xo [16];
      int xr [16];
      int q;
      q = (t < 100) ? int'($urandom % 7) : int'($urandom % 52);
      for (int k = 0; k < 16; k++) xi[k] = int'($urandom % 511) - 255;
      run(1'b1, q, xi, lv);
      forward_ref(xi, q, lr);
      checks++;
      if (lv != lr) begin failures++; $display("FAIL forward t=%0d qp=%0d", t, q); end
      run(1'b0, q, lv, xo);
      inverse_ref(lv, q, xr);
      checks++;
      if (xo != xr) begin failures++; $display("FAIL inverse t=%0d qp=%0d", t, q); end
      if (q <= 6)
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (xo[k] - xi[k] > 3 || xi[k] - xo[k] > 3) begin
            failures++;
            $display("FAIL round trip t=%0d qp=%0d k=%0d: %0d vs %0d", t, q, k, xo[k], xi[k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
