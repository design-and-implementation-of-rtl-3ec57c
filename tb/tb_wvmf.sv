// tb_wvmf: runs the weighted vector median filter over a small frame
// (32x24 pixels, 4x3 blocks of 8x8) with random key frames and vectors
// and compares every output vector with a direct evaluation of the
// criterion SAD(x_c) * sum_j(|dX| + |dY|) over the clamped 3x3 window.
// Also checks the number of cycles the whole pass takes.
module tb_wvmf;
  import dvc_pkg::*;
  localparam int FW = 32, FH = 24, BS = 8;
  localparam int BX = FW / BS, BY = FH / BS, NB = BX * BY;
  localparam int AW = $clog2(FW * FH), BW = $clog2(NB);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, out_we;
  logic [BW-1:0] mv_rd_addr, out_addr;
  mv_t mv_rd_data, out_mv;
  logic [AW-1:0] prev_addr, next_addr;
  pixel_t prev_data, next_data;
  int checks = 0, failures = 0;

  pixel_t prev_f [FW*FH];
  pixel_t next_f [FW*FH];
  mv_t    mvs [NB];
  mv_t    res [NB];
  logic   written [NB];

  wvmf #(.FW(FW), .FH(FH), .BS(BS)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    mv_rd_data <= mvs[mv_rd_addr];
    prev_data  <= prev_f[prev_addr];
    next_data  <= next_f[next_addr];
    if (out_we) begin res[out_addr] <= out_mv; written[out_addr] <= 1'b1; end
  end

  function automatic int cl(int c, int lim);
    return (c < 0) ? 0 : (c > lim - 1) ? lim - 1 : c;
  endfunction
  function automatic int iabs(int a); return (a < 0) ? -a : a; endfunction

  initial begin
    int cyc, exp_cyc, changed;
    for (int i = 0; i < FW*FH; i++) begin
      // smooth-ish content so different vectors give different SADs
      prev_f[i] = pixel_t'(((i % FW) * 7 + (i / FW) * 3 + $urandom % 8) & 255);
      next_f[i] = pixel_t'(((i % FW) * 7 + (i / FW) * 3 + 20 + $urandom % 8) & 255);
    end
    for (int b = 0; b < NB; b++) begin
      mvs[b].x = MVW'(int'($urandom % 9) - 4);
      mvs[b].y = MVW'(int'($urandom % 9) - 4);
      written[b] = 0;
      res[b] = '0;
    end
    mvs[5].x = 6'sd15;                // an outlier for the filter to remove
    mvs[5].y = -6'sd14;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_cyc = 1;                      // done is registered
    for (int b = 0; b < NB; b++) exp_cyc += ((b % BX == 0) ? 9 : 3) + 597;
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL cycles %0d want %0d", cyc, exp_cyc); end

    changed = 0;
    for (int by = 0; by < BY; by++)
      for (int bx = 0; bx < BX; bx++) begin
        mv_t win [9];
        longint best;
        mv_t bmv;
        for (int k = 0; k < 9; k++)
          win[k] = mvs[cl(by - 1 + k / 3, BY) * BX + cl(bx - 1 + k % 3, BX)];
        best = -1;
        for (int c = 0; c < 9; c++) begin
          longint sad, dsum, cost;
          sad = 0;
          for (int p = 0; p < BS * BS; p++) begin
            int px, py;
            px = bx * BS + p % BS;
            py = by * BS + p / BS;
            sad += iabs(int'(prev_f[cl(py + win[c].y, FH) * FW + cl(px + win[c].x, FW)]) -
                        int'(next_f[cl(py - win[c].y, FH) * FW + cl(px - win[c].x, FW)]));
          end
          dsum = 0;
          for (int j = 0; j < 9; j++)
            dsum += iabs(int'(win[c].x) - int'(win[j].x)) + iabs(int'(win[c].y) - int'(win[j].y));
          cost = sad * dsum;
          if (best < 0 || cost < best) begin best = cost; bmv = win[c]; end
        end
        checks++;
        if (!written[by*BX+bx] || res[by*BX+bx] != bmv) begin
          failures++;
          $display("FAIL block %0d,%0d got %0d,%0d want %0d,%0d", bx, by,
                   res[by*BX+bx].x, res[by*BX+bx].y, bmv.x, bmv.y);
        end
        if (bmv != mvs[by*BX+bx]) changed++;
      end
    checks++;
    if (res[5] == mvs[5]) begin failures++; $display("FAIL outlier kept"); end
    $display("cycles=%0d vectors changed=%0d", cyc, changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
