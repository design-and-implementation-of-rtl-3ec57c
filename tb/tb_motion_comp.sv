// tb_motion_comp: forward and backward compensation of a 32x24 frame with
// random vectors, some pointing far outside the frame. Every output pixel is
// compared with the reference pixel at the clamped, signed displacement;
// the pass must take NB*(BS*BS+2)+2 cycles.
module tb_motion_comp;
  import dvc_pkg::*;
  localparam int FW = 32, FH = 24, BS = 8;
  localparam int BX = FW / BS, NB = (FW / BS) * (FH / BS);
  localparam int AW = $clog2(FW * FH), BW = $clog2(NB);

  logic clk = 0, rst_n = 0, start = 0, neg = 0;
  logic busy, done, wr_en;
  logic [BW-1:0] mv_addr;
  mv_t mv_data;
  logic [AW-1:0] ref_addr, wr_addr;
  pixel_t ref_data, wr_data;
  pixel_t refp [FW*FH];
  pixel_t outp [FW*FH];
  mv_t mvs [NB];
  int checks = 0, failures = 0, clamped = 0;

  motion_comp #(.FW(FW), .FH(FH), .BS(BS)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    mv_data  <= mvs[mv_addr];
    ref_data <= refp[ref_addr];
    if (wr_en) outp[wr_addr] <= wr_data;
  end

  function automatic int cl(int c, int lim);
    return (c < 0) ? 0 : (c > lim - 1) ? lim - 1 : c;
  endfunction

  initial begin
    for (int i = 0; i < FW*FH; i++) refp[i] = pixel_t'($urandom);
    for (int b = 0; b < NB; b++) begin
      mvs[b].x = MVW'(int'($urandom % 25) - 12);
      mvs[b].y = MVW'(int'($urandom % 25) - 12);
    end
    mvs[0].x = -6'sd31;  mvs[0].y = -6'sd20;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int dir = 0; dir < 2; dir++) begin
      int cyc;
      for (int i = 0; i < FW*FH; i++) outp[i] = '0;
      neg = dir[0];
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NB * (BS*BS + 2) + 2) begin failures++; $display("FAIL cycles %0d", cyc); end
      for (int y = 0; y < FH; y++)
        for (int x = 0; x < FW; x++) begin
          mv_t m;
          int sx, sy, rx, ry;
          m = mvs[(y / BS) * BX + x / BS];
          sx = dir ? -int'(m.x) : int'(m.x);
          sy = dir ? -int'(m.y) : int'(m.y);
          rx = cl(x + sx, FW); ry = cl(y + sy, FH);
          if (rx != x + sx || ry != y + sy) clamped++;
          checks++;
          if (outp[y*FW + x] != refp[ry*FW + rx]) begin
            failures++;
            if (failures < 5) $display("FAIL dir %0d (%0d,%0d)", dir, x, y);
          end
        end
    end
    checks++;
    if (clamped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
