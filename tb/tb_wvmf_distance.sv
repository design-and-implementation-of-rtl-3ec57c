// tb_wvmf_distance: random windows and candidates; dx/dy must equal the
// summed absolute component differences worked out here.
module tb_wvmf_distance;
  import dvc_pkg::*;
  mv_t win [9];
  logic [3:0] cand;
  logic [MVW+4:0] dx, dy;
  int checks = 0, failures = 0;

  wvmf_distance dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ex, ey;
      for (int j = 0; j < 9; j++) begin
        win[j].x = MVW'($urandom);
        win[j].y = MVW'($urandom);
      end
      cand = 4'($urandom % 9);
      #1;
      ex = 0; ey = 0;
      for (int j = 0; j < 9; j++) begin
        int a, b;
        a = int'(win[cand].x) - int'(win[j].x);
        b = int'(win[cand].y) - int'(win[j].y);
        ex += (a < 0) ? -a : a;
        ey += (b < 0) ? -b : b;
      end
      checks++;
      if (int'(dx) != ex || int'(dy) != ey) begin
        failures++;
        if (failures < 5) $display("FAIL %0d %0d want %0d %0d", dx, dy, ex, ey);
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
