// tb_wvmf_selector: feeds nine candidates per block and checks that the
// kept vector is the first one with the smallest W*Dx + W*Dy.
module tb_wvmf_selector;
  import dvc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [13:0] w;
  logic [MVW+4:0] dx, dy;
  mv_t cand_mv, best_mv;
  logic [14+MVW+5:0] best_wd;
  int checks = 0, failures = 0;

  wvmf_selector dut (.*);

  always #5 clk = ~clk;

  initial begin
    w = 0; dx = 0; dy = 0; cand_mv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      longint best;
      mv_t bmv;
      best = -1;
      for (int c = 0; c < 9; c++) begin
        longint cost;
        en = 1; first = (c == 0);
        w = 14'($urandom % 64);
        dx = (MVW+5)'($urandom % 16);
        dy = (MVW+5)'($urandom % 16);
        cand_mv.x = MVW'($urandom); cand_mv.y = MVW'($urandom);
        cost = longint'(w) * dx + longint'(w) * dy;
        if (best < 0 || cost < best) begin best = cost; bmv = cand_mv; end
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (best_mv != bmv || longint'(best_wd) != best) begin
        failures++;
        $display("FAIL wd %0d want %0d", best_wd, best);
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
