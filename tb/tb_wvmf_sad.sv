// tb_wvmf_sad: accumulates 64 random pixel pairs per block and compares the
// weighting factor with a sum of absolute differences computed here; also
// checks that clr restarts the sum and that en = 0 holds it.
module tb_wvmf_sad;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] p_prev, p_next;
  logic [13:0] w;
  int checks = 0, failures = 0;

  wvmf_sad #(.SW(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    p_prev = 0; p_next = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int ref_sum;
      clr = 1;
      @(negedge clk) clr = 0;
      ref_sum = 0;
      for (int p = 0; p < 64; p++) begin
        p_prev = 8'($urandom); p_next = 8'($urandom);
        en = ($urandom % 4) != 0;
        if (en) ref_sum += (p_prev > p_next) ? p_prev - p_next : p_next - p_prev;
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (int'(w) != ref_sum) begin failures++; $display("FAIL %0d want %0d", w, ref_sum); end
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
