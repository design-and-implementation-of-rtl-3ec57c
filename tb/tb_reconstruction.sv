// tb_reconstruction: loads random residues, streams 16 compensated pixels
// per block (with idle gaps) and checks every output against the clipped
// sum worked out here, its position and its one-cycle latency.
module tb_reconstruction;
  logic clk = 0, rst_n = 0, load = 0, mc_valid = 0;
  logic signed [15:0] residue [16];
  logic [7:0] mc_pixel, rec_pixel;
  logic out_valid;
  logic [3:0] out_index;
  int checks = 0, failures = 0, clips = 0;

  reconstruction dut (.*);

  always #5 clk = ~clk;

  initial begin
    mc_pixel = 0;
    for (int k = 0; k < 16; k++) residue[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 50; b++) begin
      logic signed [15:0] r [16];
      for (int k = 0; k < 16; k++) begin
        r[k] = 16'(int'($urandom % 601) - 300);
        residue[k] = r[k];
      end
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      for (int k = 0; k < 16; k++) begin
        int e;
        mc_valid = 1;
        mc_pixel = 8'($urandom);
        e = int'(mc_pixel) + int'(r[k]);
        if (e < 0 || e > 255) clips++;
        e = (e < 0) ? 0 : (e > 255) ? 255 : e;
        @(negedge clk);
        mc_valid = 0;
        checks++;
        if (!out_valid || int'(rec_pixel) != e || out_index != 4'(k)) begin
          failures++;
          $display("FAIL block %0d pixel %0d: %0d want %0d", b, k, rec_pixel, e);
        end
        if ($urandom % 3 == 0) @(negedge clk);
      end
    end
    checks++;
    if (clips == 0) failures++;
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
