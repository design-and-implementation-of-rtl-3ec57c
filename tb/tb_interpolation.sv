// tb_interpolation: a 16x8 frame pass; every written pixel must be the
// rounded mean of the two input pixels at its address, every address must
// be written once, and the pass must take NPIX + 2 cycles.
module tb_interpolation;
  localparam int NPIX = 128;
  localparam int AW = $clog2(NPIX);
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [7:0] p_forward, p_backward, p_interp;
  logic [7:0] ff [NPIX];
  logic [7:0] fb [NPIX];
  logic [7:0] outf [NPIX];
  int nwr [NPIX];
  int checks = 0, failures = 0;

  interpolation #(.NPIX(NPIX)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    p_forward  <= ff[rd_addr];
    p_backward <= fb[rd_addr];
    if (wr_en && rst_n) begin outf[wr_addr] <= p_interp; nwr[wr_addr] <= nwr[wr_addr] + 1; end
  end

  initial begin
    int cyc;
    for (int i = 0; i < NPIX; i++) begin
      ff[i] = 8'($urandom); fb[i] = 8'($urandom); nwr[i] = 0;
    end
    ff[0] = 255; fb[0] = 255; ff[1] = 0; fb[1] = 1; ff[2] = 254; fb[2] = 255;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NPIX + 2) begin failures++; $display("FAIL cycles %0d", cyc); end
    for (int i = 0; i < NPIX; i++) begin
      checks++;
      if (nwr[i] != 1 || int'(outf[i]) != (int'(ff[i]) + int'(fb[i]) + 1) / 2) begin
        failures++;
        $display("FAIL %0d: %0d", i, outf[i]);
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
