// tb_frame_mem: random writes and two-port reads of a small frame buffer
// against a shadow array; read data must arrive one cycle after the address,
// and a same-cycle read of a written address returns the old word.
module tb_frame_mem;
  localparam int DW = 8, DEPTH = 64, AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] wr_addr, rd_addr_a, rd_addr_b;
  logic [DW-1:0] wr_data, rd_data_a, rd_data_b;
  logic [DW-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  frame_mem #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    wr_addr = 0; wr_data = 0; rd_addr_a = 0; rd_addr_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(i); wr_data = DW'($urandom); shadow[i] = wr_data;
    end
    for (int t = 0; t < 500; t++) begin
      logic [DW-1:0] ea, eb;
      @(negedge clk);
      we = $urandom % 2;
      wr_addr = AW'($urandom); wr_data = DW'($urandom);
      rd_addr_a = AW'($urandom); rd_addr_b = (t % 7 == 0) ? wr_addr : AW'($urandom);
      ea = shadow[rd_addr_a]; eb = shadow[rd_addr_b];
      @(posedge clk);
      if (we) shadow[wr_addr] = wr_data;
      #1;
      checks += 2;
      if (rd_data_a != ea) failures++;
      if (rd_data_b != eb) failures++;
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
