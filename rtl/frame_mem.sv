// frame_mem: frame buffer with one write port and two read ports.
//
// Holds one frame (or any array of DW-bit words) of DEPTH words. Both read
// ports are synchronous: the word at rd_addr_* appears on rd_data_* one
// clock later. A write and a read of the same address in one cycle returns
// the old word. The decoder keeps its key frames, compensated frames, side
// information, motion-vector fields and transform-domain data in such
// buffers; their organisation is this design's own. No reset: contents are
// undefined until written.
module frame_mem #(
  parameter int DW    = 8,
  parameter int DEPTH = 176 * 144,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic [AW-1:0] rd_addr_a,
  output logic [DW-1:0] rd_data_a,
  input  logic [AW-1:0] rd_addr_b,
  output logic [DW-1:0] rd_data_b
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data_a <= mem[rd_addr_a];
    rd_data_b <= mem[rd_addr_b];
  end
endmodule
