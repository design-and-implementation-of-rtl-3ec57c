// interpolation: side information as the rounded mean of the forward and
// backward motion-compensated frames, p_i = (p_f + p_b + 1) >> 1.
//
// After start the block walks the frame in raster order: it reads the same
// address from the forward frame and the backward frame (synchronous read
// ports, one cycle latency), adds the two pixels and one, drops the last
// bit, and writes the result to the side-information frame. One pixel per
// cycle; done pulses one cycle after the last write, NPIX + 2 cycles after
// start. The adder/shifter follows the described datapath; the address
// sequencing is this design's own.
module interpolation #(
  parameter int NPIX = 176 * 144,
  localparam int AW  = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] rd_addr,      // to forward and backward frames
  input  logic [7:0]    p_forward,
  input  logic [7:0]    p_backward,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [7:0]    p_interp
);
  logic [AW-1:0] cnt;
  logic          rd_vld;
  logic [8:0]    sum;

  assign rd_addr  = cnt;
  assign sum      = {1'b0, p_forward} + {1'b0, p_backward} + 9'd1;
  assign p_interp = 8'(sum >> 1);
  assign wr_en    = rd_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      cnt     <= '0;
      rd_vld  <= 1'b0;
      wr_addr <= '0;
    end else begin
      done    <= 1'b0;
      rd_vld  <= busy;
      wr_addr <= cnt;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        if (cnt == AW'(NPIX - 1)) busy <= 1'b0;
        else cnt <= cnt + 1'b1;
      end
      if (rd_vld && !busy) done <= 1'b1;
    end
  end
endmodule
