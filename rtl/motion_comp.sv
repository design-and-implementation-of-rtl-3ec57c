// motion_comp: block motion compensation of a whole frame, used for the
// forward and backward compensation of side-information creation and for
// compensating the previous key frame with the encoder's vectors.
//
// For every MV_BLK x MV_BLK block, in raster order of blocks, the block's
// vector is read from the vector buffer and kept in a register (negated when
// neg = 1: backward compensation uses the same vectors with the opposite
// sign). Then for each pixel of the block, in raster order, the control
// forms the reference address (x + mv.x, y + mv.y); a vector that points
// outside the frame takes the nearest pixel inside it. The reference pixel
// returns one cycle later and is written with wr_en (the "compensated pixel
// ready" enable) to the same position of the output frame.
//
// Vectors are two's complement; -2^(MVW-1) must not be used with neg = 1.
// Interface: synchronous-read ports to the vector buffer (mv_addr/mv_data)
// and the reference frame (ref_addr/ref_data), both with one cycle latency.
// Timing: MV_BLK*MV_BLK + 2 cycles per block; done pulses the cycle after the last
// write. Clamping, vector negation and the register/control structure
// follow the described design; the scan order and cycle budget are this
// design's own.
module motion_comp
  import dvc_pkg::*;
#(
  parameter int FW  = FRAME_W,
  parameter int FH  = FRAME_H,
  parameter int BS  = MV_BLK,
  localparam int NB = (FW / BS) * (FH / BS),
  localparam int AW = $clog2(FW * FH),
  localparam int BW = $clog2(NB)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          neg,          // 1: backward (vector x -1)
  output logic          busy,
  output logic          done,
  output logic [BW-1:0] mv_addr,
  input  mv_t           mv_data,
  output logic [AW-1:0] ref_addr,
  input  pixel_t        ref_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output pixel_t        wr_data
);
  localparam int BX = FW / BS;
  localparam int PB = $clog2(BS * BS);

  typedef enum logic [1:0] {S_IDLE, S_MVREQ, S_MVWAIT, S_PIX} state_t;
  state_t state;

  logic [BW-1:0] blk;
  logic [15:0]   bx, by;              // block column / row
  logic [PB-1:0] pix;
  mv_t           mv;
  logic          neg_r;
  logic          vld_d;
  logic [AW-1:0] dst_d;
  logic          last_blk;
  int            px, py, rx, ry;

  assign mv_addr  = blk;
  assign last_blk = (blk == BW'(NB - 1));

  always_comb begin
    px = int'(bx) * BS + int'(pix) % BS;
    py = int'(by) * BS + int'(pix) / BS;
    rx = clamp_coord(px + int'(mv.x), FW);
    ry = clamp_coord(py + int'(mv.y), FH);
    ref_addr = AW'(ry * FW + rx);
  end

  assign wr_en   = vld_d;
  assign wr_addr = dst_d;
  assign wr_data = ref_data;
  assign busy    = (state != S_IDLE) || vld_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      blk   <= '0;
      bx    <= '0;
      by    <= '0;
      pix   <= '0;
      mv    <= '0;
      neg_r <= 1'b0;
      vld_d <= 1'b0;
      dst_d <= '0;
    end else begin
      done  <= 1'b0;
      vld_d <= (state == S_PIX);
      dst_d <= AW'(py * FW + px);
      if (vld_d && state == S_IDLE) done <= 1'b1;
      case (state)
        S_IDLE: if (start) begin
          neg_r <= neg;
          blk   <= '0;
          bx    <= '0;
          by    <= '0;
          state <= S_MVREQ;
        end
        S_MVREQ: state <= S_MVWAIT;
        S_MVWAIT: begin
          mv.x  <= neg_r ? -mv_data.x : mv_data.x;
          mv.y  <= neg_r ? -mv_data.y : mv_data.y;
          pix   <= '0;
          state <= S_PIX;
        end
        S_PIX: begin
          if (pix == PB'(BS * BS - 1)) begin
            if (last_blk) begin
              state <= S_IDLE;
            end else begin
              blk   <= blk + 1'b1;
              if (bx == 16'(BX - 1)) begin
                bx <= '0;
                by <= by + 1'b1;
              end else begin
                bx <= bx + 1'b1;
              end
              state <= S_MVREQ;
            end
          end else begin
            pix <= pix + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
