// wvmf: spatial motion smoothing with a weighted vector median filter.
//
// For every motion block of the frame the filter looks at the 3x3 window of
// block vectors centred on it (window positions outside the vector field
// repeat the nearest edge block) and chooses, among the nine window
// vectors, the one that minimises
//   SAD(x_c) * sum_j (|X_c - X_j| + |Y_c - Y_j|),
// where SAD(x_c) is the sum of absolute differences between the previous
// key frame compensated with +x_c and the next key frame compensated with
// -x_c over the block. The chosen vector is written to the output vector
// buffer at the block's index.
//
// Structure: control unit (this module), distance datapath (wvmf_distance),
// SAD datapath (wvmf_sad) and weighting & minimum selector (wvmf_selector).
// At the left end of a block row all nine window registers are loaded; when
// the window slides right, the registers shift and only the three vectors
// of the new right column are read. Frame-edge clamping of pixel addresses
// is as in motion compensation.
//
// Interface: synchronous-read ports (one cycle latency) to the input vector
// buffer and to the previous and next key frames; a write port to the
// output vector buffer. Timing per block: 11 (row start) or 5 cycles of
// vector loading, 9 x (MV_BLK^2 + 2) cycles of candidate evaluation and one
// write cycle; done follows one cycle after the last block. The selector's
// best weighted distance is only needed inside the selector, so its output
// here is left unconnected on purpose (a lint note, not a circuit fault). The window size, the criterion and the datapath split follow
// the described filter; the edge rule, integer-pel vectors and the cycle
// schedule are this design's own.
module wvmf
  import dvc_pkg::*;
#(
  parameter int FW  = FRAME_W,
  parameter int FH  = FRAME_H,
  parameter int BS  = MV_BLK,
  localparam int BX = FW / BS,
  localparam int BY = FH / BS,
  localparam int NB = BX * BY,
  localparam int AW = $clog2(FW * FH),
  localparam int BW = $clog2(NB)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [BW-1:0] mv_rd_addr,
  input  mv_t           mv_rd_data,
  output logic [AW-1:0] prev_addr,
  input  pixel_t        prev_data,
  output logic [AW-1:0] next_addr,
  input  pixel_t        next_data,
  output logic          out_we,
  output logic [BW-1:0] out_addr,
  output mv_t           out_mv
);
  localparam int SW = 8 + $clog2(BS * BS);
  localparam int DW = MVW + 5;
  localparam int PB = $clog2(BS * BS);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_PIX, S_WAIT, S_SEL, S_WRITE} state_t;
  state_t state;

  mv_t           win [9];             // V1..V9 registers
  logic [15:0]   bx, by;
  logic [3:0]    ld, ld_n;            // load counter / number to load
  logic          ld_vld;
  logic [3:0]    ld_dst;
  logic [3:0]    cand;
  logic [PB-1:0] pix;
  logic          pix_vld;
  logic [DW-1:0] dx, dy;
  logic [SW-1:0] w;
  mv_t           best_mv;
  logic [SW+DW:0] best_wd;
  int            lx, ly, px, py;

  // vector read address for the current load step
  always_comb begin
    if (ld_n == 4'd9) begin
      lx = clamp_coord(int'(bx) - 1 + int'(ld) % 3, BX);
      ly = clamp_coord(int'(by) - 1 + int'(ld) / 3, BY);
    end else begin
      lx = clamp_coord(int'(bx) + 1, BX);
      ly = clamp_coord(int'(by) - 1 + int'(ld), BY);
    end
    mv_rd_addr = BW'(ly * BX + lx);
  end

  // pixel addresses of the candidate under evaluation
  always_comb begin
    mv_t c;
    c  = win[cand];
    px = int'(bx) * BS + int'(pix) % BS;
    py = int'(by) * BS + int'(pix) / BS;
    prev_addr = AW'(clamp_coord(py + int'(c.y), FH) * FW + clamp_coord(px + int'(c.x), FW));
    next_addr = AW'(clamp_coord(py - int'(c.y), FH) * FW + clamp_coord(px - int'(c.x), FW));
  end

  wvmf_distance u_dist (.win(win), .cand(cand), .dx(dx), .dy(dy));

  wvmf_sad #(.SW(SW)) u_sad (
    .clk(clk), .rst_n(rst_n), .clr(state == S_SEL), .en(pix_vld),
    .p_prev(prev_data), .p_next(next_data), .w(w)
  );

  wvmf_selector #(.SW(SW), .DW(DW)) u_sel (
    .clk(clk), .rst_n(rst_n), .en(state == S_SEL), .first(cand == 4'd0),
    .w(w), .dx(dx), .dy(dy), .cand_mv(win[cand]),
    .best_mv(best_mv), .best_wd(best_wd)
  );

  assign busy     = (state != S_IDLE);
  assign out_we   = (state == S_WRITE);
  assign out_addr = BW'(int'(by) * BX + int'(bx));
  assign out_mv   = best_mv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      bx      <= '0;
      by      <= '0;
      ld      <= '0;
      ld_n    <= '0;
      ld_vld  <= 1'b0;
      ld_dst  <= '0;
      cand    <= '0;
      pix     <= '0;
      pix_vld <= 1'b0;
      for (int k = 0; k < 9; k++) win[k] <= '0;
    end else begin
      done    <= 1'b0;
      pix_vld <= (state == S_PIX);
      ld_vld  <= (state == S_LOAD) && (ld < ld_n);
      ld_dst  <= (ld_n == 4'd9) ? ld : 4'(int'(ld) * 3 + 2);
      if (ld_vld) win[ld_dst] <= mv_rd_data;
      case (state)
        S_IDLE: if (start) begin
          bx    <= '0;
          by    <= '0;
          ld    <= '0;
          ld_n  <= 4'd9;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (ld < ld_n) ld <= ld + 1'b1;
          else if (!ld_vld) begin
            cand  <= '0;
            pix   <= '0;
            state <= S_PIX;
          end
        end
        S_PIX: begin
          if (pix == PB'(BS * BS - 1)) state <= S_WAIT;
          pix <= pix + 1'b1;
        end
        S_WAIT: state <= S_SEL;
        S_SEL: begin
          if (cand == 4'd8) begin
            state <= S_WRITE;
          end else begin
            cand  <= cand + 1'b1;
            pix   <= '0;
            state <= S_PIX;
          end
        end
        S_WRITE: begin
          ld <= '0;
          if (bx == 16'(BX - 1)) begin
            if (by == 16'(BY - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              bx    <= '0;
              by    <= by + 1'b1;
              ld_n  <= 4'd9;
              state <= S_LOAD;
            end
          end else begin
            // slide the window: shift left, load the new right column
            bx   <= bx + 1'b1;
            ld_n <= 4'd3;
            for (int r = 0; r < 3; r++) begin
              win[r*3]   <= win[r*3+1];
              win[r*3+1] <= win[r*3+2];
            end
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
