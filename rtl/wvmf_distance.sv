// wvmf_distance: distance datapath of the weighted vector median filter.
//
// Given the nine vectors of the 3x3 block window (registers V1..V9) and the
// index of the candidate vector, returns the summed absolute x and y
// distances from the candidate to all nine window vectors:
//   dx = sum_j |Xc - Xj|,  dy = sum_j |Yc - Yj|.
// The two components are kept apart because the selector weights them
// separately. Combinational: the nine subtract/absolute stages and the
// adder tree are evaluated in one cycle (this design's choice; the
// described datapath accumulates them through a multiplexer).
module wvmf_distance
  import dvc_pkg::*;
#(
  localparam int DW = MVW + 5
) (
  input  mv_t           win [9],
  input  logic [3:0]    cand,
  output logic [DW-1:0] dx,
  output logic [DW-1:0] dy
);
  always_comb begin
    mv_t c;
    c  = win[(cand < 4'd9) ? cand : 4'd0];
    dx = '0;
    dy = '0;
    for (int j = 0; j < 9; j++) begin
      logic signed [MVW:0] ex, ey;
      logic [MVW:0]        ax, ay;
      ex = (MVW+1)'(c.x) - (MVW+1)'(win[j].x);
      ey = (MVW+1)'(c.y) - (MVW+1)'(win[j].y);
      ax = (ex < 0) ? (MVW+1)'(-ex) : (MVW+1)'(ex);
      ay = (ey < 0) ? (MVW+1)'(-ey) : (MVW+1)'(ey);
      dx += DW'(ax);
      dy += DW'(ay);
    end
  end
endmodule
