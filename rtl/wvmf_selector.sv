// wvmf_selector: weighting and minimum selector of the weighted vector
// median filter.
//
// For each candidate vector it forms the weighted distance
//   WD = W*Dx + W*Dy
// (W = SAD weighting factor, Dx/Dy = summed distances, the x and y products
// computed separately) and compares it with the stored minimum. first marks
// the first candidate of a block, which is taken unconditionally; a later
// candidate replaces the stored one only when strictly smaller, so ties keep
// the earlier candidate (tie rule is this design's choice). One candidate
// per en cycle; best_mv/best_wd are valid the cycle after the last en.
module wvmf_selector
  import dvc_pkg::*;
#(
  parameter int SW = 14,
  parameter int DW = MVW + 5,
  localparam int PW = SW + DW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          first,
  input  logic [SW-1:0] w,
  input  logic [DW-1:0] dx,
  input  logic [DW-1:0] dy,
  input  mv_t           cand_mv,
  output mv_t           best_mv,
  output logic [PW-1:0] best_wd
);
  logic [PW-1:0] wdx, wdy, wd;
  assign wdx = PW'(w) * PW'(dx);
  assign wdy = PW'(w) * PW'(dy);
  assign wd  = wdx + wdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_mv <= '0;
      best_wd <= '0;
    end else if (en && (first || wd < best_wd)) begin
      best_mv <= cand_mv;
      best_wd <= wd;
    end
  end
endmodule
