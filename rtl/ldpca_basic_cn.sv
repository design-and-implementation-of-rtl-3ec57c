// ldpca_basic_cn: basic check node of the comparing tree, a 3-input
// minimum-value generator.
//
// Finds the smallest and second smallest of three unsigned message
// magnitudes. As in the three-input generator of the decoder architecture, a
// comparator orders x0 and x1 (first two-input generator, giving z0/z1), and
// a second stage merges x2: min_1st = min(z0, x2), min_2nd = min(z1,
// max(z0, x2)). Purely combinational.
module ldpca_basic_cn #(
  parameter int W = 5                 // magnitude width
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic [W-1:0] min_1st,
  output logic [W-1:0] min_2nd
);
  logic [W-1:0] z0, z1;
  logic         cp0;

  always_comb begin
    cp0 = (x1 < x0);
    z0  = cp0 ? x1 : x0;
    z1  = cp0 ? x0 : x1;
    if (x2 < z0) begin
      min_1st = x2;
      min_2nd = z0;
    end else begin
      min_1st = z0;
      min_2nd = (x2 < z1) ? x2 : z1;
    end
  end
endmodule
