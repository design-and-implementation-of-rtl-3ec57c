// ldpca_stacking_cn: stacking check node of the comparing tree, a 4-input
// minimum-value generator.
//
// Merges two already sorted pairs (m1a <= m2a, m1b <= m2b) of minimum
// magnitudes into the first and second minimum of all four. Three two-input
// generators: one picks the overall minimum of m1a/m1b, the loser of that
// comparison then competes with the second value of the winning pair.
// Purely combinational.
module ldpca_stacking_cn #(
  parameter int W = 5
) (
  input  logic [W-1:0] m1a,
  input  logic [W-1:0] m2a,
  input  logic [W-1:0] m1b,
  input  logic [W-1:0] m2b,
  output logic [W-1:0] min_1st,
  output logic [W-1:0] min_2nd
);
  always_comb begin
    if (m1b < m1a) begin
      min_1st = m1b;
      min_2nd = (m2b < m1a) ? m2b : m1a;
    end else begin
      min_1st = m1a;
      min_2nd = (m2a < m1b) ? m2a : m1b;
    end
  end
endmodule
