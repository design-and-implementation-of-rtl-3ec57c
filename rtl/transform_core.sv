// transform_core: direct 2-D 4x4 integer transform, forward or inverse.
//
// sel = 1: forward core transform Y = C X C^T with
//          C = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1].
//          Each 1-D pass uses the butterfly of the forward equations:
//          sums s0 = x0+x3, s1 = x1+x2 give y0 = s0+s1, y2 = s0-s1; the
//          differences d0 = x0-x3, d1 = x1-x2 give y1 = 2d0+d1, y3 = d0-2d1.
// sel = 0: inverse core transform X = Ci^T Y Ci (H.264 style), 1-D pass
//          e0 = y0+y2, e1 = y0-y2, e2 = (y1>>1)-y3, e3 = y1+(y3>>1),
//          x0 = e0+e3, x1 = e1+e2, x2 = e1-e2, x3 = e0-e3.
// Scaling by the matrix E (and the final rounding of the inverse) is left to
// the coefficient multiplier and shifter of transform_quant.
//
// Both 1-D passes are evaluated in one step without a transpose memory (a
// direct 2-D transform); the block is registered, so a 4x4 block goes in
// every cycle and comes out one cycle later with out_valid. Elements are
// row-major: index 4*row + column. The butterflies follow the transform
// equations; the one-block-per-cycle organisation is this design's own.
module transform_core #(
  parameter int IW = 16,
  parameter int OW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 sel,        // 1 forward, 0 inverse
  input  logic signed [IW-1:0] x [16],
  output logic                 out_valid,
  output logic signed [OW-1:0] y [16]
);
  typedef logic signed [OW-1:0] vec4_t [4];

  function automatic vec4_t fwd1d(input vec4_t a);
    vec4_t r;
    logic signed [OW-1:0] s0, s1, d0, d1;
    s0 = a[0] + a[3];  s1 = a[1] + a[2];
    d0 = a[0] - a[3];  d1 = a[1] - a[2];
    r[0] = s0 + s1;
    r[2] = s0 - s1;
    r[1] = (d0 <<< 1) + d1;
    r[3] = d0 - (d1 <<< 1);
    return r;
  endfunction

  function automatic vec4_t inv1d(input vec4_t a);
    vec4_t r;
    logic signed [OW-1:0] e0, e1, e2, e3;
    e0 = a[0] + a[2];
    e1 = a[0] - a[2];
    e2 = (a[1] >>> 1) - a[3];
    e3 = a[1] + (a[3] >>> 1);
    r[0] = e0 + e3;
    r[1] = e1 + e2;
    r[2] = e1 - e2;
    r[3] = e0 - e3;
    return r;
  endfunction

  logic signed [OW-1:0] res [16];

  always_comb begin
    logic signed [OW-1:0] m [16];
    vec4_t v, o;
    // horizontal pass on each row
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) v[j] = OW'(x[4*i + j]);
      o = sel ? fwd1d(v) : inv1d(v);
      for (int j = 0; j < 4; j++) m[4*i + j] = o[j];
    end
    // vertical pass on each column
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < 4; i++) v[i] = m[4*i + j];
      o = sel ? fwd1d(v) : inv1d(v);
      for (int i = 0; i < 4; i++) res[4*i + j] = o[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 16; k++) y[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= res;
    end
  end
endmodule
