// wvmf_sad: SAD datapath of the weighted vector median filter.
//
// Accumulates |P_prev - P_next| over the pixels of a block, where P_prev is
// the pixel of the previous key frame compensated with the candidate vector
// and P_next the pixel of the next key frame compensated with the negated
// vector. Subtractor, absolute value and an adder into the weighting-factor
// register W, as in the described datapath. clr zeroes W; en adds one pixel
// pair per cycle. The result is the weighting factor of the candidate.
module wvmf_sad #(
  parameter int SW = 14               // holds 64 * 255
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [7:0]    p_prev,
  input  logic [7:0]    p_next,
  output logic [SW-1:0] w
);
  logic [7:0] ad;
  assign ad = (p_prev > p_next) ? (p_prev - p_next) : (p_next - p_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  w <= '0;
    else if (clr) w <= '0;
    else if (en)  w <= w + SW'(ad);
  end
endmodule
