// soft_input: correlation noise model and soft input computation.
//
// Gives the LDPCA decoder the intrinsic LLR of one bit of the current bit
// plane from the matching bit of the side information. The correlation
// noise between Wyner-Ziv data and side information is taken as Laplacian
// with a fixed parameter alpha, chosen from eight values by alpha_idx.
// Two lookup tables do the work:
//   LUT1 (alpha, bit plane) -> probability that the bit differs from the
//        side-information bit, P_flip = 0.5 * exp(-alpha * 2^(plane-1)),
//        with alpha = 2^(alpha_idx-5) per quantisation step; stored as
//        round(256*P_flip) (at least 1). P(1) = P_flip when the side bit is
//        0 and 256 - P_flip when it is 1; P(0) = 256 - P(1).
//   LUT2 P(1) -> LLR = round(4 * ln(P(1)/P(0))), saturated to +-31
//        (positive means 1, one LLR unit is a quarter nat).
// The two-table structure, the Laplacian model with a fixed alpha and the
// LLR definition ln(P(1)/P(0)) follow the described hardware; the alpha
// set, the bit-plane weighting in LUT1, the 8-bit probabilities and the
// LLR scale are this design's own.
//
// Timing: one result per cycle, registered, one cycle latency.
module soft_input (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              si_bit,     // side-information bit of this plane
  input  logic [1:0]        plane,      // bit plane, 0 = least significant
  input  logic [2:0]        alpha_idx,
  output logic              out_valid,
  output logic [8:0]        p0,         // P(0) * 256
  output logic [8:0]        p1,         // P(1) * 256
  output logic signed [5:0] llr
);
  function automatic logic [7:0] lut1(input logic [5:0] idx);
    logic [7:0] p;
    case (idx)
      6'd0: p = 8'd126;
      6'd1: p = 8'd124;
      6'd2: p = 8'd120;
      6'd3: p = 8'd113;
      6'd4: p = 8'd124;
      6'd5: p = 8'd120;
      6'd6: p = 8'd113;
      6'd7: p = 8'd100;
      6'd8: p = 8'd120;
      6'd9: p = 8'd113;
      6'd10: p = 8'd100;
      6'd11: p = 8'd78;
      6'd12: p = 8'd113;
      6'd13: p = 8'd100;
      6'd14: p = 8'd78;
      6'd15: p = 8'd47;
      6'd16: p = 8'd100;
      6'd17: p = 8'd78;
      6'd18: p = 8'd47;
      6'd19: p = 8'd17;
      6'd20: p = 8'd78;
      6'd21: p = 8'd47;
      6'd22: p = 8'd17;
      6'd23: p = 8'd2;
      6'd24: p = 8'd47;
      6'd25: p = 8'd17;
      6'd26: p = 8'd2;
      6'd27: p = 8'd1;
      6'd28: p = 8'd17;
      6'd29: p = 8'd2;
      6'd30: p = 8'd1;
      6'd31: p = 8'd1;
      default: p = 8'd1;
    endcase
    return p;
  endfunction

  function automatic logic signed [5:0] lut2(input logic [7:0] p);
    logic signed [5:0] l;
    case (p) inside
      [8'd0:8'd1]: l = -6'sd22;
      8'd2: l = -6'sd19;
      8'd3: l = -6'sd18;
      8'd4: l = -6'sd17;
      8'd5: l = -6'sd16;
      8'd6: l = -6'sd15;
      [8'd7:8'd8]: l = -6'sd14;
      [8'd9:8'd10]: l = -6'sd13;
      [8'd11:8'd13]: l = -6'sd12;
      [8'd14:8'd17]: l = -6'sd11;
      [8'd18:8'd21]: l = -6'sd10;
      [8'd22:8'd27]: l = -6'sd9;
      [8'd28:8'd34]: l = -6'sd8;
      [8'd35:8'd42]: l = -6'sd7;
      [8'd43:8'd51]: l = -6'sd6;
      [8'd52:8'd62]: l = -6'sd5;
      [8'd63:8'd75]: l = -6'sd4;
      [8'd76:8'd89]: l = -6'sd3;
      [8'd90:8'd104]: l = -6'sd2;
      [8'd105:8'd120]: l = -6'sd1;
      [8'd121:8'd135]: l = 6'sd0;
      [8'd136:8'd151]: l = 6'sd1;
      [8'd152:8'd166]: l = 6'sd2;
      [8'd167:8'd180]: l = 6'sd3;
      [8'd181:8'd193]: l = 6'sd4;
      [8'd194:8'd204]: l = 6'sd5;
      [8'd205:8'd213]: l = 6'sd6;
      [8'd214:8'd221]: l = 6'sd7;
      [8'd222:8'd228]: l = 6'sd8;
      [8'd229:8'd234]: l = 6'sd9;
      [8'd235:8'd238]: l = 6'sd10;
      [8'd239:8'd242]: l = 6'sd11;
      [8'd243:8'd245]: l = 6'sd12;
      [8'd246:8'd247]: l = 6'sd13;
      [8'd248:8'd249]: l = 6'sd14;
      8'd250: l = 6'sd15;
      8'd251: l = 6'sd16;
      8'd252: l = 6'sd17;
      8'd253: l = 6'sd18;
      8'd254: l = 6'sd19;
      8'd255: l = 6'sd22;
      default: l = '0;
    endcase
    return l;
  endfunction

  logic [7:0] pf;
  logic [8:0] p1_c;

  always_comb begin
    pf   = lut1({1'b0, alpha_idx, plane});
    p1_c = si_bit ? (9'd256 - 9'(pf)) : 9'(pf);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p0        <= '0;
      p1        <= '0;
      llr       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        p1  <= p1_c;
        p0  <= 9'd256 - p1_c;
        llr <= lut2((p1_c > 9'd255) ? 8'd255 : p1_c[7:0]);
      end
    end
  end
endmodule
