// transform_quant: 4x4 transform and quantisation unit, shared between the
// forward path (DCT + quantisation) and the inverse path (de-quantisation +
// IDCT), selected by sel.
//
// sel = 1: residual block -> forward core transform -> coefficient
//          multiplier & shifter with quantisation:
//            level = sign(Y) * ((|Y| * MF(qp%6, pos) + f) >> (15 + qp/6)),
//            f = 2^(15+qp/6) / 6.
// sel = 0: levels -> de-quantisation with coefficient scaling:
//            Y' = level * V(qp%6, pos) << (qp/6)
//          -> inverse core transform -> rounding shifter (x + 32) >> 6.
// pos is the coefficient's class: both indices even, both odd, or mixed.
// MF and V are the usual H.264 multiplier tables, which fold the scaling
// matrix E of the integer transform into the quantiser step of qp.
//
// The shared core, the sel convention and the order of the stages follow
// the described unit. The quantiser (H.264 qp tables, rounding offset f) is
// this design's choice: the description names a coefficient multiplier &
// shifter and quantisation without giving their constants.
//
// Interface: one 4x4 block per cycle with in_valid, elements row-major.
// Timing: two cycles of latency (core register, output register).
module transform_quant (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               sel,       // 1 forward + quant, 0 dequant + inverse
  input  logic [5:0]         qp,        // 0..51
  input  logic signed [15:0] din [16],
  output logic               out_valid,
  output logic signed [15:0] dout [16]
);
  localparam int CW = 32;

  function automatic int pos_class(int k);
    int i, j;
    i = k / 4; j = k % 4;
    if ((i % 2 == 0) && (j % 2 == 0)) return 0;
    if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    return 2;
  endfunction

  function automatic int mf_tab(int m, int c);
    case (m)
      0: return (c == 0) ? 13107 : (c == 1) ? 5243 : 8066;
      1: return (c == 0) ? 11916 : (c == 1) ? 4660 : 7490;
      2: return (c == 0) ? 10082 : (c == 1) ? 4194 : 6554;
      3: return (c == 0) ?  9362 : (c == 1) ? 3647 : 5825;
      4: return (c == 0) ?  8192 : (c == 1) ? 3355 : 5243;
      default: return (c == 0) ? 7282 : (c == 1) ? 2893 : 4559;
    endcase
  endfunction

  function automatic int v_tab(int m, int c);
    case (m)
      0: return (c == 0) ? 10 : (c == 1) ? 16 : 13;
      1: return (c == 0) ? 11 : (c == 1) ? 18 : 14;
      2: return (c == 0) ? 13 : (c == 1) ? 20 : 16;
      3: return (c == 0) ? 14 : (c == 1) ? 23 : 18;
      4: return (c == 0) ? 16 : (c == 1) ? 25 : 20;
      default: return (c == 0) ? 18 : (c == 1) ? 29 : 23;
    endcase
  endfunction

  logic signed [CW-1:0] core_in [16];
  logic signed [CW-1:0] core_out [16];
  logic                 core_vld;
  logic                 sel_d;
  logic [5:0]           qp_d;
  logic [3:0]           qdiv_in, qdiv_d;
  logic [2:0]           qmod_in, qmod_d;

  assign qdiv_in = 4'(qp / 6);
  assign qmod_in = 3'(qp % 6);
  assign qdiv_d  = 4'(qp_d / 6);
  assign qmod_d  = 3'(qp_d % 6);

  // de-quantisation in front of the core (inverse path)
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      if (sel) core_in[k] = CW'(din[k]);
      else     core_in[k] = (CW'(din[k]) * CW'(v_tab(int'(qmod_in), pos_class(k)))) <<< qdiv_in;
    end
  end

  transform_core #(.IW(CW), .OW(CW)) u_core (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .sel(sel),
    .x(core_in), .out_valid(core_vld), .y(core_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_d <= 1'b1;
      qp_d  <= '0;
    end else if (in_valid) begin
      sel_d <= sel;
      qp_d  <= qp;
    end
  end

  // quantisation or final rounding behind the core
  logic signed [15:0] res [16];
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      logic [47:0] mag, prod;
      logic [5:0]  qbits;
      logic signed [CW-1:0] rnd;
      qbits = 6'(15 + int'(qdiv_d));
      mag   = 48'((core_out[k] < 0) ? CW'(-core_out[k]) : core_out[k]);
      prod  = (mag * 48'(mf_tab(int'(qmod_d), pos_class(k))) + ((48'd1 << qbits) / 48'd6)) >> qbits;
      rnd   = (core_out[k] + CW'(32)) >>> 6;
      if (sel_d) res[k] = (core_out[k] < 0) ? -16'(prod) : 16'(prod);
      else       res[k] = 16'(rnd);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 16; k++) dout[k] <= '0;
    end else begin
      out_valid <= core_vld;
      if (core_vld) dout <= res;
    end
  end
endmodule
