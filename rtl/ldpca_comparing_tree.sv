// ldpca_comparing_tree: comparing tree of one 66-check-node accumulation
// group of the LDPCA decoder.
//
// At code rate k/66 only k accumulated syndrome bits of the group are known,
// so neighbouring basic check nodes are merged into k merged check nodes.
// Level 0 holds the 66 basic CNs (3-input minimum generators); each higher
// level pairs neighbouring segments with a stacking CN (4-input minimum
// generator) or passes an odd last segment up unchanged. A stacking node is
// in use when its merge order is below 66-k, so every rate from 66/66 to
// 2/66 is one more stacking node switched on. Every node also XORs the hard
// sign bits of its edges and the hard decisions of its variable nodes, and
// a de-accumulator gives its syndrome bit.
//
// For each basic CN the tree returns the first/second minimum and the sign
// parity (edge signs XOR syndrome) of the highest node in use above it,
// i.e. of the merged check node the basic CN belongs to at this rate.
// check_ok is high when every merged check node's syndrome is met by the
// current hard decisions. Purely combinational.
//
// Interface: mag/sgn_par/hard_par per basic CN, the accumulated syndrome
// bits acc_syn of the group, and rate = k (2..66).
module ldpca_comparing_tree
  import ldpca_pkg::*;
#(
  parameter int MW = 5                // message magnitude width
) (
  input  logic [MW-1:0]     mag [GROUP][3], // |VN->CN message| per edge
  input  logic              sgn_par [GROUP],  // XOR of the 3 edge sign bits
  input  logic              hard_par [GROUP], // XOR of the 3 VN hard bits
  input  logic [GROUP-1:0]  acc_syn,
  input  logic [RATE_W-1:0] rate,
  output logic [MW-1:0]     min1 [GROUP],
  output logic [MW-1:0]     min2 [GROUP],
  output logic              par [GROUP],      // sign parity incl. syndrome
  output logic              check_ok
);
  logic [6:0] merges;
  assign merges = 7'(GROUP) - rate;   // stacking nodes in use

  // Each level r holds its nodes (index j < seg_count(r)) and, for every
  // basic CN b, the result of the highest node in use at or below level r.
  for (genvar r = 0; r <= LEVELS; r++) begin : g_lvl
    logic [MW-1:0] m1  [GROUP];
    logic [MW-1:0] m2  [GROUP];
    logic          sp  [GROUP];       // sign parity of the node's edges
    logic          hp  [GROUP];       // hard-decision parity
    logic          syn [GROUP];       // syndrome of the node's segment
    logic          act [GROUP];       // node in use at this rate
    logic [MW-1:0] o_m1 [GROUP];
    logic [MW-1:0] o_m2 [GROUP];
    logic          o_par [GROUP];
    logic          ok;                // all merged nodes ending at r are met

    for (genvar j = 0; j < GROUP; j++) begin : g_node
      if (r == 0) begin : g_basic
        ldpca_basic_cn #(.W(MW)) u_cn (
          .x0(mag[j][0]), .x1(mag[j][1]), .x2(mag[j][2]),
          .min_1st(m1[j]), .min_2nd(m2[j])
        );
        assign sp[j]  = sgn_par[j];
        assign hp[j]  = hard_par[j];
        assign act[j] = 1'b1;
        ldpca_deaccumulator #(.GROUP(GROUP), .FIRST(j), .LAST(j)) u_da (
          .acc_syn(acc_syn), .syn(syn[j])
        );
      end else if (j < seg_count(r) && (2*j+1) < seg_count(r-1)) begin : g_stack
        localparam int ORD  = merge_order(r, j);
        localparam int LAST = ((((j+1) << r) - 1) < GROUP) ? (((j+1) << r) - 1) : GROUP - 1;
        ldpca_stacking_cn #(.W(MW)) u_sc (
          .m1a(g_lvl[r-1].m1[2*j]),   .m2a(g_lvl[r-1].m2[2*j]),
          .m1b(g_lvl[r-1].m1[2*j+1]), .m2b(g_lvl[r-1].m2[2*j+1]),
          .min_1st(m1[j]), .min_2nd(m2[j])
        );
        assign sp[j]  = g_lvl[r-1].sp[2*j] ^ g_lvl[r-1].sp[2*j+1];
        assign hp[j]  = g_lvl[r-1].hp[2*j] ^ g_lvl[r-1].hp[2*j+1];
        assign act[j] = (7'(ORD) < merges);
        ldpca_deaccumulator #(.GROUP(GROUP), .FIRST(j << r), .LAST(LAST)) u_da (
          .acc_syn(acc_syn), .syn(syn[j])
        );
      end else if (j < seg_count(r)) begin : g_pass
        assign m1[j]  = g_lvl[r-1].m1[2*j];
        assign m2[j]  = g_lvl[r-1].m2[2*j];
        assign sp[j]  = g_lvl[r-1].sp[2*j];
        assign hp[j]  = g_lvl[r-1].hp[2*j];
        assign syn[j] = g_lvl[r-1].syn[2*j];
        assign act[j] = g_lvl[r-1].act[2*j];
      end else begin : g_none
        assign m1[j]  = '0;
        assign m2[j]  = '0;
        assign sp[j]  = 1'b0;
        assign hp[j]  = 1'b0;
        assign syn[j] = 1'b0;
        assign act[j] = 1'b0;
      end

      // result seen by basic CN j: this level's ancestor if in use
      if (r == 0) begin : g_o0
        assign o_m1[j]  = m1[j];
        assign o_m2[j]  = m2[j];
        assign o_par[j] = sp[j] ^ syn[j];
      end else begin : g_or
        assign o_m1[j]  = act[j >> r] ? m1[j >> r] : g_lvl[r-1].o_m1[j];
        assign o_m2[j]  = act[j >> r] ? m2[j >> r] : g_lvl[r-1].o_m2[j];
        assign o_par[j] = act[j >> r] ? (sp[j >> r] ^ syn[j >> r]) : g_lvl[r-1].o_par[j];
      end
    end

    logic ok_all;                     // ok of this level and all below
    if (r == 0) begin : g_ok0
      assign ok_all = ok;
    end else begin : g_okr
      assign ok_all = ok & g_lvl[r-1].ok_all;
    end

    // a node in use whose parent is not in use is a merged check node
    always_comb begin
      ok = 1'b1;
      for (int j = 0; j < GROUP; j++) begin
        if (r == LEVELS) begin
          if (act[j] && (hp[j] != syn[j])) ok = 1'b0;
        end else if (act[j] && !g_lvl[(r < LEVELS) ? r+1 : r].act[j >> 1]
                     && (hp[j] != syn[j])) begin
          ok = 1'b0;
        end
      end
    end
  end

  assign min1 = g_lvl[LEVELS].o_m1;
  assign min2 = g_lvl[LEVELS].o_m2;
  assign par  = g_lvl[LEVELS].o_par;

  assign check_ok = g_lvl[LEVELS].ok_all;
endmodule
