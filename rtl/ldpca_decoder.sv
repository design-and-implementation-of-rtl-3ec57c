// ldpca_decoder: rate-adaptive LDPCA syndrome decoder (min-sum), code
// length N = 66*G bits, code rates 2/66 .. 66/66.
//
// The decoder recovers N source bits from their intrinsic log-likelihood
// ratios (LLR = ln(P(1)/P(0)), so a positive value means bit 1) and the
// accumulated syndrome bits held in the syndrome buffer. At rate k/66 each
// of the G accumulation groups uses k of its 66 accumulated syndrome bits;
// the comparing tree of each group merges the basic check nodes in between
// and de-accumulates the merged syndromes. All check and variable nodes are
// updated in parallel, one flooding iteration per clock:
//   check node: each edge receives the first minimum of the merged node's
//               other magnitudes (second minimum for the edge that holds the
//               first) with the bit the parity asks for;
//   variable node: total = intrinsic + all three check messages, the
//               message back is total minus the message of that edge, and
//               the hard decision is total > 0.
// The parity of the hard decisions is checked against every merged syndrome
// before each iteration. When it holds, decoding ends with success. After
// MAX_ITER iterations without success the decoder takes one more syndrome
// bit per group (rate + 1), restarts the messages from the intrinsic LLRs
// and goes on; at rate 66/66 it gives up and reports failure.
//
// The structure (comparing tree of basic and stacking check nodes, 66-bit
// accumulation groups, de-accumulator, syndrome buffer, 396-bit code, 65
// rates, min-sum) follows the architecture described for this decoder.
// The parity-check matrix and merge order (see ldpca_pkg), the LLR width,
// MAX_ITER and the port protocol are this design's own. When a variable
// node has two edges into one merged check node the tree keeps both edges
// (the comparing tree merges minima, it does not cancel edges); the parity
// check itself is exact.
//
// Interface: pulse start with llr_in, acc_syn_in and rate_init valid; done
// pulses one cycle when finished, with success, rate (syndrome bits per
// group that were used), iter_total and dec_bits valid until the next start.
// Timing: 1 cycle to load, then one cycle per iteration plus one cycle per
// parity check that ends a rate.
module ldpca_decoder
  import ldpca_pkg::*;
#(
  parameter int G        = 6,         // accumulation groups (N = 66*G)
  parameter int W        = 6,         // LLR width, two's complement
  parameter int MAX_ITER = 40,        // iterations per code rate
  localparam int N       = GROUP * G,
  localparam int MW      = W - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [RATE_W-1:0]   rate_init,
  input  logic signed [W-1:0] llr_in [N],
  input  logic [N-1:0]        acc_syn_in,
  output logic                busy,
  output logic                done,
  output logic                success,
  output logic [RATE_W-1:0]   rate,
  output logic [15:0]         iter_total,
  output logic [N-1:0]        dec_bits
);
  localparam int TW = W + 2;          // variable-node sum width
  localparam logic signed [W-1:0] LMAX = W'((1 << (W-1)) - 1);

  logic signed [W-1:0] llr [N];
  logic [N-1:0]        syn_buf;       // syndrome buffer
  logic signed [W-1:0] q [N][3];      // variable-to-check messages
  logic signed [W-1:0] r_msg [N][3];  // check-to-variable messages
  logic signed [W-1:0] q_nxt [N][3];
  logic [N-1:0]        hard_nxt;
  logic [G-1:0]        grp_ok;
  logic                all_ok;
  logic [$clog2(MAX_ITER+1)-1:0] iter;

  function automatic logic signed [W-1:0] sat(input logic signed [TW-1:0] x);
    if (x > TW'(LMAX)) return LMAX;
    if (x < -TW'(LMAX)) return -LMAX;
    return W'(x);
  endfunction

  function automatic logic [MW-1:0] magn(input logic signed [W-1:0] x);
    return MW'((x < 0) ? -x : x);
  endfunction

  // check-node side: one comparing tree per accumulation group
  for (genvar g = 0; g < G; g++) begin : g_grp
    logic [MW-1:0] mag [GROUP][3];
    logic          sgn_par [GROUP];
    logic          hard_par [GROUP];
    logic [MW-1:0] min1 [GROUP];
    logic [MW-1:0] min2 [GROUP];
    logic          par [GROUP];

    for (genvar p = 0; p < GROUP; p++) begin : g_cn
      localparam int V0 = vn_of(g*GROUP + p, 0, N);
      localparam int V1 = vn_of(g*GROUP + p, 1, N);
      localparam int V2 = vn_of(g*GROUP + p, 2, N);
      assign mag[p][0]   = magn(q[V0][0]);
      assign mag[p][1]   = magn(q[V1][1]);
      assign mag[p][2]   = magn(q[V2][2]);
      assign sgn_par[p]  = (q[V0][0] > 0) ^ (q[V1][1] > 0) ^ (q[V2][2] > 0);
      assign hard_par[p] = dec_bits[V0] ^ dec_bits[V1] ^ dec_bits[V2];
      for (genvar e = 0; e < 3; e++) begin : g_edge
        localparam int V = vn_of(g*GROUP + p, e, N);
        logic [MW-1:0] m;
        logic          bit_est;
        assign m       = (mag[p][e] == min1[p]) ? min2[p] : min1[p];
        assign bit_est = par[p] ^ (q[V][e] > 0);
        assign r_msg[V][e] = bit_est ? W'(signed'({1'b0, m})) : -W'(signed'({1'b0, m}));
      end
    end

    ldpca_comparing_tree #(.MW(MW)) u_tree (
      .mag(mag), .sgn_par(sgn_par), .hard_par(hard_par),
      .acc_syn(syn_buf[g*GROUP +: GROUP]), .rate(rate),
      .min1(min1), .min2(min2), .par(par), .check_ok(grp_ok[g])
    );
  end

  assign all_ok = &grp_ok;

  // variable-node side
  always_comb begin
    for (int v = 0; v < N; v++) begin
      logic signed [TW-1:0] tot;
      tot = TW'(llr[v]) + TW'(r_msg[v][0]) + TW'(r_msg[v][1]) + TW'(r_msg[v][2]);
      hard_nxt[v] = (tot > 0);
      for (int e = 0; e < 3; e++) q_nxt[v][e] = sat(tot - TW'(r_msg[v][e]));
    end
  end

  typedef enum logic [1:0] {S_IDLE, S_RUN} state_t;
  state_t state;

  assign busy = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      success    <= 1'b0;
      rate       <= RATE_W'(GROUP);
      iter       <= '0;
      iter_total <= '0;
      syn_buf    <= '0;
      dec_bits   <= '0;
      for (int v = 0; v < N; v++) begin
        llr[v] <= '0;
        for (int e = 0; e < 3; e++) q[v][e] <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state      <= S_RUN;
          success    <= 1'b0;
          rate       <= (rate_init < 2) ? RATE_W'(2) :
                        (rate_init > RATE_W'(GROUP)) ? RATE_W'(GROUP) : rate_init;
          iter       <= '0;
          iter_total <= '0;
          syn_buf    <= acc_syn_in;
          for (int v = 0; v < N; v++) begin
            llr[v]      <= llr_in[v];
            dec_bits[v] <= (llr_in[v] > 0);
            for (int e = 0; e < 3; e++) q[v][e] <= llr_in[v];
          end
        end
        S_RUN: begin
          if (all_ok) begin
            state   <= S_IDLE;
            done    <= 1'b1;
            success <= 1'b1;
          end else if (iter == MAX_ITER[$bits(iter)-1:0]) begin
            if (rate == RATE_W'(GROUP)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              // request one more accumulated syndrome bit per group
              rate <= rate + 1'b1;
              iter <= '0;
              for (int v = 0; v < N; v++) begin
                dec_bits[v] <= (llr[v] > 0);
                for (int e = 0; e < 3; e++) q[v][e] <= llr[v];
              end
            end
          end else begin
            iter       <= iter + 1'b1;
            iter_total <= iter_total + 1'b1;
            dec_bits   <= hard_nxt;
            q          <= q_nxt;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
