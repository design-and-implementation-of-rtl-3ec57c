// dvc_decoder: Wyner-Ziv frame decoder of a distributed video codec.
//
// The encoder sends, for each Wyner-Ziv (WZ) frame, its own block motion
// vectors and the accumulated LDPCA syndromes of the bit planes of the
// quantised transform-domain residue between the WZ frame and the previous
// key frame compensated with those vectors. Key frames are decoded
// elsewhere and loaded into the key-frame buffers. This block rebuilds the
// WZ frame in eight frame-level steps; as in the described system only one
// step runs at a time and owns the frame memories:
//   1. WVMF   spatial smoothing of the encoder vectors (wvmf)
//   2. MCF    previous key frame compensated with +mv        (motion_comp)
//   3. MCB    next key frame compensated with -mv            (motion_comp)
//   4. INTERP side information = rounded mean of 2 and 3     (interpolation)
//   5. MCK    previous key frame compensated with the encoder vectors
//   6. FQ     per 4x4 block: side-information residue SI - MCK, forward
//             transform and quantisation (transform_quant, sel = 1); the
//             levels are stored band by band
//   7. LDPC   per band, bit plane (most significant first) and codeword of
//             N = 66*G coefficients: soft input from the side-information
//             bit (soft_input), syndromes from the syndrome buffer, LDPCA
//             decoding (ldpca_decoder), decoded bits written to the WZ
//             level buffer
//   8. IQ     per 4x4 block: de-quantisation and inverse transform
//             (transform_quant, sel = 0), then reconstruction of
//             MCK + residue (reconstruction) into the output frame.
// A quantised level is coded in NBP = 4 bit planes as the offset value
// u = level + 8, clamped to 0..15.
//
// The set of steps and their order follow the described decoder and data
// flow. The memory map, the host load port, the band-major coefficient
// layout, the offset-binary bit planes and the per-step engines in this
// module are this design's own. The key frames come from an H.264 intra
// decoder and entropy-coded (CAVLC) bands are not part of this block: all
// bands are channel coded.
//
// Host port: host_mem selects 0 previous key frame, 1 next key frame,
// 2 encoder vectors ({x, y} in the low 2*MVW bits), 3 syndrome words (32
// accumulated syndrome bits per word, bit i of word j = syndrome 32*j + i,
// SYNW words per codeword, codewords ordered band, plane from the top,
// codeword). Pulse start; done pulses at the end; the output frame is then
// read through out_rd_addr / out_rd_data (one cycle latency).
module dvc_decoder
  import dvc_pkg::*;
  import ldpca_pkg::*;
#(
  parameter int FW       = FRAME_W,
  parameter int FH       = FRAME_H,
  parameter int BS       = MV_BLK,
  parameter int G        = 6,          // LDPCA groups: code length 66*G
  parameter int MAX_ITER = 40,
  localparam int NPIX    = FW * FH,
  localparam int AW      = $clog2(NPIX),
  localparam int NB      = (FW / BS) * (FH / BS),
  localparam int BW      = $clog2(NB),
  localparam int N       = GROUP * G,
  localparam int NBLK4   = (FW / 4) * (FH / 4),
  localparam int NCW     = NBLK4 / N,  // codewords per band and plane
  localparam int NBP     = 4,
  localparam int SYNW    = (N + 31) / 32,
  localparam int NSYN    = 16 * NBP * NCW * SYNW,
  localparam int CAW     = $clog2(16 * NBLK4)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_we,
  input  logic [1:0]        host_mem,
  input  logic [15:0]       host_addr,
  input  logic [31:0]       host_wdata,
  input  logic              start,
  input  logic [5:0]        qp,
  input  logic [2:0]        alpha_idx,
  input  logic [RATE_W-1:0] rate_init,
  output logic              busy,
  output logic              done,
  output logic [3:0]        phase,
  input  logic [AW-1:0]     out_rd_addr,
  output pixel_t            out_rd_data,
  output logic [15:0]       stat_codewords,
  output logic [15:0]       stat_rate_raised,
  output logic [15:0]       stat_failed,
  output logic [31:0]       stat_syn_bits,
  output logic [31:0]       stat_iters
);
  localparam int OFF = 1 << (NBP - 1);
  localparam int W_LLR = 6;            // LLR width of the soft input

  typedef enum logic [3:0] {
    P_IDLE, P_WVMF, P_MCF, P_MCB, P_INTERP, P_MCK, P_FQ, P_LDPC, P_IQ
  } phase_t;
  phase_t ph;
  logic   ph_start;                   // first cycle of a phase
  assign phase = ph;
  assign busy  = (ph != P_IDLE);

  // ------------------------------------------------------------------
  // frame memories
  // ------------------------------------------------------------------
  logic          kp_we, kn_we, mvi_we, mvs_we, f_we, b_we, si_we, mck_we, out_we;
  logic [AW-1:0] kp_wa, kn_wa, f_wa, b_wa, si_wa, mck_wa, out_wa;
  logic [BW-1:0] mvi_wa, mvs_wa;
  pixel_t        kp_wd, kn_wd, f_wd, b_wd, si_wd, mck_wd, out_wd;
  mv_t           mvi_wd, mvs_wd;
  logic [AW-1:0] kp_ra, kp_rb, kn_ra, kn_rb, f_ra, b_ra, si_ra, mck_ra;
  pixel_t        kp_da, kp_db, kn_da, kn_db, f_da, b_da, si_da, mck_da;
  logic [BW-1:0] mvi_ra, mvs_ra;
  mv_t           mvi_da, mvs_da;
  pixel_t        unused_p [6];
  mv_t           unused_mv [2];

  frame_mem #(.DW(8), .DEPTH(NPIX)) u_key_prev (.clk, .we(kp_we), .wr_addr(kp_wa), .wr_data(kp_wd),
    .rd_addr_a(kp_ra), .rd_data_a(kp_da), .rd_addr_b(kp_rb), .rd_data_b(kp_db));
  frame_mem #(.DW(8), .DEPTH(NPIX)) u_key_next (.clk, .we(kn_we), .wr_addr(kn_wa), .wr_data(kn_wd),
    .rd_addr_a(kn_ra), .rd_data_a(kn_da), .rd_addr_b(kn_rb), .rd_data_b(kn_db));
  frame_mem #(.DW(2*MVW), .DEPTH(NB)) u_mv_in (.clk, .we(mvi_we), .wr_addr(mvi_wa), .wr_data(mvi_wd),
    .rd_addr_a(mvi_ra), .rd_data_a(mvi_da), .rd_addr_b(mvi_ra), .rd_data_b(unused_mv[0]));
  frame_mem #(.DW(2*MVW), .DEPTH(NB)) u_mv_smooth (.clk, .we(mvs_we), .wr_addr(mvs_wa), .wr_data(mvs_wd),
    .rd_addr_a(mvs_ra), .rd_data_a(mvs_da), .rd_addr_b(mvs_ra), .rd_data_b(unused_mv[1]));
  frame_mem #(.DW(8), .DEPTH(NPIX)) u_fwd (.clk, .we(f_we), .wr_addr(f_wa), .wr_data(f_wd),
    .rd_addr_a(f_ra), .rd_data_a(f_da), .rd_addr_b(f_ra), .rd_data_b(unused_p[0]));
  frame_mem #(.DW(8), .DEPTH(NPIX)) u_bwd (.clk, .we(b_we), .wr_addr(b_wa), .wr_data(b_wd),
    .rd_addr_a(b_ra), .rd_data_a(b_da), .rd_addr_b(b_ra), .rd_data_b(unused_p[1]));
  frame_mem #(.DW(8), .DEPTH(NPIX)) u_si_frame (.clk, .we(si_we), .wr_addr(si_wa), .wr_data(si_wd),
    .rd_addr_a(si_ra), .rd_data_a(si_da), .rd_addr_b(si_ra), .rd_data_b(unused_p[2]));
  frame_mem #(.DW(8), .DEPTH(NPIX)) u_mck (.clk, .we(mck_we), .wr_addr(mck_wa), .wr_data(mck_wd),
    .rd_addr_a(mck_ra), .rd_data_a(mck_da), .rd_addr_b(mck_ra), .rd_data_b(unused_p[3]));
  frame_mem #(.DW(8), .DEPTH(NPIX)) u_out (.clk, .we(out_we), .wr_addr(out_wa), .wr_data(out_wd),
    .rd_addr_a(out_rd_addr), .rd_data_a(out_rd_data), .rd_addr_b(out_rd_addr), .rd_data_b(unused_p[4]));

  // transform-domain buffers: side-information levels, decoded WZ values
  logic                 sc_we, wz_we, syn_we;
  logic [CAW-1:0]       sc_wa, sc_ra, wz_wa, wz_ra;
  logic signed [15:0]   sc_wd, sc_da, sc_unused;
  logic [NBP-1:0]       wz_wd, wz_da, wz_unused;
  logic [$clog2(NSYN)-1:0] syn_wa, syn_ra;
  logic [31:0]          syn_da, syn_unused;

  frame_mem #(.DW(16), .DEPTH(16 * NBLK4)) u_si_coef (.clk, .we(sc_we), .wr_addr(sc_wa), .wr_data(sc_wd),
    .rd_addr_a(sc_ra), .rd_data_a(sc_da), .rd_addr_b(sc_ra), .rd_data_b(sc_unused));
  frame_mem #(.DW(NBP), .DEPTH(16 * NBLK4)) u_wz_coef (.clk, .we(wz_we), .wr_addr(wz_wa), .wr_data(wz_wd),
    .rd_addr_a(wz_ra), .rd_data_a(wz_da), .rd_addr_b(wz_ra), .rd_data_b(wz_unused));
  frame_mem #(.DW(32), .DEPTH(NSYN)) u_syn (.clk, .we(syn_we), .wr_addr(syn_wa), .wr_data(host_wdata),
    .rd_addr_a(syn_ra), .rd_data_a(syn_da), .rd_addr_b(syn_ra), .rd_data_b(syn_unused));

  // host writes
  assign kp_we  = host_we && host_mem == 2'd0 && !busy;
  assign kn_we  = host_we && host_mem == 2'd1 && !busy;
  assign mvi_we = host_we && host_mem == 2'd2 && !busy;
  assign syn_we = host_we && host_mem == 2'd3 && !busy;
  assign kp_wa  = AW'(host_addr);
  assign kn_wa  = AW'(host_addr);
  assign mvi_wa = BW'(host_addr);
  assign syn_wa = $bits(syn_wa)'(host_addr);
  assign kp_wd  = host_wdata[7:0];
  assign kn_wd  = host_wdata[7:0];
  assign mvi_wd = host_wdata[2*MVW-1:0];

  // ------------------------------------------------------------------
  // side information creation engines
  // ------------------------------------------------------------------
  logic          wv_busy, wv_done, wv_we;
  logic [BW-1:0] wv_mv_ra, wv_wa;
  logic [AW-1:0] wv_pa, wv_na;
  mv_t           wv_mv;

  wvmf #(.FW(FW), .FH(FH), .BS(BS)) u_wvmf (
    .clk, .rst_n, .start(ph_start && ph == P_WVMF), .busy(wv_busy), .done(wv_done),
    .mv_rd_addr(wv_mv_ra), .mv_rd_data(mvi_da),
    .prev_addr(wv_pa), .prev_data(kp_db), .next_addr(wv_na), .next_data(kn_db),
    .out_we(wv_we), .out_addr(wv_wa), .out_mv(wv_mv)
  );
  assign kp_rb  = wv_pa;
  assign kn_rb  = wv_na;
  assign mvs_we = wv_we;
  assign mvs_wa = wv_wa;
  assign mvs_wd = wv_mv;

  logic          mc_busy, mc_done, mc_we;
  logic [BW-1:0] mc_mva;
  logic [AW-1:0] mc_ra, mc_wa;
  pixel_t        mc_wd, mc_ref;
  mv_t           mc_mv;
  logic          mc_phase;

  assign mc_phase = (ph == P_MCF) || (ph == P_MCB) || (ph == P_MCK);
  assign mc_mv    = (ph == P_MCK) ? mvi_da : mvs_da;
  assign mc_ref   = (ph == P_MCB) ? kn_da : kp_da;

  motion_comp #(.FW(FW), .FH(FH), .BS(BS)) u_mc (
    .clk, .rst_n, .start(ph_start && mc_phase), .neg(ph == P_MCB),
    .busy(mc_busy), .done(mc_done),
    .mv_addr(mc_mva), .mv_data(mc_mv), .ref_addr(mc_ra), .ref_data(mc_ref),
    .wr_en(mc_we), .wr_addr(mc_wa), .wr_data(mc_wd)
  );
  assign mvi_ra = (ph == P_WVMF) ? wv_mv_ra : mc_mva;
  assign mvs_ra = mc_mva;
  assign kp_ra  = mc_ra;
  assign kn_ra  = mc_ra;
  assign f_we   = mc_we && ph == P_MCF;
  assign b_we   = mc_we && ph == P_MCB;
  assign mck_we = mc_we && ph == P_MCK;
  assign f_wa = mc_wa;  assign b_wa = mc_wa;  assign mck_wa = mc_wa;
  assign f_wd = mc_wd;  assign b_wd = mc_wd;  assign mck_wd = mc_wd;

  logic          ip_busy, ip_done;
  logic [AW-1:0] ip_ra;
  interpolation #(.NPIX(NPIX)) u_interp (
    .clk, .rst_n, .start(ph_start && ph == P_INTERP), .busy(ip_busy), .done(ip_done),
    .rd_addr(ip_ra), .p_forward(f_da), .p_backward(b_da),
    .wr_en(si_we), .wr_addr(si_wa), .p_interp(si_wd)
  );
  assign f_ra = ip_ra;
  assign b_ra = ip_ra;

  // ------------------------------------------------------------------
  // transform / quantisation and reconstruction (steps 6 and 8)
  // ------------------------------------------------------------------
  logic               tq_in_valid, tq_out_valid;
  logic signed [15:0] tq_din [16];
  logic signed [15:0] tq_dout [16];

  transform_quant u_tq (
    .clk, .rst_n, .in_valid(tq_in_valid), .sel(ph == P_FQ), .qp(qp),
    .din(tq_din), .out_valid(tq_out_valid), .dout(tq_dout)
  );

  logic         rc_load, rc_mc_valid, rc_out_valid;
  pixel_t       rc_pixel;
  logic [3:0]   rc_index;
  reconstruction u_rec (
    .clk, .rst_n, .load(rc_load), .residue(tq_dout), .mc_valid(rc_mc_valid),
    .mc_pixel(mck_da), .out_valid(rc_out_valid), .rec_pixel(rc_pixel), .out_index(rc_index)
  );

  // block engine shared by FQ and IQ: read 16, transform, then write 16
  typedef enum logic [2:0] {B_READ, B_XFORM, B_WAIT, B_WRITE, B_NEXT} beng_t;
  beng_t          bs;
  logic [15:0]    blk;                // 4x4 block index
  logic [4:0]     k;                  // element counter (read side)
  logic           rd_vld;
  logic [3:0]     rd_k;
  logic signed [15:0] blkbuf [16];
  logic [4:0]     wk;                 // element counter (write side)
  logic           fq_active, iq_active;
  logic [AW-1:0]  blk_pix_addr, rc_pix_addr, rc_pix_addr_req;
  logic [3:0]     rc_req_k;

  function automatic logic [AW-1:0] pix_addr(logic [15:0] b, logic [3:0] e);
    int bx, by;
    bx = int'(b) % (FW / 4);
    by = int'(b) / (FW / 4);
    return AW'((by * 4 + int'(e) / 4) * FW + bx * 4 + int'(e) % 4);
  endfunction

  function automatic logic [CAW-1:0] coef_addr(int band, logic [15:0] b);
    return CAW'(band * NBLK4 + int'(b));
  endfunction

  assign fq_active = (ph == P_FQ);
  assign iq_active = (ph == P_IQ);
  assign blk_pix_addr = pix_addr(blk, k[3:0]);
  assign rc_pix_addr  = pix_addr(blk, rc_index);
  assign rc_pix_addr_req = pix_addr(blk, rc_req_k);

  assign si_ra = blk_pix_addr;
  assign tq_din = blkbuf;

  // ------------------------------------------------------------------
  // LDPCA step (7)
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {L_READ, L_DEC, L_WAIT, L_WRITE, L_NEXT} leng_t;
  leng_t                 ls;
  logic [4:0]            band;
  logic [1:0]            plane;
  logic [15:0]           cw;
  logic [15:0]           li;          // coefficient index within codeword
  logic                  l_rd_vld;
  logic [15:0]           l_rd_i;
  logic signed [W_LLR-1:0] llr_buf [N];
  logic [SYNW*32-1:0]    syn_buf;
  logic                  si_in_valid, si_out_valid;
  logic                  si_bit;
  logic [15:0]           si_i_d;
  logic [8:0]            si_p0, si_p1;
  logic signed [5:0]     si_llr;
  logic                  ld_start, ld_busy, ld_done, ld_success;
  logic [RATE_W-1:0]     ld_rate;
  logic [15:0]           ld_iters;
  logic [N-1:0]          ld_bits;
  logic [15:0]           wi;          // write-back index
  logic                  w_rd_vld;
  logic [15:0]           w_rd_i;
  logic signed [16:0]    u_si;

  soft_input u_soft (
    .clk, .rst_n, .in_valid(si_in_valid), .si_bit(si_bit), .plane(plane), .alpha_idx(alpha_idx),
    .out_valid(si_out_valid), .p0(si_p0), .p1(si_p1), .llr(si_llr)
  );

  ldpca_decoder #(.G(G), .W(W_LLR), .MAX_ITER(MAX_ITER)) u_ldpca (
    .clk, .rst_n, .start(ld_start), .rate_init(rate_init), .llr_in(llr_buf),
    .acc_syn_in(syn_buf[N-1:0]), .busy(ld_busy), .done(ld_done), .success(ld_success),
    .rate(ld_rate), .iter_total(ld_iters), .dec_bits(ld_bits)
  );

  // side-information value in offset binary, clamped to the plane range
  always_comb begin
    u_si = 17'(sc_da) + 17'(OFF);
    if (u_si < 0) u_si = '0;
    if (u_si > 17'(2*OFF - 1)) u_si = 17'(2*OFF - 1);
    si_bit = u_si[plane];
  end
  assign si_in_valid = l_rd_vld;

  logic [CAW-1:0] l_coef_base;
  assign l_coef_base = CAW'(int'(band) * NBLK4 + int'(cw) * N);
  assign syn_ra = $bits(syn_ra)'(((int'(band) * NBP + (NBP - 1 - int'(plane))) * NCW + int'(cw)) * SYNW
                                 + ((int'(li) < SYNW) ? int'(li) : 0));

  // coefficient buffer addresses and writes (FQ writes sc, LDPC/IQ use wz)
  always_comb begin
    sc_ra = l_coef_base + CAW'(li);
    wz_ra = iq_active ? coef_addr(int'(k[3:0]), blk) : (l_coef_base + CAW'(wi));
    mck_ra = iq_active ? rc_pix_addr_req : blk_pix_addr;
  end


  // output frame writes from reconstruction
  assign out_we = rc_out_valid;
  assign out_wa = rc_pix_addr;
  assign out_wd = rc_pixel;

  // ------------------------------------------------------------------
  // sequencer and the FQ / LDPC / IQ engines
  // ------------------------------------------------------------------
  logic sub_done;
  assign sub_done = wv_done || mc_done || ip_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= P_IDLE;
      ph_start <= 1'b0;
      done <= 1'b0;
      bs <= B_READ; blk <= '0; k <= '0; rd_vld <= 1'b0; rd_k <= '0; wk <= '0;
      ls <= L_READ; band <= '0; plane <= '0; cw <= '0; li <= '0;
      l_rd_vld <= 1'b0; l_rd_i <= '0; si_i_d <= '0; ld_start <= 1'b0;
      wi <= '0; w_rd_vld <= 1'b0; w_rd_i <= '0;
      syn_buf <= '0;
      tq_in_valid <= 1'b0;
      rc_load <= 1'b0; rc_mc_valid <= 1'b0; rc_req_k <= '0;
      sc_we <= 1'b0; sc_wa <= '0; sc_wd <= '0;
      wz_we <= 1'b0; wz_wa <= '0; wz_wd <= '0;
      stat_codewords <= '0; stat_rate_raised <= '0; stat_failed <= '0;
      stat_syn_bits <= '0; stat_iters <= '0;
      for (int i = 0; i < 16; i++) blkbuf[i] <= '0;
      for (int i = 0; i < N; i++) llr_buf[i] <= '0;
    end else begin
      done        <= 1'b0;
      ph_start    <= 1'b0;
      tq_in_valid <= 1'b0;
      rc_load     <= 1'b0;
      rc_mc_valid <= 1'b0;
      sc_we       <= 1'b0;
      wz_we       <= 1'b0;
      ld_start    <= 1'b0;
      rd_vld      <= 1'b0;
      l_rd_vld    <= 1'b0;
      w_rd_vld    <= 1'b0;

      case (ph)
        P_IDLE: if (start) begin
          ph <= P_WVMF; ph_start <= 1'b1;
          stat_codewords <= '0; stat_rate_raised <= '0; stat_failed <= '0;
          stat_syn_bits <= '0; stat_iters <= '0;
        end
        P_WVMF:   if (sub_done) begin ph <= P_MCF;    ph_start <= 1'b1; end
        P_MCF:    if (sub_done) begin ph <= P_MCB;    ph_start <= 1'b1; end
        P_MCB:    if (sub_done) begin ph <= P_INTERP; ph_start <= 1'b1; end
        P_INTERP: if (sub_done) begin ph <= P_MCK;    ph_start <= 1'b1; end
        P_MCK: if (sub_done) begin
          ph <= P_FQ; bs <= B_READ; blk <= '0; k <= '0;
        end

        // ---- step 6: SI residue -> forward transform + quantisation
        P_FQ: begin
          case (bs)
            B_READ: begin
              if (k < 5'd16) begin
                rd_vld <= 1'b1; rd_k <= k[3:0]; k <= k + 1'b1;
              end else if (!rd_vld) begin
                bs <= B_XFORM;
              end
            end
            B_XFORM: begin tq_in_valid <= 1'b1; bs <= B_WAIT; end
            B_WAIT: if (tq_out_valid) begin bs <= B_WRITE; wk <= '0; end
            B_WRITE: begin
              sc_we <= 1'b1;
              sc_wa <= coef_addr(int'(wk[3:0]), blk);
              sc_wd <= tq_dout[wk[3:0]];
              if (wk == 5'd15) bs <= B_NEXT;
              wk <= wk + 1'b1;
            end
            default: begin
              k <= '0; bs <= B_READ;
              if (blk == 16'(NBLK4 - 1)) begin
                ph <= P_LDPC; ls <= L_READ; band <= '0; plane <= 2'(NBP - 1);
                cw <= '0; li <= '0;
              end else begin
                blk <= blk + 1'b1;
              end
            end
          endcase
          if (rd_vld) blkbuf[rd_k] <= 16'(signed'({8'd0, si_da})) - 16'(signed'({8'd0, mck_da}));
        end

        // ---- step 7: soft input, LDPCA decoding, write-back
        P_LDPC: begin
          case (ls)
            L_READ: begin
              if (li < 16'(N)) begin
                l_rd_vld <= 1'b1; l_rd_i <= li; li <= li + 1'b1;
              end else if (!l_rd_vld && !si_out_valid) begin
                ls <= L_DEC; ld_start <= 1'b1;
              end
              if (l_rd_vld && l_rd_i < 16'(SYNW)) syn_buf[int'(l_rd_i)*32 +: 32] <= syn_da;
            end
            L_DEC: ls <= L_WAIT;
            L_WAIT: if (ld_done) begin
              stat_codewords <= stat_codewords + 1'b1;
              stat_iters     <= stat_iters + 32'(ld_iters);
              stat_syn_bits  <= stat_syn_bits + 32'(ld_rate) * 32'(G);
              if (ld_rate != rate_init) stat_rate_raised <= stat_rate_raised + 1'b1;
              if (!ld_success) stat_failed <= stat_failed + 1'b1;
              ls <= L_WRITE; wi <= '0;
            end
            L_WRITE: begin
              if (wi < 16'(N)) begin
                w_rd_vld <= 1'b1; w_rd_i <= wi; wi <= wi + 1'b1;
              end else if (!w_rd_vld) begin
                ls <= L_NEXT;
              end
              if (w_rd_vld) begin
                logic [NBP-1:0] u;
                u = (plane == 2'(NBP - 1)) ? '0 : wz_da;
                u[plane] = ld_bits[w_rd_i];
                wz_we <= 1'b1;
                wz_wa <= l_coef_base + CAW'(w_rd_i);
                wz_wd <= u;
              end
            end
            default: begin
              ls <= L_READ; li <= '0;
              if (cw == 16'(NCW - 1)) begin
                cw <= '0;
                if (plane == 2'd0) begin
                  plane <= 2'(NBP - 1);
                  if (band == 5'd15) begin
                    ph <= P_IQ; bs <= B_READ; blk <= '0; k <= '0;
                  end else begin
                    band <= band + 1'b1;
                  end
                end else begin
                  plane <= plane - 1'b1;
                end
              end else begin
                cw <= cw + 1'b1;
              end
            end
          endcase
          if (l_rd_vld) si_i_d <= l_rd_i;
          if (si_out_valid) llr_buf[int'(si_i_d)] <= si_llr;
        end

        // ---- step 8: de-quantisation, inverse transform, reconstruction
        P_IQ: begin
          case (bs)
            B_READ: begin
              if (k < 5'd16) begin
                rd_vld <= 1'b1; rd_k <= k[3:0]; k <= k + 1'b1;
              end else if (!rd_vld) begin
                bs <= B_XFORM;
              end
            end
            B_XFORM: begin tq_in_valid <= 1'b1; bs <= B_WAIT; end
            B_WAIT: if (tq_out_valid) begin
              rc_load <= 1'b1; bs <= B_WRITE; wk <= '0; rc_req_k <= '0;
            end
            B_WRITE: begin
              // request compensated pixels; they reach the adder a cycle later
              if (wk < 5'd16) begin
                rc_req_k <= wk[3:0];
                wk <= wk + 1'b1;
              end
              if (wk >= 5'd1 && wk <= 5'd16) rc_mc_valid <= 1'b1;
              if (wk == 5'd16) begin
                bs <= B_NEXT;
              end
            end
            default: begin
              if (!rc_out_valid) begin
                k <= '0; bs <= B_READ;
                if (blk == 16'(NBLK4 - 1)) begin
                  ph <= P_IDLE; done <= 1'b1;
                end else begin
                  blk <= blk + 1'b1;
                end
              end
            end
          endcase
          if (rd_vld) blkbuf[rd_k] <= 16'(signed'({1'b0, wz_da})) - 16'(OFF);
        end
        default: ph <= P_IDLE;
      endcase
    end
  end
endmodule
