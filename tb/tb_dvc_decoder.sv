// tb_dvc_decoder: end-to-end test of the Wyner-Ziv decoder.
//
// The testbench plays the encoder. It builds two key frames and a WZ frame
// from a moving textured pattern, chooses block vectors (true motion, some
// outliers for the smoothing filter, some pointing out of the frame),
// compensates the previous key frame, transforms and quantises the
// residue, splits the offset levels into bit planes and LDPCA-encodes each
// codeword into accumulated syndromes. All of this is loaded through the
// host port; after decoding, the output frame must equal the encoder's
// reconstruction (compensated key frame + de-quantised residue) pixel for
// pixel. The test also counts how often each mechanism happened: every
// decoder step, syndrome-rate increases, vectors changed by the smoothing
// filter, compensation clamped at the frame edge, clipping in the
// reconstruction; each must happen at least once.
module tb_dvc_decoder;
  import dvc_pkg::*;
  localparam int FW = 88, FH = 24, BS = 8, G = 2, MAX_ITER = 40;
  localparam int NPIX = FW * FH, NB = (FW / BS) * (FH / BS), BX = FW / BS;
  localparam int N = 66 * G, NBLK4 = (FW / 4) * (FH / 4), NCW = NBLK4 / N;
  localparam int NBP = 4, OFF = 8, SYNW = (N + 31) / 32;
  localparam int AW = $clog2(NPIX);
  localparam int QP = 16;
  localparam int RATE0 = 40;

  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  logic [1:0] host_mem = 0;
  logic [15:0] host_addr = 0;
  logic [31:0] host_wdata = 0;
  logic start = 0;
  logic [5:0] qp = QP;
  logic [2:0] alpha_idx = 3'd4;
  logic [6:0] rate_init = RATE0;
  logic busy, done;
  logic [3:0] phase;
  logic [AW-1:0] out_rd_addr = 0;
  pixel_t out_rd_data;
  logic [15:0] stat_codewords, stat_rate_raised, stat_failed;
  logic [31:0] stat_syn_bits, stat_iters;

  dvc_decoder #(.FW(FW), .FH(FH), .BS(BS), .G(G), .MAX_ITER(MAX_ITER)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int C [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  int MF [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                    '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  int V [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                   '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  byte unsigned kp [NPIX];
  byte unsigned kn [NPIX];
  byte unsigned wz [NPIX];
  byte unsigned mck [NPIX];
  byte unsigned expo [NPIX];
  int  mvx [NB];
  int  mvy [NB];
  int  ulev [16 * NBLK4];             // offset level per band-major coefficient
  int  n_clamp_mc = 0, n_clip_rec = 0, n_smooth = 0;
  int  phase_seen [16];

  function automatic int cl(int c, int lim);
    return (c < 0) ? 0 : (c > lim - 1) ? lim - 1 : c;
  endfunction
  function automatic int cls(int k);
    int i, j;
    i = k / 4; j = k % 4;
    return (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
  endfunction
  function automatic int pattern(int x, int y);
    return 128 + ((x * 13 + y * 7) % 64) - ((x * y) % 23) + ((x / 3 + y / 5) % 2) * 20;
  endfunction
  function automatic int ea(int e); return (e == 0) ? 1 : (e == 1) ? 7 : 13; endfunction
  function automatic int eb(int e); return (e == 0) ? 0 : (e == 1) ? 1 : 5; endfunction

  task automatic inv1(ref longint a [4]);
    longint e0, e1, e2, e3;
    e0 = a[0] + a[2]; e1 = a[0] - a[2];
    e2 = (a[1] >>> 1) - a[3]; e3 = a[1] + (a[3] >>> 1);
    a[0] = e0 + e3; a[1] = e1 + e2; a[2] = e1 - e2; a[3] = e0 - e3;
  endtask

  task automatic host_write(int m, int a, int d);
    @(negedge clk);
    host_we = 1; host_mem = 2'(m); host_addr = 16'(a); host_wdata = 32'(d);
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic build_encoder_side();
    // frames: texture moving right by 2 per frame interval (WZ halfway)
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        kp[y*FW + x] = 8'(cl(pattern(x, y), 256));
        kn[y*FW + x] = 8'(cl(pattern(x - 2, y) + int'($urandom % 3) - 1, 256));
        wz[y*FW + x] = 8'(cl(pattern(x - 1, y) + int'($urandom % 5) - 2, 256));
      end
    // a dark patch with a fine checker pattern: quantisation error pushes
    // some reconstructed pixels below zero, so the reconstruction clips
    for (int y = 4; y < 12; y++)
      for (int x = 40; x < 56; x++) begin
        kp[y*FW + x] = 8'd1;
        kn[y*FW + x] = 8'd1;
        wz[y*FW + x] = 8'(((x + y) % 2) * 4);
      end
    // encoder vectors: true motion (-1, 0) with outliers and edge vectors
    for (int b = 0; b < NB; b++) begin mvx[b] = -1; mvy[b] = 0; end
    mvx[BX + 3] = 9;  mvy[BX + 3] = -7;       // outlier
    mvx[BX + 6] = -8; mvy[BX + 6] = 6;        // outlier
    mvx[0] = -12;     mvy[0] = -10;           // points outside the frame
    mvx[NB - 1] = 11; mvy[NB - 1] = 9;        // points outside the frame
    // motion-compensated previous key frame
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int b, rx, ry;
        b = (y / BS) * BX + x / BS;
        rx = cl(x + mvx[b], FW); ry = cl(y + mvy[b], FH);
        if (rx != x + mvx[b] || ry != y + mvy[b]) n_clamp_mc++;
        mck[y*FW + x] = kp[ry*FW + rx];
      end
    // residue -> transform -> quantisation -> clamped offset levels
    for (int blk = 0; blk < NBLK4; blk++) begin
      int bx, by;
      int r [16];
      longint m [16];
      longint v [4];
      bx = blk % (FW / 4); by = blk / (FW / 4);
      for (int e = 0; e < 16; e++) begin
        int a;
        a = (by*4 + e/4) * FW + bx*4 + e%4;
        r[e] = int'(wz[a]) - int'(mck[a]);
      end
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          longint s, q, qb;
          int lv;
          s = 0;
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 4; b++) s += C[i][a] * r[4*a + b] * C[j][b];
          qb = 15 + QP / 6;
          q = ((s < 0 ? -s : s) * MF[QP % 6][cls(4*i + j)] + (longint'(1) << qb) / 6) >> qb;
          lv = int'(s < 0 ? -q : q);
          lv = (lv < -OFF) ? -OFF : (lv > OFF - 1) ? OFF - 1 : lv;
          ulev[(4*i + j) * NBLK4 + blk] = lv + OFF;
        end
      // encoder-side reconstruction = expected decoder output
      for (int e = 0; e < 16; e++)
        m[e] = longint'(ulev[e * NBLK4 + blk] - OFF) * V[QP % 6][cls(e)] * (longint'(1) << (QP / 6));
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) v[j] = m[4*i + j];
        inv1(v);
        for (int j = 0; j < 4; j++) m[4*i + j] = v[j];
      end
      for (int j = 0; j < 4; j++) begin
        for (int i = 0; i < 4; i++) v[i] = m[4*i + j];
        inv1(v);
        for (int i = 0; i < 4; i++) m[4*i + j] = v[i];
      end
      for (int e = 0; e < 16; e++) begin
        int a, p;
        a = (by*4 + e/4) * FW + bx*4 + e%4;
        p = int'(mck[a]) + int'((m[e] + 32) >>> 6);
        if (p < 0 || p > 255) n_clip_rec++;
        expo[a] = 8'(cl(p, 256));
      end
    end
  endtask

  task automatic load_all();
    for (int i = 0; i < NPIX; i++) host_write(0, i, kp[i]);
    for (int i = 0; i < NPIX; i++) host_write(1, i, kn[i]);
    for (int b = 0; b < NB; b++) host_write(2, b, (((mvx[b] & 63) << 6) | (mvy[b] & 63)));
    for (int band = 0; band < 16; band++)
      for (int pl = NBP - 1; pl >= 0; pl--)
        for (int cw = 0; cw < NCW; cw++) begin
          logic [N-1:0] src, s, acc;
          logic a;
          int base;
          for (int i = 0; i < N; i++) src[i] = ulev[band * NBLK4 + cw * N + i][pl];
          s = '0;
          for (int v = 0; v < N; v++)
            for (int e = 0; e < 3; e++) s[(ea(e) * v + eb(e)) % N] ^= src[v];
          for (int g = 0; g < G; g++) begin
            a = 0;
            for (int p = 0; p < 66; p++) begin a ^= s[g*66 + p]; acc[g*66 + p] = a; end
          end
          base = ((band * NBP + (NBP - 1 - pl)) * NCW + cw) * SYNW;
          for (int w = 0; w < SYNW; w++) begin
            logic [31:0] word;
            for (int b = 0; b < 32; b++) word[b] = (w*32 + b < N) ? acc[w*32 + b] : 1'b0;
            host_write(3, base + w, int'(word));
          end
        end
  endtask

  always @(posedge clk) phase_seen[phase]++;

  initial begin
    longint cyc;
    int mism;
    for (int i = 0; i < 16; i++) phase_seen[i] = 0;
    build_encoder_side();
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_all();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("decode cycles=%0d codewords=%0d rate_raised=%0d failed=%0d syn_bits=%0d iters=%0d",
             cyc, stat_codewords, stat_rate_raised, stat_failed, stat_syn_bits, stat_iters);
    // read back the output frame
    mism = 0;
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk) out_rd_addr = AW'(i);
      @(negedge clk);
      if (out_rd_data != expo[i]) begin
        mism++;
        if (mism < 5) $display("FAIL pixel %0d: %0d want %0d", i, out_rd_data, expo[i]);
      end
    end
    checks++;
    if (mism != 0) begin failures++; $display("FAIL %0d pixels differ", mism); end
    checks++;
    if (stat_codewords != 16'(16 * NBP * NCW)) failures++;
    checks++;
    if (stat_failed != 0) failures++;
    // vectors changed by the smoothing filter
    for (int b = 0; b < NB; b++) begin
      mv_t m;
      m = dut.u_mv_smooth.mem[b];
      if (int'(m.x) != mvx[b] || int'(m.y) != mvy[b]) n_smooth++;
    end
    $display("mechanisms: rate raises=%0d smoothing changes=%0d mc clamps=%0d rec clips=%0d",
             stat_rate_raised, n_smooth, n_clamp_mc, n_clip_rec);
    checks += 4;
    if (stat_rate_raised == 0) begin failures++; $display("FAIL no rate increase"); end
    if (n_smooth == 0)   begin failures++; $display("FAIL no smoothing"); end
    if (n_clamp_mc == 0) begin failures++; $display("FAIL no clamp"); end
    if (n_clip_rec == 0) begin failures++; $display("FAIL no clip"); end
    for (int p = 1; p <= 8; p++) begin
      checks++;
      if (phase_seen[p] == 0) begin failures++; $display("FAIL phase %0d never ran", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
