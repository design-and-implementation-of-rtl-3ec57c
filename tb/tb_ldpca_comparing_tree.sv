// tb_ldpca_comparing_tree: checks the comparing tree of one 66-node group at
// every code rate from 66/66 to 2/66.
//
// The reference forms the merged check nodes of a rate directly: starting
// from 66 single-node segments, neighbouring segments are merged pairwise,
// level by level, one merge per rate step, until 66-k merges are done. For
// each merged node it sorts all edge magnitudes, XORs the edge signs and the
// plain syndrome bits of the segment, and compares with what each basic
// check node receives. check_ok is tested with hard decisions that do and
// do not satisfy the syndromes.
module tb_ldpca_comparing_tree;
  localparam int GROUP = 66;
  localparam int MW = 5;
  logic [MW-1:0] mag [GROUP][3];
  logic sgn_par [GROUP];
  logic hard_par [GROUP];
  logic [GROUP-1:0] acc_syn;
  logic [6:0] rate;
  logic [MW-1:0] min1 [GROUP];
  logic [MW-1:0] min2 [GROUP];
  logic par [GROUP];
  logic check_ok;
  int checks = 0, failures = 0;
  int merged_seen = 0;

  ldpca_comparing_tree #(.MW(MW)) dut (.*);

  int seg_first [GROUP];
  int seg_last [GROUP];
  int nseg;
  logic [GROUP-1:0] s;

  task automatic build_segments(int k);
    int merges, cnt, n2;
    int f2 [GROUP];
    int l2 [GROUP];
    merges = GROUP - k;
    nseg = GROUP;
    for (int i = 0; i < GROUP; i++) begin seg_first[i] = i; seg_last[i] = i; end
    cnt = 0;
    while (cnt < merges) begin
      n2 = 0;
      for (int j = 0; j < nseg; j += 2) begin
        if (j + 1 < nseg && cnt < merges) begin
          f2[n2] = seg_first[j]; l2[n2] = seg_last[j+1]; n2++; cnt++;
        end else begin
          f2[n2] = seg_first[j]; l2[n2] = seg_last[j]; n2++;
          if (j + 1 < nseg) begin f2[n2] = seg_first[j+1]; l2[n2] = seg_last[j+1]; n2++; end
        end
      end
      nseg = n2;
      for (int i = 0; i < nseg; i++) begin seg_first[i] = f2[i]; seg_last[i] = l2[i]; end
    end
  endtask

  initial begin
    for (int k = 66; k >= 2; k--) begin
      for (int t = 0; t < 3; t++) begin
        logic a;
        rate = 7'(k);
        for (int b = 0; b < GROUP; b++) begin
          for (int e = 0; e < 3; e++) mag[b][e] = MW'($urandom % 32);
          sgn_par[b] = $urandom % 2;
          s[b] = $urandom % 2;
        end
        a = 0;
        for (int b = 0; b < GROUP; b++) begin a ^= s[b]; acc_syn[b] = a; end
        // t = 0: hard decisions satisfy every syndrome
        for (int b = 0; b < GROUP; b++) hard_par[b] = (t == 0) ? s[b] : ($urandom % 2);
        if (t == 2) hard_par[$urandom % GROUP] = ~s[0];
        build_segments(k);
        #1;
        begin
          logic ok_ref;
          ok_ref = 1;
          checks++;
          if (nseg != k) begin failures++; $display("FAIL: rate %0d gives %0d segments", k, nseg); end
          for (int i = 0; i < nseg; i++) begin
            int m1r, m2r;
            logic pr, hr;
            m1r = 99; m2r = 99; pr = 0; hr = 0;
            if (seg_last[i] > seg_first[i]) merged_seen++;
            for (int b = seg_first[i]; b <= seg_last[i]; b++) begin
              pr ^= sgn_par[b] ^ s[b];
              hr ^= hard_par[b] ^ s[b];
              for (int e = 0; e < 3; e++) begin
                if (mag[b][e] < m1r) begin m2r = m1r; m1r = mag[b][e]; end
                else if (mag[b][e] < m2r) m2r = mag[b][e];
              end
            end
            if (hr) ok_ref = 0;
            for (int b = seg_first[i]; b <= seg_last[i]; b++) begin
              checks++;
              if (min1[b] != MW'(m1r) || min2[b] != MW'(m2r) || par[b] != pr) begin
                failures++;
                if (failures < 6)
                  $display("FAIL: rate %0d node %0d got %0d/%0d/%0d want %0d/%0d/%0d",
                           k, b, min1[b], min2[b], par[b], m1r, m2r, pr);
              end
            end
          end
          checks++;
          if (check_ok != ok_ref) begin
            failures++;
            $display("FAIL: rate %0d check_ok %0d want %0d", k, check_ok, ok_ref);
          end
          if (t == 0 && !ok_ref) begin failures++; $display("FAIL: reference"); end
        end
      end
    end
    checks++;
    if (merged_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
