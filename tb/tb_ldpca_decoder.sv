// tb_ldpca_decoder: self-checking test of the 396-bit LDPCA decoder.
//
// Random source words are syndrome-encoded with the code's own definition
// (edge e of bit v goes to check (A[e]*v + B[e]) mod 396, syndrome bits are
// accumulated in groups of 66) and the decoder gets channel LLRs of a binary
// symmetric channel. Checks: error-free input ends at once with success;
// noisy input at a sufficient rate decodes to the source word; a too-low
// starting rate makes the decoder ask for more syndrome bits; an input with
// no information at all ends in failure at rate 66/66 after exactly
// MAX_ITER iterations per rate tried.
module tb_ldpca_decoder;
  localparam int G = 6;
  localparam int N = 66 * G;
  localparam int W = 6;
  localparam int MAX_ITER = 40;

  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] rate_init;
  logic signed [W-1:0] llr_in [N];
  logic [N-1:0] acc_syn_in;
  logic busy, done, success;
  logic [6:0] rate;
  logic [15:0] iter_total;
  logic [N-1:0] dec_bits;
  int checks = 0, failures = 0;
  int rate_raises = 0;

  ldpca_decoder dut (.*);

  always #5 clk = ~clk;

  function automatic int ea(int e); return (e == 0) ? 1 : (e == 1) ? 7 : 13; endfunction
  function automatic int eb(int e); return (e == 0) ? 0 : (e == 1) ? 1 : 5; endfunction

  logic [N-1:0] src;

  task automatic encode();
    logic [N-1:0] s;
    s = '0;
    for (int v = 0; v < N; v++)
      for (int e = 0; e < 3; e++) s[(ea(e) * v + eb(e)) % N] ^= src[v];
    for (int g = 0; g < G; g++) begin
      logic a;
      a = 1'b0;
      for (int p = 0; p < 66; p++) begin
        a ^= s[g*66 + p];
        acc_syn_in[g*66 + p] = a;
      end
    end
  endtask

  // BSC: flip each bit with probability perr/1000, |LLR| = mag
  task automatic channel(int perr, int mag);
    for (int v = 0; v < N; v++) begin
      logic b;
      b = src[v] ^ (($urandom % 1000) < perr);
      llr_in[v] = b ? W'(mag) : -W'(mag);
    end
  endtask

  task automatic run(input logic [6:0] r0, output int cycles);
    rate_init = r0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cyc, errs;
    rate_init = 66;
    acc_syn_in = '0;
    for (int v = 0; v < N; v++) llr_in[v] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. error-free channel at 66/66: parity holds before any iteration
    for (int v = 0; v < N; v++) src[v] = $urandom % 2;
    encode();
    channel(0, 8);
    run(66, cyc);
    check("clean: success", success);
    check("clean: bits", dec_bits == src);
    check("clean: no iterations", iter_total == 0);
    check("clean: latency 2 cycles", cyc == 2);

    // 2. noisy channel, several words, starting rate 50/66
    for (int t = 0; t < 4; t++) begin
      for (int v = 0; v < N; v++) src[v] = $urandom % 2;
      encode();
      channel(30, 6);
      run(50, cyc);
      errs = 0;
      for (int v = 0; v < N; v++) errs += (dec_bits[v] != src[v]);
      $display("noisy word %0d: success=%0d rate=%0d iters=%0d cycles=%0d bit errors=%0d",
               t, success, rate, iter_total, cyc, errs);
      check("noisy: success", success);
      check("noisy: bits", dec_bits == src);
      if (rate > 50) rate_raises++;
    end

    // 3. rate too low to start with: the decoder must take more syndromes
    for (int v = 0; v < N; v++) src[v] = $urandom % 2;
    encode();
    channel(60, 5);
    run(2, cyc);
    $display("low start: success=%0d rate=%0d iters=%0d", success, rate, iter_total);
    check("low start: rate raised", rate > 2);
    check("low start: success", success);
    check("low start: bits", dec_bits == src);
    if (rate > 2) rate_raises++;

    // 4. no channel information: fails at 66/66 after 3 rates of MAX_ITER
    for (int v = 0; v < N; v++) src[v] = $urandom % 2;
    src[0] = 1'b1;
    encode();
    for (int v = 0; v < N; v++) llr_in[v] = '0;
    run(64, cyc);
    check("no info: failure", !success);
    check("no info: rate 66", rate == 66);
    check("no info: iterations", iter_total == 3 * MAX_ITER);
    check("no info: cycles", cyc == 1 + 3 * (MAX_ITER + 1));
    $display("no info: cycles=%0d iters=%0d", cyc, iter_total);

    check("rate increase seen", rate_raises > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
