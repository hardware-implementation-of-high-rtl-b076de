// tb_saber_polymul_k4: end-to-end test of the polynomial multiplier in the K = 4 configuration at full degree (N = 256).
// Each operation loads a secret polynomial G (highest coefficient first), feeds D
// in chunks of K coefficients on request, and compares every serial output
// coefficient with W = G*D mod (x^N + 1, 2^13) from a schoolbook negacyclic
// convolution computed here. Operations cycle through the secret ranges of the
// three Saber levels ([-5,5], [-4,4], [-3,3]), 13-bit and 10-bit D, and an
// extreme case (all secrets -5 or +5, D = 2^13-1). Operations run back to back
// without reset. Checked as well: N load, N/K compute and N output cycles per
// operation, the latency from start to the first output (1 + N + N/K), and that
// each mechanism occurred: negative secrets (sign carry-ins), negative values
// passing the CSR sign inverters, a non-zero row folded by the final modulo, and
// an accumulator restart by a following operation.
module tb_saber_polymul_k4;
  import saber_pkg::*;

  localparam int N   = 256;
  localparam int K   = 4;
  localparam int OPS = 4;
  localparam int CW  = $clog2(N + 1);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, start;
  gcoef_t        g_in;
  coef_t         d_in [K];
  logic          g_ready, d_ready, w_valid, busy, done;
  logic [CW-1:0] d_idx, w_idx;
  coef_t         w_out;
  phase_e        phase;

  saber_polymul #(.N(256), .K(4)) dut (
    .clk, .rst_n, .start, .g_in, .d_in, .g_ready, .d_ready, .d_idx,
    .w_out, .w_valid, .w_idx, .busy, .done, .phase
  );

  int g [N];
  int d [N];
  int w [N];

  int n_load, n_comp, n_out, n_neg_secret, n_si_neg, n_fold, n_restart;

  task automatic expect_ok(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic make_operands(int op);
    int mode = op % 4;
    int gmax = (mode == 0) ? 5 : (mode == 1) ? 4 : 3;
    for (int i = 0; i < N; i++) begin
      if (mode == 3) begin
        g[i] = ((op / 4) % 2 == 0) ? -5 : 5;
        d[i] = 8191;
      end else begin
        g[i] = int'($urandom_range(0, 2 * gmax)) - gmax;
        d[i] = (mode == 2) ? int'($urandom_range(0, 1023)) : int'($urandom_range(0, 8191));
      end
    end
    for (int i = 0; i < N; i++) begin
      longint acc = 0;
      for (int j = 0; j < N; j++) begin
        if (j <= i) acc += longint'(g[j]) * d[i - j];
        else        acc -= longint'(g[j]) * d[N + i - j];
      end
      w[i] = int'(((acc % 8192) + 8192) % 8192);
    end
    for (int i = 0; i < N; i++) if (g[i] < 0) n_neg_secret++;
  endtask

  task automatic run_op(int op);
    int cyc = 0, first_out = -1, lt = 0, ot = 0, cc = 0;
    make_operands(op);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      if (g_ready) begin g_in = gcoef_t'(g[N-1-lt]); lt++; n_load++; end
      if (d_ready) begin
        for (int t = 0; t < K; t++) d_in[t] = coef_t'(d[K * int'(d_idx) + t]);
        cc++; n_comp++;
        if (dut.g_par[N-1] < 0) n_si_neg++;
        if (dut.y[N] != '0 || dut.c[N]) n_fold++;
      end
      if (w_valid) begin
        if (first_out < 0) first_out = cyc;
        expect_ok("output order", int'(w_idx) == N - 1 - ot);
        checks++;
        if (int'(w_out) != w[w_idx]) begin
          failures++;
          $display("FAIL op %0d w[%0d] got=%0d exp=%0d", op, w_idx, w_out, w[w_idx]);
        end
        ot++; n_out++;
      end
      @(negedge clk);
      cyc++;
      if (cyc > 4 * N + 10) break;
    end
    // the done cycle carries the last output
    if (w_valid) begin
      checks++;
      if (int'(w_out) != w[w_idx]) begin
        failures++;
        $display("FAIL op %0d w[%0d] got=%0d exp=%0d", op, w_idx, w_out, w[w_idx]);
      end
      ot++; n_out++;
    end
    expect_ok("load cycles", lt == N);
    expect_ok("compute cycles = N/K", cc == N / K);
    expect_ok("output cycles", ot == N);
    expect_ok("latency to first output", first_out == 1 + N + N / K);
    if (op > 0) n_restart++;
  endtask

  initial begin
    rst_n = 0; start = 0; g_in = '0;
    for (int t = 0; t < K; t++) d_in[t] = '0;
    n_load = 0; n_comp = 0; n_out = 0; n_neg_secret = 0; n_si_neg = 0; n_fold = 0; n_restart = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < OPS; op++) run_op(op);
    @(negedge clk);
    expect_ok("idle at end", !busy);
    $display("mechanisms: load=%0d compute=%0d output=%0d negative_secrets=%0d si_negative=%0d fold=%0d restart=%0d",
             n_load, n_comp, n_out, n_neg_secret, n_si_neg, n_fold, n_restart);
    expect_ok("load happened", n_load == OPS * N);
    expect_ok("compute happened", n_comp == OPS * N / K);
    expect_ok("output happened", n_out == OPS * N);
    expect_ok("negative secrets happened", n_neg_secret > 0);
    expect_ok("sign inversion of a negative value happened", n_si_neg > 0);
    expect_ok("final modulo fold happened", n_fold > 0);
    expect_ok("accumulator restart happened", n_restart > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (OPS * (3 * N + 20) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
