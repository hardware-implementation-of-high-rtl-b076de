// tb_saber_maa: the MAA rows, each completed by its pending sign bit, must equal
// the coefficients of the plain (unreduced) product G*D_j computed here as a
// schoolbook convolution, for K = 2 and K = 4 at N = 8 with random secrets in
// [-5,5] and random 13-bit D coefficients.
module tb_saber_maa;
  import saber_pkg::*;

  localparam int N = 8;

  int checks = 0, failures = 0;
  gcoef_t g  [N];
  coef_t  d2 [2];
  coef_t  d4 [4];
  coef_t  y2 [N+1];
  logic   c2 [N+1];
  coef_t  y4 [N+3];
  logic   c4 [N+3];

  saber_maa #(.N(N), .K(2)) dut2 (.g(g), .d(d2), .y(y2), .c(c2));
  saber_maa #(.N(N), .K(4)) dut4 (.g(g), .d(d4), .y(y4), .c(c4));

  function automatic int gi(int i); return int'(g[i]); endfunction

  initial begin
    repeat (300) begin
      for (int i = 0; i < N; i++) g[i] = gcoef_t'($urandom_range(0, 10) - 5);
      for (int t = 0; t < 2; t++) d2[t] = coef_t'($urandom_range(0, 8191));
      for (int t = 0; t < 4; t++) d4[t] = coef_t'($urandom_range(0, 8191));
      #1;
      for (int r = 0; r < N + 1; r++) begin
        int e;
        e = 0;
        for (int t = 0; t < 2; t++) if (r - t >= 0 && r - t < N) e += gi(r - t) * int'(d2[t]);
        e = ((e % 8192) + 8192) % 8192;
        checks++;
        if (int'(coef_t'(y2[r] + coef_t'(c2[r]))) != e) begin
          failures++;
          $display("FAIL maa K=2 row %0d got=%0d exp=%0d", r, y2[r] + coef_t'(c2[r]), e);
        end
      end
      for (int r = 0; r < N + 3; r++) begin
        int e;
        e = 0;
        for (int t = 0; t < 4; t++) if (r - t >= 0 && r - t < N) e += gi(r - t) * int'(d4[t]);
        e = ((e % 8192) + 8192) % 8192;
        checks++;
        if (int'(coef_t'(y4[r] + coef_t'(c4[r]))) != e) begin
          failures++;
          $display("FAIL maa K=4 row %0d got=%0d exp=%0d", r, y4[r] + coef_t'(c4[r]), e);
        end
      end
    end
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
