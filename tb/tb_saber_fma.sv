// tb_saber_fma: drives the FMA (N = 8) with random MAA rows for N/K cycles, then
// shifts the result out. Every serial output coefficient must equal the sum over
// the cycles of the reduced rows (row n plus its sign bit, minus row N+n plus its
// sign bit for n < K-1), mod 2^13; K = 2 and K = 4. Outputs leave highest first.
module tb_saber_fma;
  import saber_pkg::*;

  localparam int N = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  acc_en, acc_first, shift_en;
  coef_t y2 [N+1];
  logic  c2 [N+1];
  coef_t y4 [N+3];
  logic  c4 [N+3];
  coef_t w2, w4;
  coef_t q2 [N];
  coef_t q4 [N];
  int    e2 [N];
  int    e4 [N];

  saber_fma #(.N(N), .K(2)) dut2 (.clk, .acc_en, .acc_first, .shift_en, .y(y2), .c(c2),
                                  .w_out(w2), .acc_q(q2));
  saber_fma #(.N(N), .K(4)) dut4 (.clk, .acc_en, .acc_first, .shift_en, .y(y4), .c(c4),
                                  .w_out(w4), .acc_q(q4));

  function automatic int md(int v); return ((v % 8192) + 8192) % 8192; endfunction

  initial begin
    acc_en = 0; acc_first = 0; shift_en = 0;
    repeat (10) begin
      for (int n = 0; n < N; n++) begin e2[n] = 0; e4[n] = 0; end
      for (int j = 0; j < N / 2; j++) begin
        @(negedge clk);
        acc_en = 1; acc_first = (j == 0); shift_en = 0;
        for (int r = 0; r < N + 1; r++) begin y2[r] = coef_t'($urandom); c2[r] = 1'($urandom); end
        for (int r = 0; r < N + 3; r++) begin y4[r] = coef_t'($urandom); c4[r] = 1'($urandom); end
        for (int n = 0; n < N; n++) begin
          e2[n] = md(e2[n] + int'(y2[n]) + int'(c2[n]) - ((n < 1) ? int'(y2[N+n]) + int'(c2[N+n]) : 0));
          if (j < N / 4)
            e4[n] = md(e4[n] + int'(y4[n]) + int'(c4[n]) - ((n < 3) ? int'(y4[N+n]) + int'(c4[N+n]) : 0));
        end
        // the K = 4 instance accumulates only N/4 cycles: stop it by zero rows after
        if (j >= N / 4) begin
          for (int r = 0; r < N + 3; r++) begin y4[r] = '0; c4[r] = 1'b0; end
          for (int r = N; r < N + 3; r++) begin y4[r] = '1; c4[r] = 1'b1; end
        end
      end
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        acc_en = 0; acc_first = 0;
        checks += 2;
        if (int'(w2) != e2[N-1-t]) begin
          failures++; $display("FAIL fma K=2 w[%0d] got=%0d exp=%0d", N-1-t, w2, e2[N-1-t]);
        end
        if (int'(w4) != e4[N-1-t]) begin
          failures++; $display("FAIL fma K=4 w[%0d] got=%0d exp=%0d", N-1-t, w4, e4[N-1-t]);
        end
        shift_en = 1;  // move the next lower coefficient to the output
      end
      @(negedge clk);
      shift_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
