// tb_saber_final_mod: with random rows y and pending sign bits c, each output
// (plus its pending sign bit) must equal (y[n]+c[n]) - (y[N+n]+c[N+n]) mod 2^13 for
// the folded rows n < K-1 and y[n]+c[n] for the others; K = 2 and K = 4, N = 8.
module tb_saber_final_mod;
  import saber_pkg::*;

  localparam int N = 8;

  int checks = 0, failures = 0;
  coef_t y2 [N+1];
  logic  c2 [N+1];
  coef_t z2 [N];
  logic  cz2 [N];
  coef_t y4 [N+3];
  logic  c4 [N+3];
  coef_t z4 [N];
  logic  cz4 [N];

  saber_final_mod #(.N(N), .K(2)) dut2 (.y(y2), .c(c2), .z(z2), .cz(cz2));
  saber_final_mod #(.N(N), .K(4)) dut4 (.y(y4), .c(c4), .z(z4), .cz(cz4));

  initial begin
    repeat (300) begin
      for (int r = 0; r < N + 1; r++) begin y2[r] = coef_t'($urandom); c2[r] = 1'($urandom); end
      for (int r = 0; r < N + 3; r++) begin y4[r] = coef_t'($urandom); c4[r] = 1'($urandom); end
      #1;
      for (int n = 0; n < N; n++) begin
        int e;
        e = int'(y2[n]) + int'(c2[n]);
        if (n < 1) e -= int'(y2[N+n]) + int'(c2[N+n]);
        e = ((e % 8192) + 8192) % 8192;
        checks++;
        if (int'(coef_t'(z2[n] + coef_t'(cz2[n]))) != e) begin
          failures++;
          $display("FAIL fold K=2 n=%0d", n);
        end
        e = int'(y4[n]) + int'(c4[n]);
        if (n < 3) e -= int'(y4[N+n]) + int'(c4[N+n]);
        e = ((e % 8192) + 8192) % 8192;
        checks++;
        if (int'(coef_t'(z4[n] + coef_t'(cz4[n]))) != e) begin
          failures++;
          $display("FAIL fold K=4 n=%0d", n);
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
