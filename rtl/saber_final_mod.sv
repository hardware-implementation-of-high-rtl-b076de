// saber_final_mod: final modulo sub-component of the FMA.
//
// Reduces the N+K-1 MAA rows modulo x^N + 1. Because x^N = -1, row N+n (n < K-1)
// is subtracted from row n; the other rows pass unchanged. The subtraction is an
// inversion of row N+n and an adder. Each MAA row still owes its pending sign bit
// c, so the value to subtract is y[N+n] + c[N+n], and
//   y[n] - (y[N+n] + c[N+n]) = y[n] + ~y[N+n] + (1 - c[N+n]),
// i.e. the fold adder's carry-in is the inverse of the pending sign bit of the
// folded row. The pending sign bit of row n itself is passed on (cz[n]) to the
// AC-FO adder. Taking ~c as that carry-in, where a constant '1' would only be
// right for non-negative secrets, is this design's choice so that negative
// secrets in the top coefficient are reduced exactly. Combinational.
module saber_final_mod
  import saber_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int K = K_DEF
) (
  input  coef_t y  [N+K-1],
  input  logic  c  [N+K-1],
  output coef_t z  [N],
  output logic  cz [N]
);

  for (genvar n = 0; n < N; n++) begin : g_col
    if (n < K - 1) begin : g_fold
      logic cin_n;  // carry-in of the fold adder
      assign cin_n = ~c[N+n];
      assign z[n]  = y[n] + ~y[N+n] + coef_t'(cin_n);
    end else begin : g_pass
      assign z[n] = y[n];
    end
    assign cz[n] = c[n];
  end

endmodule
