// saber_maa: multiplication and addition (MAA) component.
//
// Computes the unreduced product G^(kj) * D_j, where D_j = d_j0 + d_j1 x + ..
// + d_j(K-1) x^(K-1) are the K coefficients of D consumed in one cycle. One PRC
// cell per D input forms d..5d; N*K MUX-based multiplier cells form g[i]*d_t in
// one's complement with a separate sign bit. Output row r (0 <= r <= N+K-2) sums
// the products g[r-t]*d_t over the valid t with a chain of adders; each adder takes
// the sign bit of the product it adds as carry-in, completing that product's
// two's complement. The sign bit of the first product of a row is not consumed
// here: it leaves on c[r] for the adder of the FMA. So the true row value is
// y[r] + c[r] (mod 2^13). For K = 2 this gives N-1 adders and N+1 outputs.
// Combinational; inputs from the CSR and the D port, outputs to the FMA.
module saber_maa
  import saber_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int K = K_DEF
) (
  input  gcoef_t g   [N],          // CSR parallel outputs
  input  coef_t  d   [K],          // D_j, K coefficients
  output coef_t  y   [N+K-1],      // row sums, one's complement of the first product
  output logic   c   [N+K-1]       // pending sign bit of each row
);

  coef_t mult [K][1:MAXMAG];
  coef_t p    [N][K];
  logic  s    [N][K];

  for (genvar t = 0; t < K; t++) begin : g_prc
    saber_prc u_prc (.d(d[t]), .mult(mult[t]));
    for (genvar i = 0; i < N; i++) begin : g_mul
      saber_mul u_mul (.g(g[i]), .mult(mult[t]), .p(p[i][t]), .s(s[i][t]));
    end
  end

  for (genvar r = 0; r < N + K - 1; r++) begin : g_row
    localparam int TMIN = (r - N + 1 > 0) ? r - N + 1 : 0;
    localparam int TMAX = (r < K - 1) ? r : K - 1;
    coef_t acc;
    always_comb begin
      acc = p[r-TMIN][TMIN];
      for (int t = TMIN + 1; t <= TMAX; t++) acc = acc + p[r-t][t] + coef_t'(s[r-t][t]);
    end
    assign y[r] = acc;
    assign c[r] = s[r-TMIN][TMIN];
  end

endmodule
