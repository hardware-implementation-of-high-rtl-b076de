// saber_polymul: polynomial multiplier W = G*D mod (x^N + 1) over Z_(2^13) for Saber.
//
// G has 4-bit two's complement secret coefficients in [-5,5] (all three Saber
// security levels); D and W have 13-bit coefficients. D is split into N/K chunks
// D_j of K coefficients, and W = sum_j (G * x^(Kj) mod f) * D_j, accumulated
// before a final reduction of the K-1 overflow rows:
//   CSR  holds G^(Kj) = G*x^(Kj) mod f and multiplies it by x^K every cycle,
//   MAA  forms the N+K-1 coefficients of G^(Kj)*D_j with MUX-based multipliers,
//   FMA  folds the overflow rows (x^N = -1) and accumulates in N AC-FO units,
// all in two's complement with the secrets' sign bits used as adder carry-ins.
//
// Operation (see saber_ctrl): pulse `start`; for N cycles with g_ready = 1 drive
// g_in = g[N-1-t]; for N/K cycles with d_ready = 1 drive d_in[t] = d[K*d_idx + t];
// then for N cycles w_valid = 1 and w_out = w[w_idx], highest coefficient first.
// The computation takes N/K cycles (128 for N = 256, K = 2); one multiplication
// occupies 1 + N + N/K + N cycles from start to the last output. The datapath
// from CSR through MAA and FMA to the AC-FO registers is a single combinational
// stage. Port handshake, coefficient orders and reset are this design's choices.
module saber_polymul
  import saber_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int K  = K_DEF,
  parameter int CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  gcoef_t        g_in,
  input  coef_t         d_in [K],
  output logic          g_ready,
  output logic          d_ready,
  output logic [CW-1:0] d_idx,
  output coef_t         w_out,
  output logic          w_valid,
  output logic [CW-1:0] w_idx,
  output logic          busy,
  output logic          done,
  output phase_e        phase
);

  localparam int BW = (K > 1) ? $clog2(K) : 1;

  logic          sel_load, acc_en, acc_first, shift_en;
  logic [BW-1:0] bank_sel;
  logic [K-1:0]  bank_en;
  gcoef_t        g_par [N];
  coef_t         y     [N+K-1];
  logic          c     [N+K-1];
  coef_t         acc_q [N];

  saber_ctrl #(.N(N), .K(K), .BW(BW), .CW(CW)) u_ctrl (
    .clk, .rst_n, .start, .phase,
    .sel_load, .bank_sel, .bank_en,
    .acc_en, .acc_first, .shift_en,
    .g_ready, .d_ready, .d_idx, .w_valid, .w_idx, .busy, .done
  );

  saber_csr #(.N(N), .K(K), .BW(BW)) u_csr (
    .clk, .sel_load, .bank_sel, .bank_en, .g_in, .g_par
  );

  saber_maa #(.N(N), .K(K)) u_maa (.g(g_par), .d(d_in), .y(y), .c(c));

  saber_fma #(.N(N), .K(K)) u_fma (
    .clk, .acc_en, .acc_first, .shift_en, .y(y), .c(c), .w_out, .acc_q
  );

endmodule
