// saber_csr: circular shift register (CSR) holding G^(kj) = G * x^(kj) mod (x^N + 1).
//
// The N secret coefficients are spread over K banks of N/K 4-bit registers; bank b
// holds the coefficients b, b+K, b+2K, .. . Each bank is a shift register whose
// entry multiplexer (sel) takes either the serial input, routed to one bank by a
// de-multiplexer (ctrl), or the bank's exit register passed through a sign
// inverter (SI). One shift of all banks moves coefficient i to position i+K and
// wraps the top K coefficients, negated, to positions 0..K-1: a multiplication by
// x^K modulo x^N + 1.
//
// Loading: G enters one coefficient per cycle, highest first (g[N-1], g[N-2], ..
// g[0]); `bank_sel` routes it to bank (index mod K) and only that bank's enable is
// set. After N cycles bank b holds g[b] in its entry register and g[N-K+b] in its
// exit register. Rotating: `sel_load` = 0 and all enables set; every clock edge
// multiplies the held polynomial by x^K.
// Interface: g_par[i] is coefficient i of the held polynomial, always valid.
// The bank structure, D-MUX, entry MUXes, per-bank enables and SI follow the CSR
// organisation; the loading order (highest coefficient first) is this design's
// choice, made so that the SI feedback sits at the highest coefficient. The
// registers have no reset: they are always loaded before they are read.
module saber_csr
  import saber_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int K  = K_DEF,
  parameter int BW = (K > 1) ? $clog2(K) : 1
) (
  input  logic           clk,
  input  logic           sel_load,          // 1: entry MUX takes the serial input
  input  logic [BW-1:0]  bank_sel,          // D-MUX: bank that receives g_in
  input  logic [K-1:0]   bank_en,           // register enable per bank
  input  gcoef_t         g_in,              // serial coefficient of G
  output gcoef_t         g_par [N]          // coefficient i of G^(kj)
);

  localparam int M = N / K;  // registers per bank

  gcoef_t bank_q  [K][M];
  gcoef_t dmux    [K];
  gcoef_t si_out  [K];
  gcoef_t entry   [K];

  for (genvar b = 0; b < K; b++) begin : g_bank
    // sign inverter on the bank's exit register (highest coefficient of the bank)
    saber_si u_si (.a(bank_q[b][M-1]), .y(si_out[b]));

    always_comb begin
      dmux[b]  = (bank_sel == BW'(b)) ? g_in : '0;
      entry[b] = sel_load ? dmux[b] : si_out[b];
    end

    always_ff @(posedge clk) begin
      if (bank_en[b]) begin
        bank_q[b][0] <= entry[b];
        for (int m = 1; m < M; m++) bank_q[b][m] <= bank_q[b][m-1];
      end
    end

    for (genvar m = 0; m < M; m++) begin : g_out
      assign g_par[b + K*m] = bank_q[b][m];
    end
  end

  initial begin
    assert (N % K == 0) else $error("saber_csr: N must be a multiple of K");
  end

endmodule
