// saber_pkg: constants and types shared by the Saber polynomial multiplier.
//
// The multiplier computes W = G*D mod (x^N + 1) over Z_q with q = 2^13. G is the
// "small" polynomial whose coefficients are secrets in [-5,5] held in 4-bit two's
// complement; D and W have 13-bit coefficients. N = 256 and the 13-bit width come
// from the Saber parameter set; K (coefficients of D consumed per cycle) defaults
// to 2, the configuration with the smallest area-delay product; K = 4 is the other
// evaluated configuration. Arithmetic wraps modulo 2^13, so 10-bit (mod p = 2^10)
// operands are covered by reading the low 10 bits.
package saber_pkg;

  localparam int N_DEF  = 256;  // polynomial degree N
  localparam int K_DEF  = 2;    // D coefficients per compute cycle (k)
  localparam int QW     = 13;   // coefficient width of D and W (q = 2^13)
  localparam int GW     = 4;    // coefficient width of G (secret, two's complement)
  localparam int MAXMAG = 5;    // largest secret magnitude (LightSaber range [-5,5])

  typedef logic [QW-1:0]        coef_t;   // element of Z_q
  typedef logic signed [GW-1:0] gcoef_t;  // secret coefficient

  // Operating phase of the multiplier.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_LOAD = 2'd1,   // N cycles: G enters the CSR serially
    PH_COMP = 2'd2,   // N/K cycles: one D_j per cycle is multiplied and accumulated
    PH_OUT  = 2'd3    // N cycles: W leaves serially, highest coefficient first
  } phase_e;

endpackage
