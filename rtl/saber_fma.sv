// saber_fma: final modular and accumulation (FMA) component.
//
// The final modulo sub-component (saber_final_mod) reduces the N+K-1 MAA rows to
// N; N AC-FO units accumulate them over the N/K compute cycles. The units form a
// chain from unit 0 (no multiplexer) to unit N-1; during output every unit loads
// the value of the unit before it, and unit N-1's register is the serial output.
// So after the last compute cycle w_out carries w[N-1], and each shift cycle
// brings the next lower coefficient, w[0] appearing after N-1 shifts.
// acc_q exposes all accumulators for observation.
module saber_fma
  import saber_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int K = K_DEF
) (
  input  logic  clk,
  input  logic  acc_en,
  input  logic  acc_first,
  input  logic  shift_en,
  input  coef_t y [N+K-1],
  input  logic  c [N+K-1],
  output coef_t w_out,
  output coef_t acc_q [N]
);

  coef_t z    [N];
  logic  cz   [N];
  coef_t shin [N];   // value each unit loads while the chain shifts

  saber_final_mod #(.N(N), .K(K)) u_mod (.y(y), .c(c), .z(z), .cz(cz));

  for (genvar n = 0; n < N; n++) begin : g_unit
    saber_acfo #(.HAS_MUX(n != 0)) u_acfo (
      .clk      (clk),
      .acc_en   (acc_en),
      .acc_first(acc_first),
      .shift_en (shift_en),
      .z        (z[n]),
      .cin      (cz[n]),
      .shift_in (shin[n]),
      .q        (acc_q[n])
    );
  end

  assign shin[0] = '0;  // unit 0 has no multiplexer; unused
  for (genvar n = 1; n < N; n++) begin : g_chain
    assign shin[n] = acc_q[n-1];
  end

  assign w_out = acc_q[N-1];

endmodule
