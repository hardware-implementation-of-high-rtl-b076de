// saber_si: sign inverter (SI) of the circular shift register.
//
// Negates a 4-bit two's complement secret coefficient: every bit is inverted and a
// ripple of 1-bit half adders adds the constant 1 that enters the lowest stage as
// carry-in. This is the inverter/half-adder structure of the SI; the final carry out
// is dropped, so -(-8) wraps to -8, a code that never occurs for Saber secrets.
// Purely combinational: y = -a.
module saber_si
  import saber_pkg::*;
(
  input  gcoef_t a,
  output gcoef_t y
);

  logic [GW:0] carry;

  assign carry[0] = 1'b1;                  // the constant '1' of the negation

  for (genvar i = 0; i < GW; i++) begin : g_ha
    // half adder on the inverted bit: sum and carry out
    assign y[i]       = (~a[i]) ^ carry[i];
    assign carry[i+1] = (~a[i]) & carry[i];
  end

endmodule
