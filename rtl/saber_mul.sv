// saber_mul: MUX-based multiplier cell (Mul.) for a secret times a 13-bit value.
//
// The 4-bit two's complement secret g drives an 11-to-1 multiplexer that picks
// |g|*d among 0, d, 2d, .. 5d supplied by a PRC cell (codes 0..5 and -1..-5). The
// sign bit of g then selects, in a 2-to-1 multiplexer, either that multiple or its
// bitwise inverse. The missing +1 of the two's complement negation is not added
// here: the sign bit leaves the cell on `s` and is used as carry-in of a following
// adder, so the true product is p + s (mod 2^13).
// Codes outside [-5,5] (6, 7, -6, -7, -8) select 0; the result p + s is then 0.
// That handling is this design's choice. Combinational.
module saber_mul
  import saber_pkg::*;
(
  input  gcoef_t g,
  input  coef_t  mult [1:MAXMAG],  // d, 2d, .. 5d from the PRC
  output coef_t  p,                // one's complement partial product
  output logic   s                 // sign bit, carry-in for the next adder
);

  coef_t mag;

  always_comb begin
    unique case (g)
      4'sd0:            mag = '0;
      4'sd1,  -4'sd1:   mag = mult[1];
      4'sd2,  -4'sd2:   mag = mult[2];
      4'sd3,  -4'sd3:   mag = mult[3];
      4'sd4,  -4'sd4:   mag = mult[4];
      4'sd5,  -4'sd5:   mag = mult[5];
      default:          mag = '0;
    endcase
    s = g[GW-1];
    p = s ? ~mag : mag;
  end

endmodule
