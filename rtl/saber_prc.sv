// saber_prc: pre-computing (PRC) cell.
//
// Forms the multiples 1*d .. 5*d of one 13-bit coefficient of D, shared by all N
// multiplier cells of one D input. As in the pre-computing cell, a chain of four
// adders builds each multiple from the previous one plus d (2d = d+d, 3d = 2d+d,
// 4d = 3d+d, 5d = 4d+d); all sums wrap modulo 2^13. Combinational.
// mult[m] = m*d mod 2^13 for m = 1..MAXMAG.
module saber_prc
  import saber_pkg::*;
(
  input  coef_t d,
  output coef_t mult [1:MAXMAG]
);

  always_comb begin
    mult[1] = d;
    for (int m = 2; m <= MAXMAG; m++) mult[m] = mult[m-1] + d;
  end

endmodule
