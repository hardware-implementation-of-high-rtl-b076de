// tb_saber_mul: PRC plus one multiplier cell. For every secret in [-5,5] and
// random d the cell's one's complement output plus its sign bit must equal g*d
// mod 2^13; codes outside [-5,5] must give 0. The sign output must be g's sign.
module tb_saber_mul;
  import saber_pkg::*;

  int checks = 0, failures = 0;
  coef_t  d, p;
  gcoef_t g;
  logic   s;
  coef_t  mult [1:MAXMAG];

  saber_prc u_prc (.d(d), .mult(mult));
  saber_mul dut   (.g(g), .mult(mult), .p(p), .s(s));

  task automatic check_one(int gv, int dv);
    int expv;
    g = gcoef_t'(gv);
    d = coef_t'(dv);
    #1;
    if (gv >= -5 && gv <= 5) expv = ((gv * dv) % 8192 + 8192) % 8192;
    else                     expv = 0;
    checks++;
    if (int'(coef_t'(p + coef_t'(s))) != expv || s != (gv < 0)) begin
      failures++;
      $display("FAIL mul g=%0d d=%0d p=%0d s=%0d exp=%0d", gv, dv, p, s, expv);
    end
  endtask

  initial begin
    for (int gv = -8; gv < 8; gv++) begin
      check_one(gv, 0); check_one(gv, 1); check_one(gv, 8191);
      repeat (50) check_one(gv, int'($urandom_range(0, 8191)));
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
