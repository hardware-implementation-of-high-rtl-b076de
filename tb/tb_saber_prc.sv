// tb_saber_prc: the pre-computing cell must give m*d mod 2^13 for m = 1..5, checked
// for corner values and random d.
module tb_saber_prc;
  import saber_pkg::*;

  int checks = 0, failures = 0;
  coef_t d;
  coef_t mult [1:MAXMAG];

  saber_prc dut (.d(d), .mult(mult));

  task automatic check_one(int dv);
    d = coef_t'(dv);
    #1;
    for (int m = 1; m <= MAXMAG; m++) begin
      checks++;
      if (int'(mult[m]) != ((m * dv) % 8192)) begin
        failures++;
        $display("FAIL prc d=%0d m=%0d got=%0d", dv, m, mult[m]);
      end
    end
  endtask

  initial begin
    check_one(0); check_one(1); check_one(8191); check_one(1638); check_one(1639);
    repeat (200) check_one(int'($urandom_range(0, 8191)));
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
