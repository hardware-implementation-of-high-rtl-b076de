// tb_saber_si: exhaustive check of the sign inverter. For every 4-bit code a the
// output must equal the two's complement negation -a (mod 16), computed here with
// integer arithmetic.
module tb_saber_si;
  import saber_pkg::*;

  int checks = 0, failures = 0;
  gcoef_t a, y;

  saber_si dut (.a(a), .y(y));

  initial begin
    for (int v = -8; v < 8; v++) begin
      a = gcoef_t'(v);
      #1;
      checks++;
      if (y != gcoef_t'(-v)) begin
        failures++;
        $display("FAIL si a=%0d y=%0d", v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
