// tb_saber_acfo: two AC-FO units, the second one with its multiplexer fed by the
// first. Checks accumulation with carry-in, the restart through acc_first, holding
// when idle, and the shift from one unit to the next, against a model kept here.
module tb_saber_acfo;
  import saber_pkg::*;

  int checks = 0, failures = 0;
  logic  clk = 1'b0;
  logic  acc_en, acc_first, shift_en;
  coef_t z0, z1, q0, q1;
  logic  c0, c1;
  int    m0, m1;

  always #5 clk = ~clk;

  saber_acfo #(.HAS_MUX(1'b0)) u0 (.clk, .acc_en, .acc_first, .shift_en, .z(z0), .cin(c0),
                                   .shift_in(coef_t'(0)), .q(q0));
  saber_acfo #(.HAS_MUX(1'b1)) u1 (.clk, .acc_en, .acc_first, .shift_en, .z(z1), .cin(c1),
                                   .shift_in(q0), .q(q1));

  task automatic step(logic a, logic f, logic s);
    @(negedge clk);
    acc_en = a; acc_first = f; shift_en = s;
    z0 = coef_t'($urandom); z1 = coef_t'($urandom);
    c0 = 1'($urandom); c1 = 1'($urandom);
    @(posedge clk);
    if (a) begin
      m0 = ((f ? 0 : m0) + int'(z0) + int'(c0)) % 8192;
      m1 = ((f ? 0 : m1) + int'(z1) + int'(c1)) % 8192;
    end else if (s) begin
      m1 = m0;
    end
    #1;
    checks++;
    if (int'(q0) != m0 || int'(q1) != m1) begin
      failures++;
      $display("FAIL acfo q0=%0d/%0d q1=%0d/%0d", q0, m0, q1, m1);
    end
  endtask

  initial begin
    m0 = 0; m1 = 0;
    repeat (20) begin
      step(1, 1, 0);
      repeat (5) step(1, 0, 0);
      step(0, 0, 0);
      step(0, 0, 1);
      step(0, 0, 1);
      step(0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
