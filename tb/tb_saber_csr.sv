// tb_saber_csr: loads a random secret polynomial G (N = 16) into the CSR, highest
// coefficient first, through the de-multiplexer and per-bank enables, checks that
// the parallel outputs hold G, then rotates N/K times and checks after each step
// that the outputs hold G*x^(K*j) mod (x^N + 1), computed here by index arithmetic
// with a sign change for every wrap. K = 2 and K = 4 instances.
module tb_saber_csr;
  import saber_pkg::*;

  localparam int N = 16;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int gref [N];

  logic         sel_load;
  logic [0:0]   bank_sel2;
  logic [1:0]   bank_en2;
  logic [1:0]   bank_sel4;
  logic [3:0]   bank_en4;
  gcoef_t       g_in;
  gcoef_t       gp2 [N];
  gcoef_t       gp4 [N];

  saber_csr #(.N(N), .K(2)) dut2 (.clk, .sel_load, .bank_sel(bank_sel2), .bank_en(bank_en2),
                                  .g_in, .g_par(gp2));
  saber_csr #(.N(N), .K(4)) dut4 (.clk, .sel_load, .bank_sel(bank_sel4), .bank_en(bank_en4),
                                  .g_in, .g_par(gp4));

  // coefficient i of G * x^s mod (x^N + 1)
  function automatic int rot(int i, int s);
    int src = i - s;
    int sg  = 1;
    while (src < 0) begin src += N; sg = -sg; end
    return sg * gref[src];
  endfunction

  task automatic check_all(int s2, int s4);
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (int'(gp2[i]) != rot(i, s2)) begin
        failures++; $display("FAIL csr K=2 shift %0d i=%0d got=%0d exp=%0d", s2, i, gp2[i], rot(i, s2));
      end
      if (int'(gp4[i]) != rot(i, s4)) begin
        failures++; $display("FAIL csr K=4 shift %0d i=%0d got=%0d exp=%0d", s4, i, gp4[i], rot(i, s4));
      end
    end
  endtask

  initial begin
    sel_load = 0; bank_en2 = '0; bank_en4 = '0; bank_sel2 = '0; bank_sel4 = '0; g_in = '0;
    repeat (5) begin
      for (int i = 0; i < N; i++) gref[i] = int'($urandom_range(0, 10)) - 5;
      gref[N-1] = -5;  // a negative coefficient always passes the sign inverters
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        sel_load  = 1;
        g_in      = gcoef_t'(gref[N-1-t]);
        bank_sel2 = 1'((N - 1 - t) % 2);
        bank_sel4 = 2'((N - 1 - t) % 4);
        bank_en2  = '0; bank_en2[bank_sel2] = 1'b1;
        bank_en4  = '0; bank_en4[bank_sel4] = 1'b1;
      end
      @(negedge clk);
      sel_load = 0; bank_en2 = '0; bank_en4 = '0;
      check_all(0, 0);
      for (int j = 1; j <= N / 2; j++) begin
        bank_en2 = '1;
        bank_en4 = (j <= N / 4) ? '1 : '0;
        @(negedge clk);
        check_all(2 * j, 4 * ((j <= N / 4) ? j : N / 4));
      end
      bank_en2 = '0; bank_en4 = '0;
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
