// tb_saber_ctrl: runs the sequencer (N = 16, K = 2) through two multiplications
// and checks each cycle against the expected schedule: N load cycles with the
// D-MUX/enable on bank (N-1-t) mod K, N/K compute cycles with all banks enabled,
// accumulation and acc_first on the first, N output cycles with descending w_idx,
// a done pulse on the last one, and a return to idle. Also checks that reset and
// start behave and that the total occupancy is 1 + N + N/K + N cycles.
module tb_saber_ctrl;
  import saber_pkg::*;

  localparam int N = 16, K = 2, CW = $clog2(N + 1);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start;
  phase_e phase;
  logic sel_load, acc_en, acc_first, shift_en, g_ready, d_ready, w_valid, busy, done;
  logic [0:0] bank_sel;
  logic [K-1:0] bank_en;
  logic [CW-1:0] d_idx, w_idx;

  saber_ctrl #(.N(N), .K(K)) dut (.clk, .rst_n, .start, .phase, .sel_load, .bank_sel, .bank_en,
    .acc_en, .acc_first, .shift_en, .g_ready, .d_ready, .d_idx, .w_valid, .w_idx, .busy, .done);

  task automatic expect_ok(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL ctrl %s", what); end
  endtask

  initial begin
    rst_n = 0; start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_ok("idle after reset", phase == PH_IDLE && !busy);
    repeat (2) begin
      start = 1;
      @(negedge clk);
      start = 0;
      for (int t = 0; t < N; t++) begin
        expect_ok("load phase", phase == PH_LOAD && g_ready && sel_load && !acc_en && !shift_en);
        expect_ok("load bank", int'(bank_sel) == (N - 1 - t) % K && bank_en == (K'(1) << ((N - 1 - t) % K)));
        @(negedge clk);
      end
      for (int j = 0; j < N / K; j++) begin
        expect_ok("comp phase", phase == PH_COMP && d_ready && int'(d_idx) == j && acc_en && !sel_load);
        expect_ok("comp enables", bank_en == '1 && acc_first == (j == 0));
        @(negedge clk);
      end
      for (int t = 0; t < N; t++) begin
        expect_ok("out phase", phase == PH_OUT && w_valid && shift_en && int'(w_idx) == N - 1 - t);
        expect_ok("done pulse", done == (t == N - 1));
        @(negedge clk);
      end
      expect_ok("back to idle", phase == PH_IDLE && !busy && !done);
      @(negedge clk);
      expect_ok("stays idle", phase == PH_IDLE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
