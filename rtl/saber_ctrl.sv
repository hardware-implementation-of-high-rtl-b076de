// saber_ctrl: sequencer of the polynomial multiplier.
//
// A `start` pulse in the idle phase begins one multiplication of three phases:
//   LOAD  N cycles   : g_ready = 1; the CSR takes one coefficient of G per cycle,
//                      highest first. In load cycle t the coefficient is g[N-1-t];
//                      the D-MUX (bank_sel) and the enable (bank_en) select bank
//                      (N-1-t) mod K, and the CSR entry MUX takes the input.
//   COMP  N/K cycles : d_ready = 1, d_idx = j; the caller drives D_j. All banks
//                      rotate (multiply by x^K) and the AC-FO units accumulate;
//                      acc_first marks j = 0.
//   OUT   N cycles   : w_valid = 1, w_idx = N-1-t; the AC-FO chain shifts.
// `done` pulses in the last output cycle, after which the sequencer is idle and
// accepts the next start. The phase lengths (N loading, N/K computation, N
// output cycles) are those of the multiplier; the start/ready/valid handshake and
// the synchronous active-low reset are this design's choices.
module saber_ctrl
  import saber_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int K  = K_DEF,
  parameter int BW = (K > 1) ? $clog2(K) : 1,
  parameter int CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output phase_e        phase,
  // CSR controls
  output logic          sel_load,
  output logic [BW-1:0] bank_sel,
  output logic [K-1:0]  bank_en,
  // FMA controls
  output logic          acc_en,
  output logic          acc_first,
  output logic          shift_en,
  // handshake
  output logic          g_ready,
  output logic          d_ready,
  output logic [CW-1:0] d_idx,
  output logic          w_valid,
  output logic [CW-1:0] w_idx,
  output logic          busy,
  output logic          done
);

  localparam int J = N / K;  // compute cycles

  logic [CW-1:0] cnt;
  logic          last;
  logic [CW-1:0] gidx;  // index of the coefficient being loaded

  always_comb begin
    unique case (phase)
      PH_LOAD: last = (cnt == CW'(N - 1));
      PH_COMP: last = (cnt == CW'(J - 1));
      PH_OUT:  last = (cnt == CW'(N - 1));
      default: last = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt   <= '0;
    end else begin
      unique case (phase)
        PH_IDLE: if (start) begin phase <= PH_LOAD; cnt <= '0; end
        PH_LOAD: if (last) begin phase <= PH_COMP; cnt <= '0; end else cnt <= cnt + 1'b1;
        PH_COMP: if (last) begin phase <= PH_OUT;  cnt <= '0; end else cnt <= cnt + 1'b1;
        PH_OUT:  if (last) begin phase <= PH_IDLE; cnt <= '0; end else cnt <= cnt + 1'b1;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    gidx      = CW'(N - 1) - cnt;
    sel_load  = (phase == PH_LOAD);
    bank_sel  = BW'(gidx % CW'(K));
    bank_en   = '0;
    if (phase == PH_LOAD) bank_en[bank_sel] = 1'b1;
    else if (phase == PH_COMP) bank_en = '1;
    acc_en    = (phase == PH_COMP);
    acc_first = (phase == PH_COMP) && (cnt == '0);
    shift_en  = (phase == PH_OUT);
    g_ready   = (phase == PH_LOAD);
    d_ready   = (phase == PH_COMP);
    d_idx     = (phase == PH_COMP) ? cnt : '0;
    w_valid   = (phase == PH_OUT);
    w_idx     = (phase == PH_OUT) ? gidx : '0;
    busy      = (phase != PH_IDLE);
    done      = (phase == PH_OUT) && last;
  end

  initial begin
    assert (N % K == 0) else $error("saber_ctrl: N must be a multiple of K");
  end

  // handshake rules: at most one of the three transfers per cycle, done only with
  // the last output (w[0]), and a start seen while idle always begins loading
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({g_ready, d_ready, w_valid}));
  assert property (@(posedge clk) disable iff (!rst_n) done |-> w_valid && w_idx == '0);
  assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |=> phase == PH_LOAD);

endmodule
