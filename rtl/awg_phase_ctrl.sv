// awg_phase_ctrl: phase controller of the parallel resampler.
//
// Every clock it produces the phases of K consecutive output samples,
//   eta(km+p) = eta(km-1) + (p+1)*omega,   eta(0) = 0,
// where omega = f_s / f_DAC < 1 is a PHASE_W-bit fraction. The phase is kept
// with one extra sign bit above the fraction, so the sign bit toggles each
// time the phase passes a whole input period. Update enables are the XOR of
// consecutive sign bits, en(p) = sgn(eta(p-1)) ^ sgn(eta(p)), the base
// address of path p (position of its input sample J in the sample
// registers) is the previous base plus en(p), and the time interval u(p) is
// the top U_W bits of the fraction of eta(p). These equations follow the
// paper.
//
// Register update: after the K outputs of a clock, if the last base minus N
// exceeds K-1 the oldest register is no longer needed, so the sample
// registers shift by K, one FIFO word is popped and the carried base drops
// by K. The carried base therefore stays at or below N+K-1, and within one
// clock a base can grow by up to K, so the window reaches position 2N+2K-1:
// the sample registers need L = ceil((2N+2K)/K) registers, one more than
// the paper's formula.
//
// Flow: when run rises the controller first fills all L registers from the
// FIFO (one word per clock while it is not empty), then starts with base N
// (the first output coincides with the (N+1)-th input sample) and phase 0.
// If a shift is due while the FIFO is empty the clock is a stall: no output
// is valid and no state moves, so the output stream has a gap but stays
// exact. Outputs are combinational from the state registers.
module awg_phase_ctrl
  import awg_pkg::*;
#(
  parameter int unsigned K  = 8,
  parameter int unsigned N  = 5,
  parameter int unsigned L  = (2*N + 2*K + K - 1) / K,
  parameter int unsigned BW = $clog2(L*K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  omega_t        omega,
  input  logic          fifo_empty,
  output logic          shift,          // shift sample registers, pop FIFO
  output logic [BW-1:0] base [K],
  output uint_t         u    [K],
  output logic          out_valid,      // the K (base, u) pairs are a valid output clock
  output logic          stall,          // shift due but FIFO empty
  output logic          priming
);

  typedef enum logic [1:0] {S_IDLE, S_PRIME, S_RUN} state_e;

  state_e                 state;
  logic [$clog2(L+1)-1:0] fill;
  phase_t                 eta_c;        // phase of the first output of this clock
  logic                   sgn_prev;     // sign bit of the last output of the previous clock
  logic [BW-1:0]          base_prev;    // base of the last output of the previous clock

  phase_t                 eta    [K];
  logic                   en     [K];
  logic [BW-1:0]          base_c [K];
  logic                   need_shift;

  always_comb begin
    logic          sgn_run;
    logic [BW-1:0] base_run;
    sgn_run  = sgn_prev;
    base_run = base_prev;
    for (int p = 0; p < int'(K); p++) begin
      eta[p]    = eta_c + phase_t'(p) * phase_t'(omega);
      en[p]     = sgn_run ^ eta[p][PHASE_W];
      base_run  = base_run + BW'(en[p]);
      base_c[p] = base_run;
      sgn_run   = eta[p][PHASE_W];
      u[p]      = eta[p][PHASE_W-1 -: U_W];
    end
    base       = base_c;
    need_shift = (int'(base_c[K-1]) - int'(N)) > int'(K) - 1;
  end

  assign priming   = (state == S_PRIME);
  assign stall     = (state == S_RUN) && need_shift && fifo_empty;
  assign out_valid = (state == S_RUN) && !stall;
  assign shift     = ((state == S_PRIME) && !fifo_empty) ||
                     ((state == S_RUN) && need_shift && !fifo_empty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      fill      <= '0;
      eta_c     <= '0;
      sgn_prev  <= 1'b0;
      base_prev <= BW'(N);
    end else if (!run) begin
      state     <= S_IDLE;
      fill      <= '0;
      eta_c     <= '0;
      sgn_prev  <= 1'b0;
      base_prev <= BW'(N);
    end else begin
      case (state)
        S_IDLE:  state <= S_PRIME;
        S_PRIME: if (!fifo_empty) begin
                   fill <= fill + 1'b1;
                   if (int'(fill) == int'(L) - 1) state <= S_RUN;
                 end
        S_RUN:   if (!stall) begin
                   eta_c     <= eta_c + phase_t'(K) * phase_t'(omega);
                   sgn_prev  <= eta[K-1][PHASE_W];
                   base_prev <= need_shift ? base_c[K-1] - BW'(K) : base_c[K-1];
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the carried base never leaves the range the sample registers can serve
  a_base_range: assert property (@(posedge clk) disable iff (!rst_n)
                  (state == S_RUN) |-> (int'(base_prev) <= int'(N + K - 1)))
    else $error("carried base out of range");

endmodule
