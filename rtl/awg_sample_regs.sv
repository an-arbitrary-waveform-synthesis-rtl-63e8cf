// awg_sample_regs: waveform sample shift register of the parallel resampler.
//
// L registers Reg(0)..Reg(L-1) of K samples each form one window memory of
// L*K samples. Position 0 is the oldest sample (first lane of Reg(0)),
// position L*K-1 the newest (last lane of Reg(L-1)). When shift is high the
// registers move down by one register (Reg(i) <= Reg(i+1)) and Reg(L-1)
// takes the K new samples from the FIFO, so the window advances by K input
// samples. For every path p the module presents the 2N+1 samples at
// positions base[p]-N .. base[p]+N, i.e. x'[J-N] .. x'[J+N] around the
// path's current input sample; this selection is combinational. The
// controller must keep base[p] within N .. L*K-1-N. The register chain and
// its update follow the paper; the default L is one register more than
// its formula l = ceil((2n+k)/k) gives (see awg_phase_ctrl for why).
module awg_sample_regs
  import awg_pkg::*;
#(
  parameter int unsigned K  = 8,
  parameter int unsigned N  = 5,
  parameter int unsigned L  = (2*N + 2*K + K - 1) / K,
  parameter int unsigned BW = $clog2(L*K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  sample_t       din  [K],
  input  logic [BW-1:0] base [K],
  output sample_t       win  [K][2*N+1]
);

  localparam int unsigned LK = L*K;
  localparam int unsigned T  = 2*N + 1;

  sample_t r [LK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LK); i++) r[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < int'(LK - K); i++) r[i] <= r[i+K];
      for (int j = 0; j < int'(K); j++)      r[LK-K+j] <= din[j];
    end
  end

  always_comb begin
    for (int p = 0; p < int'(K); p++) begin
      for (int t = 0; t < int'(T); t++) begin
        win[p][t] = r[(int'(base[p]) - int'(N) + t) % int'(LK)];
      end
    end
  end

endmodule
