// awg_coef_regs: coefficient store of the Farrow FIR filter bank.
//
// Holds the M x (2N+1) coefficients a(n,m) shared by all K paths. Entry
// (m, t) is the weight of sub-filter H(m) on tap t, which sees sample
// x'[J-N+t] (the paper's a(N-t, m)). The host writes one coefficient per
// clock at address m*(2N+1)+t; the new value is used from the next clock.
// After reset the store holds a sample-and-hold response (H(0) passes
// x'[J] with weight 1.0, everything else 0), so the data path is usable
// before the host loads a designed filter. The paper takes its
// coefficients from a minimax design and does not say how they reach the
// FPGA; the write port and reset value are this design's choice.
module awg_coef_regs
  import awg_pkg::*;
#(
  parameter int unsigned M  = 11,
  parameter int unsigned N  = 5,
  parameter int unsigned CA = $clog2(M*(2*N+1))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [CA-1:0] waddr,
  input  coef_t         wdata,
  output coef_t         coef [M][2*N+1]
);

  localparam int unsigned T = 2*N + 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < int'(M); m++)
        for (int t = 0; t < int'(T); t++)
          coef[m][t] <= (m == 0 && t == int'(N)) ? coef_t'(1 <<< COEF_FRAC) : '0;
    end else if (we && int'(waddr) < int'(M*T)) begin
      coef[int'(waddr) / int'(T)][int'(waddr) % int'(T)] <= wdata;
    end
  end

endmodule
