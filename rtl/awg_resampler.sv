// awg_resampler: parallel digital resampling structure.
//
// Converts the waveform samples x[i], taken at the variable rate f_s, into K
// output samples y[j] per clock at the fixed DAC rate f_DAC = K * f_clk, for
// omega = f_s / f_DAC < 1. It joins the paper's parts: the phase
// controller (awg_phase_ctrl) walks the output phases, pops the sample FIFO
// and shifts the waveform sample registers (awg_sample_regs); the registers
// hand each path its 2N+1-sample sequence; the k-path Farrow filter bank
// (awg_fir_bank) interpolates at the time interval u with the coefficients
// held in awg_coef_regs.
//
// Interface: FIFO read side (first-word-fall-through fifo_rdata / fifo_empty,
// pop with fifo_rd_en); run starts the structure (priming then streaming);
// omega is the control word; a host port writes coefficients. dac_data holds
// y[km] .. y[km+K-1] (lane 0 first in time) when dac_valid is high, M+2
// clocks after the phases were formed. ev_shift and ev_stall pulse for each
// register update and each FIFO-empty stall.
module awg_resampler
  import awg_pkg::*;
#(
  parameter int unsigned K  = 8,
  parameter int unsigned M  = 11,
  parameter int unsigned N  = 5,
  parameter int unsigned L  = (2*N + 2*K + K - 1) / K,
  parameter int unsigned CA = $clog2(M*(2*N+1))
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  omega_t                   omega,
  // coefficient write port
  input  logic                     coef_we,
  input  logic [CA-1:0]            coef_waddr,
  input  coef_t                    coef_wdata,
  // sample FIFO read side
  input  logic [K*SAMPLE_W-1:0]    fifo_rdata,
  input  logic                     fifo_empty,
  output logic                     fifo_rd_en,
  // output to the DAC interface
  output sample_t                  dac_data [K],
  output logic                     dac_valid,
  // events
  output logic                     ev_shift,
  output logic                     ev_stall,
  output logic                     priming
);

  localparam int unsigned BW = $clog2(L*K);

  logic          shift, out_valid;
  logic [BW-1:0] base [K];
  uint_t         u    [K];
  sample_t       din  [K];
  sample_t       win  [K][2*N+1];
  coef_t         coef [M][2*N+1];

  for (genvar j = 0; j < int'(K); j++) begin : g_unpack
    assign din[j] = fifo_rdata[j*SAMPLE_W +: SAMPLE_W];
  end

  awg_phase_ctrl #(.K(K), .N(N), .L(L), .BW(BW)) u_phase (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (run),
    .omega      (omega),
    .fifo_empty (fifo_empty),
    .shift      (shift),
    .base       (base),
    .u          (u),
    .out_valid  (out_valid),
    .stall      (ev_stall),
    .priming    (priming)
  );

  awg_sample_regs #(.K(K), .N(N), .L(L), .BW(BW)) u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .shift (shift),
    .din   (din),
    .base  (base),
    .win   (win)
  );

  awg_coef_regs #(.M(M), .N(N), .CA(CA)) u_coef (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (coef_we),
    .waddr (coef_waddr),
    .wdata (coef_wdata),
    .coef  (coef)
  );

  awg_fir_bank #(.K(K), .M(M), .N(N)) u_bank (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (out_valid),
    .win       (win),
    .u         (u),
    .coef      (coef),
    .out_valid (dac_valid),
    .y         (dac_data)
  );

  assign fifo_rd_en = shift;
  assign ev_shift   = shift && !priming;

endmodule
