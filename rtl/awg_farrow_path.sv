// awg_farrow_path: one path of the k-path FIR filter bank (Farrow structure).
//
// Computes y = sum_m u^m * H(m), with H(m) = sum_t a(m,t) * x'[J-N+t], the
// variable fractional-delay filter of the paper, on one output sample's
// 2N+1-sample input sequence and time interval u. As in the paper's
// figure, the M sub-filters H(M-1)..H(0) run in parallel and are combined in
// Horner form: acc = H(M-1); acc = acc*u + H(m) for m = M-2 down to 0.
//
// Fixed point (this design's choice): samples 16-bit, coefficients COEF_W bits
// with COEF_FRAC fractional bits, u an unsigned U_W-bit fraction. Each
// sub-filter sum keeps ACC_GUARD fractional bits (shifted right by
// COEF_FRAC-ACC_GUARD, floor) in ACC_W bits; each Horner product is shifted
// right by U_W (floor) before the add; the result is rounded to the nearest
// integer and saturated to 16 bits.
//
// Timing: fully pipelined, one input per clock. Stage 1 registers the input,
// stage 2 the sub-filter outputs, then M-1 Horner stages and one saturation
// stage: LATENCY = M+2 clocks from in_valid to out_valid.
module awg_farrow_path
  import awg_pkg::*;
#(
  parameter int unsigned M = 11,
  parameter int unsigned N = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t win  [2*N+1],
  input  uint_t   u,
  input  coef_t   coef [M][2*N+1],
  output logic    out_valid,
  output sample_t y
);

  localparam int unsigned T     = 2*N + 1;
  localparam int unsigned SUM_W = SAMPLE_W + COEF_W + $clog2(T) + 1;
  localparam int unsigned PRD_W = ACC_W + U_W + 1;
  localparam int unsigned HS    = (M > 1) ? M - 1 : 1;   // Horner stages (array size)

  // stage 1: input register
  logic    v1;
  sample_t w1 [T];
  uint_t   u1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      u1 <= '0;
      for (int t = 0; t < int'(T); t++) w1[t] <= '0;
    end else begin
      v1 <= in_valid;
      u1 <= u;
      w1 <= win;
    end
  end

  // stage 2: sub-filters H(0)..H(M-1)
  acc_t  hsum [M];
  logic  v2;
  acc_t  h2 [M];
  uint_t u2;

  always_comb begin
    for (int m = 0; m < int'(M); m++) begin
      logic signed [SUM_W-1:0] s;
      s = '0;
      for (int t = 0; t < int'(T); t++)
        s += SUM_W'(w1[t]) * SUM_W'(coef[m][t]);
      hsum[m] = acc_t'(s >>> (COEF_FRAC - ACC_GUARD));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0;
      u2 <= '0;
      for (int m = 0; m < int'(M); m++) h2[m] <= '0;
    end else begin
      v2 <= v1;
      u2 <= u1;
      h2 <= hsum;
    end
  end

  // Horner stages: stage s holds acc after s steps, plus the H values still
  // needed and the time interval.
  acc_t  acc [HS+1];
  logic  hv  [HS+1];
  uint_t hu  [HS+1];
  acc_t  hh  [HS+1][M];

  assign acc[0] = h2[M-1];
  assign hv[0]  = v2;
  assign hu[0]  = u2;
  assign hh[0]  = h2;

  for (genvar s = 0; s < int'(M) - 1; s++) begin : g_horner
    logic signed [PRD_W-1:0] prod;
    assign prod = PRD_W'(acc[s]) * PRD_W'(signed'({1'b0, hu[s]}));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[s+1] <= '0;
        hv[s+1]  <= 1'b0;
        hu[s+1]  <= '0;
        for (int m = 0; m < int'(M); m++) hh[s+1][m] <= '0;
      end else begin
        acc[s+1] <= acc_t'(prod >>> U_W) + hh[s][int'(M) - 2 - s];
        hv[s+1]  <= hv[s];
        hu[s+1]  <= hu[s];
        hh[s+1]  <= hh[s];
      end
    end
  end

  if (M == 1) begin : g_single
    assign acc[1] = acc[0];
    assign hv[1]  = hv[0];
    assign hu[1]  = hu[0];
    assign hh[1]  = hh[0];
  end

  // output stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= hv[M-1];
      y         <= sat_sample(acc[M-1]);
    end
  end

endmodule
