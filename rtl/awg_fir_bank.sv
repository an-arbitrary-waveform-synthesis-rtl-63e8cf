// awg_fir_bank: the k-path FIR filter bank of the parallel resampler.
//
// K identical Farrow paths (awg_farrow_path) work side by side, one per
// output sample of the clock, all with the same coefficient set. Path p gets
// its own 2N+1-sample input sequence and time interval u[p] and yields
// y[km+p]. A single valid accompanies the K inputs and the K outputs.
// Latency M+2 clocks, one set of K outputs per clock.
module awg_fir_bank
  import awg_pkg::*;
#(
  parameter int unsigned K = 8,
  parameter int unsigned M = 11,
  parameter int unsigned N = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t win  [K][2*N+1],
  input  uint_t   u    [K],
  input  coef_t   coef [M][2*N+1],
  output logic    out_valid,
  output sample_t y    [K]
);

  logic pv [K];

  for (genvar p = 0; p < int'(K); p++) begin : g_path
    awg_farrow_path #(.M(M), .N(N)) u_path (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .win       (win[p]),
      .u         (u[p]),
      .coef      (coef),
      .out_valid (pv[p]),
      .y         (y[p])
    );
  end

  assign out_valid = pv[0];

endmodule
