// tb_awg_fir_bank: feeds the K-path filter bank a different random sample
// sequence and time interval on every path and checks each path's output
// against the resampling formula, plus the M+2-clock latency.
module tb_awg_fir_bank;
  import awg_pkg::*;
  import awg_tb_ref_pkg::*;
  localparam int K = 8, M = 11, N = 5, T = 2*N + 1, LAT = M + 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t win [K][T];
  uint_t u [K];
  coef_t coef [M][T];
  sample_t y [K];
  longint cflat [$];
  int exp_q [K][$];
  int time_q [$];
  int checks = 0, failures = 0, cyc = 0;

  awg_fir_bank #(.K(K), .M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int t0;
    checks++;
    t0 = time_q.pop_front();
    if (cyc - t0 != LAT) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    for (int p = 0; p < K; p++) begin
      int e;
      e = exp_q[p].pop_front();
      checks++;
      if (y[p] !== sample_t'(e)) begin failures++; $display("FAIL path %0d y=%0d exp=%0d", p, y[p], e); end
    end
  end

  initial begin
    for (int i = 0; i < M*T; i++) cflat.push_back(longint'($signed($urandom % 2**19) - 2**18));
    for (int i = 0; i < M*T; i++) coef[i/T][i%T] = coef_t'(cflat[i]);
    for (int p = 0; p < K; p++) begin u[p] = '0; for (int t = 0; t < T; t++) win[p][t] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      for (int p = 0; p < K; p++) begin
        u[p] = uint_t'($urandom);
        for (int t = 0; t < T; t++) win[p][t] = sample_t'($signed($urandom % 40000) - 20000);
      end
      if (in_valid) begin
        time_q.push_back(cyc);
        for (int p = 0; p < K; p++) begin
          longint wq [$];
          wq.delete();
          for (int t = 0; t < T; t++) wq.push_back(longint'(win[p][t]));
          exp_q[p].push_back(farrow_ref(M, T, cflat, wq, longint'(u[p])));
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (time_q.size() != 0 || checks < 2000) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
