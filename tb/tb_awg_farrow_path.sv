// tb_awg_farrow_path: drives one Farrow path with random sample sequences,
// time intervals and coefficients (in gapped bursts) and compares every
// output with the resampling formula evaluated in 64-bit integers. Also
// checks the latency of M+2 clocks for every sample.
module tb_awg_farrow_path;
  import awg_pkg::*;
  import awg_tb_ref_pkg::*;
  localparam int M = 11, N = 5, T = 2*N + 1, LAT = M + 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t win [T];
  uint_t u;
  coef_t coef [M][T];
  sample_t y;
  longint cflat [$];
  int exp_q [$], time_q [$];
  int checks = 0, failures = 0, cyc = 0, nout = 0;

  awg_farrow_path #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks += 2; nout++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        int e, t0;
        e = exp_q.pop_front();
        t0 = time_q.pop_front();
        if (y !== sample_t'(e)) begin failures++; $display("FAIL y=%0d exp=%0d", y, e); end
        if (cyc - t0 != LAT) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      end
    end
  end

  initial begin
    for (int t = 0; t < T; t++) win[t] = '0;
    u = '0;
    for (int set = 0; set < 3; set++) begin
      // set 0: small random coefficients; set 1: cubic Lagrange; set 2: large random (saturation)
      cflat.delete();
      if (set == 1) lagrange3(M, N, cflat);
      else for (int i = 0; i < M*T; i++)
        cflat.push_back((set == 0) ? longint'($signed($urandom % 2**18) - 2**17)
                                   : longint'($signed($urandom % 2**COEF_W) - 2**(COEF_W-1)));
      for (int i = 0; i < M*T; i++) coef[i/T][i%T] = coef_t'(cflat[i]);
      if (set == 0) begin repeat (2) @(negedge clk); rst_n = 1; end
      for (int c = 0; c < 400; c++) begin
        @(negedge clk);
        in_valid = ($urandom % 4) != 0;
        for (int t = 0; t < T; t++) win[t] = sample_t'($urandom);
        u = uint_t'($urandom);
        if (in_valid) begin
          longint wq [$];
          wq.delete();
          for (int t = 0; t < T; t++) wq.push_back(longint'(win[t]));
          exp_q.push_back(farrow_ref(M, T, cflat, wq, longint'(u)));
          time_q.push_back(cyc);
        end
      end
      @(negedge clk); in_valid = 0;
      repeat (LAT + 2) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0 || nout < 800) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
