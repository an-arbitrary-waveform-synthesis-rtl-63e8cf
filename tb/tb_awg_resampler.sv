// tb_awg_resampler: runs the parallel resampler on a 64-sample sine wave fed
// from a FIFO model and checks every DAC sample, in order, against the
// resampling formula (output j uses x[floor(j*omega) .. +2N] and the time
// interval frac(j*omega)). Three runs use the ratios 983/2000, 1228/2000 and
// 1474/2000 with a cubic Lagrange filter loaded through the coefficient
// port, where the output is also held against the ideal sine to within 2
// LSB (input and output rounding); a fourth run uses random coefficients. The FIFO model goes empty
// at random, so stalls occur. Also checks the start-up latency
// (1 + L + M+2 clocks), and a run in which omega changes every 37 clocks
// while streaming, where the output must stay on the sine (the phase
// accumulator carries on across the change); the in-order check shows no sample is lost or repeated.
module tb_awg_resampler;
  import awg_pkg::*;
  import awg_tb_ref_pkg::*;
  localparam int K = 8, M = 11, N = 5, T = 2*N + 1;
  localparam int L = (2*N + 2*K + K - 1) / K;
  localparam int CA = $clog2(M*T);
  localparam int PER = 64;
  localparam real AMP = 30000.0;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, run = 0;
  omega_t omega = '0;
  logic coef_we = 0;
  logic [CA-1:0] coef_waddr = '0;
  coef_t coef_wdata = '0;
  logic [K*SAMPLE_W-1:0] fifo_rdata;
  logic fifo_empty, fifo_rd_en;
  sample_t dac_data [K];
  logic dac_valid, ev_shift, ev_stall, priming;

  awg_resampler #(.K(K), .M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nstall = 0, nshift = 0, cyc = 0;
  int wave [PER];
  longint cflat [$];
  int next_word;       // index of the next FIFO word
  bit hold;            // FIFO model pretends to be empty
  int maxerr;

  always @(posedge clk) cyc++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // FIFO model: word w holds x[K*w .. K*w+K-1] of the periodic wave
  always_comb begin
    for (int j = 0; j < K; j++)
      fifo_rdata[j*SAMPLE_W +: SAMPLE_W] = SAMPLE_W'(wave[(next_word*K + j) % PER]);
    fifo_empty = hold;
  end
  always @(posedge clk) if (fifo_rd_en && !fifo_empty) next_word <= next_word + 1;
  always @(posedge clk) begin
    if (ev_stall) nstall++;
    if (ev_shift) nshift++;
  end

  task automatic load_coefs();
    for (int i = 0; i < M*T; i++) begin
      @(negedge clk);
      coef_we = 1; coef_waddr = CA'(i); coef_wdata = coef_t'(cflat[i]);
    end
    @(negedge clk); coef_we = 0;
  endtask

  task automatic run_case(real ratio, bit check_sine, int nclk, int hold_pct);
    longint unsigned j, ph;
    int t_run, first;
    omega = omega_t'(longint'(ratio * 4294967296.0));
    next_word = 0; hold = 0; j = 0; first = -1; maxerr = 0;
    @(negedge clk); run = 1; t_run = cyc;
    for (int c = 0; c < nclk; c++) begin
      @(negedge clk);
      hold = (c > 2*L) && (($urandom % 100) < hold_pct);
      if (dac_valid) begin
        if (first < 0) first = cyc - t_run;
        for (int p = 0; p < K; p++) begin
          longint wq [$];
          int e;
          ph = j * longint'(omega);
          wq.delete();
          for (int t = 0; t < T; t++) wq.push_back(longint'(wave[(int'(ph >> 32) + t) % PER]));
          e = farrow_ref(M, T, cflat, wq, longint'(uint_t'(ph >> (32 - U_W))));
          chk(dac_data[p] == sample_t'(e), $sformatf("j=%0d got %0d exp %0d", j, dac_data[p], e));
          if (check_sine) begin
            real pos, ideal;
            int err;
            pos = real'(N) + real'(ph) / 4294967296.0;
            ideal = AMP * $sin(2.0 * PI * pos / real'(PER));
            err = int'(dac_data[p]) - $rtoi(ideal);
            if (err < 0) err = -err;
            if (err > maxerr) maxerr = err;
          end
          j++;
        end
      end
    end
    hold = 0;
    @(negedge clk); run = 0;
    repeat (M + 4) @(negedge clk);
    chk(first == 1 + L + M + 2, $sformatf("start-up latency %0d", first));
    if (check_sine) chk(maxerr <= 2, $sformatf("sine error %0d LSB", maxerr));
    $display("ratio %f: %0d outputs, max sine error %0d LSB", ratio, j, maxerr);
  endtask

  // omega changes every 37 clocks while streaming; the FIFO never runs dry,
  // so every clock after priming is an output clock. Output positions are
  // accumulated per clock with that clock's omega, so the output must stay
  // on the same sine curve across every change (phase-continuous switching).
  task automatic run_switching(int nclk);
    longint unsigned pstart, ph;
    omega_t omq [$];
    bit seen_prime;
    int nsw;
    omega = omega_t'(longint'(0.5 * 4294967296.0));
    next_word = 0; hold = 0; pstart = 0; maxerr = 0; seen_prime = 0; nsw = 0;
    @(negedge clk); run = 1;
    for (int c = 0; c < nclk; c++) begin
      @(negedge clk);
      if (priming) seen_prime = 1;
      if (seen_prime && !priming) begin
        if (c % 37 == 0) begin
          omega = omega_t'(32'h4000_0000 + ($urandom % 32'hA000_0000));
          nsw++;
        end
        omq.push_back(omega);
      end
      if (dac_valid) begin
        omega_t wc;
        wc = omq.pop_front();
        for (int p = 0; p < K; p++) begin
          longint wq [$];
          int e, err;
          real pos, ideal;
          ph = pstart + longint'(p) * longint'(wc);
          wq.delete();
          for (int t = 0; t < T; t++) wq.push_back(longint'(wave[(int'(ph >> 32) + t) % PER]));
          e = farrow_ref(M, T, cflat, wq, longint'(uint_t'(ph >> (32 - U_W))));
          chk(dac_data[p] == sample_t'(e), $sformatf("switching: got %0d exp %0d", dac_data[p], e));
          pos = real'(N) + real'(ph) / 4294967296.0;
          ideal = AMP * $sin(2.0 * PI * pos / real'(PER));
          err = int'(dac_data[p]) - $rtoi(ideal);
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
        end
        pstart += longint'(K) * longint'(wc);
      end
    end
    @(negedge clk); run = 0;
    repeat (M + 4) @(negedge clk);
    chk(nsw > 5, "omega changes");
    chk(maxerr <= 2, $sformatf("sine error across omega changes %0d LSB", maxerr));
    $display("switching: %0d omega changes, max sine error %0d LSB", nsw, maxerr);
  endtask

  initial begin
    for (int i = 0; i < PER; i++) wave[i] = $rtoi(AMP * $sin(2.0 * PI * real'(i) / real'(PER)));
    hold = 0; next_word = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    lagrange3(M, N, cflat);
    load_coefs();
    run_case(983.0/2000.0,  1, 400, 0);
    run_case(1228.0/2000.0, 1, 400, 20);
    run_case(1474.0/2000.0, 1, 400, 40);
    run_switching(400);
    cflat.delete();
    for (int i = 0; i < M*T; i++) cflat.push_back(longint'($signed($urandom % 2**18) - 2**17));
    load_coefs();
    run_case(0.87654321, 0, 400, 30);
    chk(nstall > 0, "stall exercised");
    chk(nshift > 0, "register update exercised");
    $display("shifts=%0d stalls=%0d", nshift, nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
