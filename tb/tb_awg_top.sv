// tb_awg_top: end-to-end test of the whole waveform generator at its
// default sizes (K = 8 paths, M = 11 sub-filters of 11 taps).
//
// A 64-sample sine period is written into the waveform memory and a cubic
// Lagrange interpolator into the coefficient store. Taking the fixed clock
// as f_DAC / K with f_DAC = 2 GS/s, the generator then runs at the three
// ratios omega = 983/2000, 1228/2000 and 1474/2000, i.e. source rates of
// 983 MS/s, 1.228 GS/s and 1.474 GS/s. For each run the testbench checks:
//  - every DAC sample bit-exactly against the resampling formula applied to
//    the stored waveform (output j at input position floor(j*omega));
//  - every DAC sample against the ideal sine to within 2 LSB;
//  - the output frequency, from rising zero crossings, against
//    f_DAC * omega / 64 (15.359375, 19.1875 and 23.03125 MHz) to 0.01 %;
//  - the latency of M+2 clocks from the end of priming to the first output.
// The source clock is fast in the first two runs, so the FIFO fills and
// holds the source back, and slow in the third, so the FIFO runs dry and the
// resampler stalls. Each mechanism (FIFO full hold, waveform wrap, register
// update, stall, priming, coefficient write, ratio change) is counted and
// must occur. Between runs both clock domains are reset to restart the
// stream.
module tb_awg_top;
  import awg_pkg::*;
  import awg_tb_ref_pkg::*;
  localparam int K = 8, M = 11, N = 5, T = 2*N + 1, WAW = 11;
  localparam int L = (2*N + 2*K + K - 1) / K;
  localparam int CA = $clog2(M*T);
  localparam int PER = 64;
  localparam real AMP = 30000.0;
  localparam real PI = 3.14159265358979;
  localparam real FDAC = 2.0e9;

  logic clk_var = 0, rst_var_n = 0, wave_we = 0, src_run = 0, src_wrap, src_hold;
  logic [WAW+$clog2(K)-1:0] wave_waddr = '0;
  sample_t wave_wdata = '0;
  logic [WAW:0] wave_len_words = '0;
  logic clk = 0, rst_n = 0, rs_run = 0, coef_we = 0;
  omega_t omega = '0;
  logic [CA-1:0] coef_waddr = '0;
  coef_t coef_wdata = '0;
  sample_t dac_data [K];
  logic dac_valid, ev_shift, ev_stall, priming;

  awg_top dut (.*);

  real var_half = 3.5;
  always #5 clk = ~clk;
  always #(var_half) clk_var = ~clk_var;

  int checks = 0, failures = 0, cyc = 0;
  int n_hold = 0, n_wrap = 0, n_shift = 0, n_stall = 0, n_prime = 0, n_coef = 0, n_ratio = 0;
  int wave [PER];
  longint cflat [$];

  always @(posedge clk) begin
    cyc++;
    if (ev_shift) n_shift++;
    if (ev_stall) n_stall++;
    if (priming)  n_prime++;
    if (coef_we)  n_coef++;
  end
  always @(posedge clk_var) begin
    if (src_hold) n_hold++;
    if (src_wrap) n_wrap++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic reset_all();
    rst_n = 0; rst_var_n = 0; src_run = 0; rs_run = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; rst_var_n = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic load_wave();
    for (int i = 0; i < PER; i++) begin
      @(negedge clk_var);
      wave_we = 1; wave_waddr = (WAW+$clog2(K))'(i); wave_wdata = sample_t'(wave[i]);
    end
    @(negedge clk_var); wave_we = 0;
    wave_len_words = (WAW+1)'(PER / K);
  endtask

  task automatic load_coefs();
    for (int i = 0; i < M*T; i++) begin
      @(negedge clk);
      coef_we = 1; coef_waddr = CA'(i); coef_wdata = coef_t'(cflat[i]);
    end
    @(negedge clk); coef_we = 0;
  endtask

  task automatic run_case(int fs_msps, real vhalf, int nclk);
    longint unsigned j, ph;
    int t_run, t_prim, first, maxerr, ncross, prev;
    real x_first, x_last;
    real ratio, fexp, fmeas;
    ratio = real'(fs_msps) / 2000.0;
    var_half = vhalf;
    reset_all();
    load_coefs();
    omega = omega_t'(longint'(ratio * 4294967296.0));
    n_ratio++;
    j = 0; first = -1; t_prim = -1; maxerr = 0; ncross = 0; x_first = -1.0; x_last = -1.0; prev = 99999;
    @(negedge clk); src_run = 1; rs_run = 1; t_run = cyc;
    for (int c = 0; c < nclk; c++) begin
      @(negedge clk);
      if (t_prim < 0 && !priming && cyc - t_run > 2) t_prim = cyc;
      if (dac_valid) begin
        if (first < 0) first = cyc - t_prim;
        for (int p = 0; p < K; p++) begin
          longint wq [$];
          int e, err;
          real pos, ideal;
          ph = j * longint'(omega);
          wq.delete();
          for (int t = 0; t < T; t++) wq.push_back(longint'(wave[(int'(ph >> 32) + t) % PER]));
          e = farrow_ref(M, T, cflat, wq, longint'(uint_t'(ph >> (32 - U_W))));
          chk(dac_data[p] == sample_t'(e), $sformatf("%0d MS/s j=%0d got %0d exp %0d", fs_msps, j, dac_data[p], e));
          pos = real'(N) + real'(ph) / 4294967296.0;
          ideal = AMP * $sin(2.0 * PI * pos / real'(PER));
          err = int'(dac_data[p]) - $rtoi(ideal);
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
          if (prev < 0 && int'(dac_data[p]) >= 0) begin
            // rising zero crossing, interpolated between the two samples
            real xc;
            xc = real'(j) - real'(dac_data[p]) / real'(int'(dac_data[p]) - prev);
            ncross++;
            if (x_first < 0.0) x_first = xc;
            x_last = xc;
          end
          prev = int'(dac_data[p]);
          j++;
        end
      end
    end
    src_run = 0; rs_run = 0;
    fexp  = FDAC * ratio / real'(PER);
    fmeas = FDAC * real'(ncross - 1) / (x_last - x_first);
    chk(first == M + 2, $sformatf("latency after priming %0d", first));
    chk(maxerr <= 2, $sformatf("sine error %0d LSB", maxerr));
    chk(fmeas > fexp * 0.9999 && fmeas < fexp * 1.0001,
        $sformatf("frequency %f MHz, expected %f MHz", fmeas / 1e6, fexp / 1e6));
    $display("fs %0d MS/s: %0d samples, f_out %.6f MHz (expected %.6f), max error %0d LSB, latency %0d",
             fs_msps, j, fmeas / 1e6, fexp / 1e6, maxerr, first);
  endtask

  initial begin
    for (int i = 0; i < PER; i++) wave[i] = $rtoi(AMP * $sin(2.0 * PI * real'(i) / real'(PER)));
    lagrange3(M, N, cflat);
    reset_all();
    load_wave();
    run_case(983,  3.5, 1500);
    run_case(1228, 3.5, 1500);
    run_case(1474, 7.0, 1500);
    chk(n_hold  > 0, "FIFO full hold never happened");
    chk(n_wrap  > 0, "waveform wrap never happened");
    chk(n_shift > 0, "register update never happened");
    chk(n_stall > 0, "resampler stall never happened");
    chk(n_prime > 0, "priming never happened");
    chk(n_coef  > 0, "coefficient write never happened");
    chk(n_ratio == 3, "ratio change");
    $display("events: hold=%0d wrap=%0d shift=%0d stall=%0d prime=%0d coef=%0d ratios=%0d",
             n_hold, n_wrap, n_shift, n_stall, n_prime, n_coef, n_ratio);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
