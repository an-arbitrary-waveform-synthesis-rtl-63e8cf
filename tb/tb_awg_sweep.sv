// tb_awg_sweep: plays a frequency sweep through the whole generator at its
// default sizes. 4096 samples of a linear sweep from 10 MHz to 114.4 MHz,
// computed for a 2 GS/s sample rate, are written into the waveform memory
// and a 10-point Lagrange interpolator into the coefficient store. The
// sweep is then played at source rates of 983 MS/s, 1.228 GS/s and
// 1.474 GS/s into a 2 GS/s output (omega = f_s / 2 GS/s). Every DAC sample
// is checked bit-exactly against the resampling formula and against the
// ideal continuous sweep at the output sample's input position, to within
// 3 LSB, for as long as the filter window stays inside the stored sweep.
module tb_awg_sweep;
  import awg_pkg::*;
  import awg_tb_ref_pkg::*;
  localparam int K = 8, M = 11, N = 5, T = 2*N + 1, WAW = 11;
  localparam int CA = $clog2(M*T);
  localparam int LEN = 4096, NP = 10;
  localparam real AMP = 28000.0;
  localparam real PI = 3.14159265358979;
  localparam real FS0 = 2.0e9, F0 = 10.0e6, F1 = 114.4e6;

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

  always #5 clk = ~clk;
  always #3 clk_var = ~clk_var;

  int checks = 0, failures = 0;
  int wave [LEN];
  longint cflat [$];

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic real sweep(real i);       // i in input samples
    real t = i / FS0;
    real dur = real'(LEN) / FS0;
    return AMP * $sin(2.0 * PI * (F0 * t + (F1 - F0) * t * t / (2.0 * dur)));
  endfunction

  task automatic run_case(int fs_msps);
    longint unsigned j, ph;
    int maxerr;
    bit done;
    rst_n = 0; rst_var_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; rst_var_n = 1;
    for (int i = 0; i < M*T; i++) begin
      @(negedge clk); coef_we = 1; coef_waddr = CA'(i); coef_wdata = coef_t'(cflat[i]);
    end
    @(negedge clk); coef_we = 0;
    omega = omega_t'(longint'(real'(fs_msps) / 2000.0 * 4294967296.0));
    j = 0; maxerr = 0; done = 0;
    @(negedge clk); src_run = 1; rs_run = 1;
    while (!done) begin
      @(negedge clk);
      if (dac_valid) for (int p = 0; p < K; p++) begin
        longint wq [$];
        int e, err, j0;
        ph = j * longint'(omega);
        j0 = int'(ph >> 32);
        if (j0 + T >= LEN) done = 1;
        else begin
          wq.delete();
          for (int t = 0; t < T; t++) wq.push_back(longint'(wave[j0 + t]));
          e = farrow_ref(M, T, cflat, wq, longint'(uint_t'(ph >> (32 - U_W))));
          chk(dac_data[p] == sample_t'(e), $sformatf("%0d MS/s j=%0d got %0d exp %0d", fs_msps, j, dac_data[p], e));
          err = int'(dac_data[p]) - $rtoi(sweep(real'(N) + real'(ph) / 4294967296.0));
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
        end
        j++;
      end
    end
    src_run = 0; rs_run = 0;
    chk(maxerr <= 3, $sformatf("sweep error %0d LSB", maxerr));
    $display("fs %0d MS/s: %0d samples, max error against the ideal sweep %0d LSB", fs_msps, j, maxerr);
  endtask

  initial begin
    for (int i = 0; i < LEN; i++) wave[i] = $rtoi(sweep(real'(i)));
    lagrange_n(NP, M, N, cflat);
    repeat (2) @(negedge clk);
    rst_n = 1; rst_var_n = 1;
    for (int i = 0; i < LEN; i++) begin
      @(negedge clk_var);
      wave_we = 1; wave_waddr = (WAW+$clog2(K))'(i); wave_wdata = sample_t'(wave[i]);
    end
    @(negedge clk_var); wave_we = 0;
    wave_len_words = (WAW+1)'(LEN / K);
    run_case(983);
    run_case(1228);
    run_case(1474);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
