// tb_awg_phase_ctrl: checks the phase controller against the closed form
// of the resampling index: output j has J = floor(j*omega) and time interval
// u = the top bits of frac(j*omega). The expected base address is N + J
// minus K for every register shift so far; a shift is due when the last
// base of a clock minus N exceeds K-1; with the FIFO empty that clock must
// stall instead. Covers priming, random FIFO emptiness, several control
// words (the three ratios 983/2000, 1228/2000, 1474/2000 among them, and
// ones close to 0 and 1), and restart by run.
module tb_awg_phase_ctrl;
  import awg_pkg::*;
  localparam int K = 8, N = 5;
  localparam int L = (2*N + 2*K + K - 1) / K;
  localparam int BW = $clog2(L*K);
  logic clk = 0, rst_n = 0, run = 0, fifo_empty = 1;
  omega_t omega;
  logic shift, out_valid, stall, priming;
  logic [BW-1:0] base [K];
  uint_t u [K];
  int checks = 0, failures = 0, nstall = 0, nshift = 0, nvalid = 0;

  awg_phase_ctrl #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    omega_t wlist [7];
    wlist = '{omega_t'(64'd983 * 2**32 / 2000), omega_t'(64'd1228 * 2**32 / 2000),
              omega_t'(64'd1474 * 2**32 / 2000), 32'hFFFF_FFF0, 32'h0100_0000,
              omega_t'($urandom), omega_t'($urandom)};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (wlist[w]) begin
      longint unsigned j;
      int s, filled;
      j = 0; s = 0; filled = 0;
      @(negedge clk);
      omega = wlist[w];
      run = 1;
      @(negedge clk);                       // idle -> prime
      for (int c = 0; c < 1500; c++) begin
        fifo_empty = ($urandom % 10) < 3;
        #1;
        if (filled < L) begin
          chk(priming && !out_valid, "priming state");
          chk(shift == !fifo_empty, "priming shift");
          if (!fifo_empty) filled++;
        end else begin
          longint unsigned ph;
          int bexp [K];
          bit need;
          for (int p = 0; p < K; p++) begin
            ph = (j + longint'(p)) * longint'(omega);
            bexp[p] = N + int'(ph >> 32) - K*s;
          end
          need = (bexp[K-1] - N) > K - 1;
          chk(!priming, "not priming");
          chk(stall == (need && fifo_empty), "stall");
          chk(out_valid == !(need && fifo_empty), "valid");
          chk(shift == (need && !fifo_empty), "shift");
          if (out_valid) begin
            nvalid++;
            for (int p = 0; p < K; p++) begin
              ph = (j + longint'(p)) * longint'(omega);
              chk(int'(base[p]) == bexp[p], $sformatf("base w%0d j%0d p%0d got %0d exp %0d", w, j, p, base[p], bexp[p]));
              chk(u[p] == uint_t'(ph >> (32 - U_W)), $sformatf("u w%0d j%0d p%0d", w, j, p));
            end
            j += K;
            if (need) begin s++; nshift++; end
          end else nstall++;
        end
        @(negedge clk);
      end
      run = 0;
      @(negedge clk);
    end
    chk(nstall > 0, "stall exercised");
    chk(nshift > 0, "shift exercised");
    $display("valid=%0d shifts=%0d stalls=%0d", nvalid, nshift, nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
