// tb_awg_wave_lut: fills the waveform look-up table one sample at a time
// with random data and reads it back a K-sample word at a time, checking
// lane order and the one-clock read latency against a model array.
module tb_awg_wave_lut;
  import awg_pkg::*;
  localparam int K = 4, AW = 4, LW = 2;
  logic clk = 0, we = 0, re = 0;
  logic [AW+LW-1:0] waddr;
  sample_t wdata;
  logic [AW-1:0] raddr;
  sample_t rdata [K];
  sample_t model [2**(AW+LW)];
  int checks = 0, failures = 0;

  awg_wave_lut #(.K(K), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 2**(AW+LW); a++) begin
        @(negedge clk);
        we = 1; waddr = (AW+LW)'(a); wdata = sample_t'($urandom);
        model[a] = wdata;
      end
      @(negedge clk); we = 0;
      for (int w = 0; w < 2**AW; w++) begin
        int rw = (w * 7 + pass) % (2**AW);
        re = 1; raddr = AW'(rw);
        @(negedge clk);
        re = 0;
        for (int j = 0; j < K; j++) begin
          checks++;
          if (rdata[j] !== model[rw*K + j]) begin
            failures++;
            $display("FAIL word %0d lane %0d got %0d exp %0d", rw, j, rdata[j], model[rw*K+j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
