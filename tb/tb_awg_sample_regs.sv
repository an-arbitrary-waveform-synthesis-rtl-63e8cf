// tb_awg_sample_regs: shifts random K-sample words into the waveform sample
// registers and checks, for random legal base addresses, that every path
// sees the 2N+1 samples centred on its base, against a model of the last
// L*K samples received.
module tb_awg_sample_regs;
  import awg_pkg::*;
  localparam int K = 4, N = 2;
  localparam int L = (2*N + 2*K + K - 1) / K;
  localparam int LK = L*K, T = 2*N + 1;
  localparam int BW = $clog2(LK);
  logic clk = 0, rst_n = 0, shift = 0;
  sample_t din [K];
  logic [BW-1:0] base [K];
  sample_t win [K][T];
  sample_t model [$];
  int checks = 0, failures = 0;

  awg_sample_regs #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < LK; i++) model.push_back('0);
    for (int j = 0; j < K; j++) begin din[j] = '0; base[j] = BW'(N); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      shift = ($urandom % 3) == 0;
      for (int j = 0; j < K; j++) din[j] = sample_t'($urandom);
      if (shift) begin
        for (int j = 0; j < K; j++) begin void'(model.pop_front()); model.push_back(din[j]); end
      end
      @(negedge clk);
      shift = 0;
      for (int r = 0; r < 3; r++) begin
        for (int p = 0; p < K; p++) base[p] = BW'(N + ($urandom % (LK - 2*N)));
        #1;
        for (int p = 0; p < K; p++)
          for (int t = 0; t < T; t++) begin
            int idx;
            idx = int'(base[p]) - N + t;
            checks++;
            if (win[p][t] !== model[idx]) begin
              failures++;
              $display("FAIL path %0d tap %0d base %0d", p, t, base[p]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
