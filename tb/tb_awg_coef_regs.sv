// tb_awg_coef_regs: checks the reset value of the coefficient store (a
// single 1.0 on H(0) at the centre tap), then random host writes, including
// writes to addresses past the end, which must change nothing.
module tb_awg_coef_regs;
  import awg_pkg::*;
  localparam int M = 11, N = 5, T = 2*N + 1;
  localparam int CA = $clog2(M*T);
  logic clk = 0, rst_n = 0, we = 0;
  logic [CA-1:0] waddr;
  coef_t wdata;
  coef_t coef [M][T];
  coef_t model [M*T];
  int checks = 0, failures = 0;

  awg_coef_regs #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < M*T; i++) begin
      checks++;
      if (coef[i/T][i%T] !== model[i]) begin
        failures++; $display("FAIL %s entry %0d got %0d exp %0d", what, i, coef[i/T][i%T], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < M*T; i++) model[i] = (i == N) ? coef_t'(1 << COEF_FRAC) : '0;
    waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");
    for (int c = 0; c < 600; c++) begin
      we = 1; waddr = CA'($urandom % (2**CA)); wdata = coef_t'($urandom);
      if (int'(waddr) < M*T) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      if (c % 50 == 0) compare("write");
    end
    compare("final");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
