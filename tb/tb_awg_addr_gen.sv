// tb_awg_addr_gen: checks the waveform address generator against a counter
// model: stepping only on advance, wrapping after len_words words, the last
// flag on the final word, and return to word 0 when run drops.
module tb_awg_addr_gen;
  localparam int AW = 4;
  logic clk = 0, rst_n = 0, run = 0, advance = 0;
  logic [AW:0] len_words;
  logic [AW-1:0] addr;
  logic last;
  int checks = 0, failures = 0, wraps = 0, exp_addr = 0;

  awg_addr_gen #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%0d exp=%0d", what, addr, exp_addr); end
  endtask

  initial begin
    len_words = 5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      len_words = (pass == 0) ? 5 : (pass == 1) ? 16 : 1;
      @(negedge clk); run = 1; exp_addr = 0;
      for (int c = 0; c < 200; c++) begin
        advance = ($urandom % 4) != 0;
        @(negedge clk);
        if (advance) begin
          if (exp_addr == int'(len_words) - 1) begin exp_addr = 0; wraps++; end
          else exp_addr++;
        end
        chk(addr == AW'(exp_addr), "address");
        chk(last == (exp_addr == int'(len_words) - 1), "last flag");
      end
      advance = 0; run = 0;
      @(negedge clk);
      chk(addr == 0, "cleared by run low");
    end
    chk(wraps > 10, "wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
