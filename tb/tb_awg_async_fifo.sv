// tb_awg_async_fifo: streams numbered words through the dual-clock sample
// FIFO with unrelated write and read clocks and random write and read
// pressure. Checks word order and content, that full and empty both occur,
// and that the write-side level never exceeds the depth.
module tb_awg_async_fifo;
  localparam int DW = 16, AW = 3;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic wfull, rempty;
  logic [AW:0] wlevel;
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  int sent = 0, got = 0;
  localparam int TOTAL = 600;

  awg_async_fifo #(.DW(DW), .AW(AW)) dut (.*);

  always #7 wclk = ~wclk;
  always #5 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: bursts fast in the first half, slow in the second
  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1;
    while (sent < TOTAL) begin
      @(negedge wclk);
      if (wfull) nfull++;
      checks++;
      if (int'(wlevel) > 2**AW) begin failures++; $display("FAIL level %0d", wlevel); end
      wr_en = !wfull && (($urandom % 8) < ((sent < TOTAL/2) ? 8 : 2));
      wdata = DW'(sent);
      if (wr_en) sent++;
    end
    @(negedge wclk); wr_en = 0;
  end

  // reader: slow in the first half, fast in the second
  initial begin
    repeat (3) @(posedge rclk);
    rrst_n = 1;
    while (got < TOTAL) begin
      @(negedge rclk);
      if (rempty) nempty++;
      rd_en = !rempty && (($urandom % 8) < ((got < TOTAL/2) ? 2 : 8));
      if (rd_en) begin
        checks++;
        if (rdata !== DW'(got)) begin
          failures++; $display("FAIL word %0d got %0d", got, rdata);
        end
        got++;
      end
    end
    @(negedge rclk); rd_en = 0;
    checks++; if (nfull == 0)  begin failures++; $display("FAIL full never seen"); end
    checks++; if (nempty == 0) begin failures++; $display("FAIL empty never seen"); end
    repeat (6) @(posedge rclk);
    checks++; if (!rempty) begin failures++; $display("FAIL not empty at end"); end
    $display("full=%0d empty=%0d", nfull, nempty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
