// awg_async_fifo: waveform sample FIFO between the variable-rate waveform
// source and the fixed-rate resampler.
//
// Each word carries K samples (16*K bits). The write side runs on the
// variable sampling clock and the read side on the fixed (DAC / K) clock, so
// the FIFO is a dual-clock FIFO: binary pointers with one extra wrap bit,
// exchanged between the domains in Gray code through two-flop synchronisers.
// The read side is first-word-fall-through: rdata shows the oldest word
// whenever rempty is low, and rd_en pops it. wlevel is the write side's
// (conservative) fill level, used by the producer for flow control. Writes
// to a full FIFO and reads from an empty one are ignored and flagged by
// assertions. The clock-crossing construction is this design's choice; the
// paper names the FIFO and its 16k-bit word.
module awg_async_fifo #(
  parameter int unsigned DW = 128,          // word width
  parameter int unsigned AW = 4             // log2 of depth
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  output logic [AW:0]   wlevel,

  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          rempty
);

  localparam int unsigned DEPTH = 2**AW;

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;          // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;          // write pointer seen in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] rbin_w;
  assign rbin_w = gray2bin(rgray_w2);
  assign wlevel = wbin - rbin_w;
  assign wfull  = (wlevel == (AW+1)'(DEPTH));

  always_ff @(posedge wclk) begin
    if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) wr_en |-> !wfull)
    else $error("sample FIFO written while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) rd_en |-> !rempty)
    else $error("sample FIFO read while empty");

endmodule
