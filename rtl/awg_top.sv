// awg_top: FPGA part of an arbitrary waveform generator that synthesises
// the waveform at a variable sampling rate and resamples it digitally to
// the DAC's fixed rate, so the image components stay near f_DAC - f_o.
//
// Variable-rate side (clk_var): the address generator walks the waveform
// look-up table word by word (K samples per word) and writes the words into
// the sample FIFO for as long as it has room; the look-up table is loaded
// one sample at a time through the wave_* port. The FIFO crosses into the
// fixed clock domain (clk = f_DAC / K). Fixed-rate side (clk): the parallel
// resampler turns the samples into K DAC samples per clock at the ratio
// omega = f_s / f_DAC, a PHASE_W-bit fraction. The DAC, its serial link,
// the clock generators, the output low-pass filter and the host link are
// outside the FPGA logic; their signals are the ports of this module.
//
// The structure is that of Zhao et al., "An Arbitrary Waveform Synthesis
// Structure with High Sampling Rate and Low Spurious" (2022), called "the
// paper" in the comments of this design. To restart the stream with a new
// ratio or waveform, reset both domains: the FIFO keeps its old words
// otherwise.
//
// Default sizes: K = 8 paths, M = 11 sub-filters of 2N+1 = 11 taps, 16-bit
// samples. The paper gives M, N and the 16-bit samples; K, the
// memory and FIFO depths and all fixed-point widths are this design's own.
// Output latency from the phase being formed to dac_valid is M+2 clocks.
module awg_top
  import awg_pkg::*;
#(
  parameter int unsigned K    = 8,          // parallel paths
  parameter int unsigned M    = 11,         // number of Farrow sub-filters
  parameter int unsigned N    = 5,          // sub-filter order parameter, 2N+1 taps
  parameter int unsigned WAW  = 11,         // waveform memory word address width
  parameter int unsigned FAW  = 4,          // log2 of sample FIFO depth
  parameter int unsigned CA   = $clog2(M*(2*N+1))
) (
  // variable-rate (waveform synthesis) domain
  input  logic                     clk_var,
  input  logic                     rst_var_n,
  input  logic                     wave_we,
  input  logic [WAW+$clog2(K)-1:0] wave_waddr,
  input  sample_t                  wave_wdata,
  input  logic [WAW:0]             wave_len_words,   // waveform length / K
  input  logic                     src_run,
  output logic                     src_wrap,         // last word of the waveform read
  output logic                     src_hold,         // source held back by a full FIFO
  // fixed-rate (DAC) domain
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rs_run,
  input  omega_t                   omega,
  input  logic                     coef_we,
  input  logic [CA-1:0]            coef_waddr,
  input  coef_t                    coef_wdata,
  output sample_t                  dac_data [K],
  output logic                     dac_valid,
  output logic                     ev_shift,
  output logic                     ev_stall,
  output logic                     priming
);

  localparam int unsigned DW = K * SAMPLE_W;

  // ---------------- variable-rate side ----------------
  logic [WAW-1:0] raddr;
  logic           last, rd_issue, rd_pending;
  sample_t        lut_q [K];
  logic [DW-1:0]  fifo_wdata;
  logic           fifo_full;
  logic [FAW:0]   fifo_level;

  // issue a read only if the FIFO can take it after the one in flight
  assign rd_issue = src_run &&
                    (int'(fifo_level) + int'(rd_pending) < (1 << FAW));
  assign src_hold = src_run && !rd_issue;
  assign src_wrap = rd_issue && last;

  awg_addr_gen #(.AW(WAW)) u_addr (
    .clk       (clk_var),
    .rst_n     (rst_var_n),
    .run       (src_run),
    .advance   (rd_issue),
    .len_words (wave_len_words),
    .addr      (raddr),
    .last      (last)
  );

  awg_wave_lut #(.K(K), .AW(WAW)) u_lut (
    .clk   (clk_var),
    .we    (wave_we),
    .waddr (wave_waddr),
    .wdata (wave_wdata),
    .re    (rd_issue),
    .raddr (raddr),
    .rdata (lut_q)
  );

  always_ff @(posedge clk_var or negedge rst_var_n) begin
    if (!rst_var_n) rd_pending <= 1'b0;
    else            rd_pending <= rd_issue;
  end

  for (genvar j = 0; j < int'(K); j++) begin : g_pack
    assign fifo_wdata[j*SAMPLE_W +: SAMPLE_W] = lut_q[j];
  end

  // ---------------- clock crossing ----------------
  logic [DW-1:0] fifo_rdata;
  logic          fifo_empty, fifo_rd_en;

  awg_async_fifo #(.DW(DW), .AW(FAW)) u_fifo (
    .wclk   (clk_var),
    .wrst_n (rst_var_n),
    .wr_en  (rd_pending),
    .wdata  (fifo_wdata),
    .wfull  (fifo_full),
    .wlevel (fifo_level),
    .rclk   (clk),
    .rrst_n (rst_n),
    .rd_en  (fifo_rd_en),
    .rdata  (fifo_rdata),
    .rempty (fifo_empty)
  );

  // ---------------- fixed-rate side ----------------
  awg_resampler #(.K(K), .M(M), .N(N), .CA(CA)) u_rs (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (rs_run),
    .omega      (omega),
    .coef_we    (coef_we),
    .coef_waddr (coef_waddr),
    .coef_wdata (coef_wdata),
    .fifo_rdata (fifo_rdata),
    .fifo_empty (fifo_empty),
    .fifo_rd_en (fifo_rd_en),
    .dac_data   (dac_data),
    .dac_valid  (dac_valid),
    .ev_shift   (ev_shift),
    .ev_stall   (ev_stall),
    .priming    (priming)
  );

  a_no_fifo_overrun: assert property (@(posedge clk_var) disable iff (!rst_var_n)
                       rd_pending |-> !fifo_full)
    else $error("waveform source overran the sample FIFO");

endmodule
