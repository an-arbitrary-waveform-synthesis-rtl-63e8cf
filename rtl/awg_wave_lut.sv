// awg_wave_lut: waveform look-up table of the variable-rate synthesis part.
//
// Holds DEPTH words of K samples (K*DEPTH samples in all). A host port
// writes one sample at a time at a sample address (word = addr / K, lane =
// addr % K); the read port returns a whole K-sample word one clock after its
// word address, as a block RAM does. In the board this role is filled by
// DDR3 memory behind the FPGA; here it is an on-chip memory, which is this
// design's choice.
module awg_wave_lut
  import awg_pkg::*;
#(
  parameter int unsigned K  = 8,            // samples per word (parallel paths)
  parameter int unsigned AW = 11            // word address width, DEPTH = 2**AW
) (
  input  logic                       clk,
  // host write port, one sample
  input  logic                       we,
  input  logic [AW+$clog2(K)-1:0]    waddr,
  input  sample_t                    wdata,
  // read port, one word
  input  logic                       re,
  input  logic [AW-1:0]              raddr,
  output sample_t                    rdata [K]
);

  localparam int unsigned LW = $clog2(K);

  sample_t mem [2**AW][K];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+LW-1:LW]][waddr[LW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
