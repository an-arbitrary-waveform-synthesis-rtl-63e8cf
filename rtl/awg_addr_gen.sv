// awg_addr_gen: waveform address generator of the variable-rate synthesis part.
//
// The address runs one by one over the stored waveform and starts again at
// the beginning after the last sample, so the waveform is read in storage
// order with no phase truncation. Because the downstream sample FIFO takes K
// samples per word, the generator steps a word address: word w covers samples
// K*w .. K*w+K-1, and it wraps after len_words words (the waveform length
// must therefore be a multiple of K; this restriction is this design's own).
//
// Interface: while run is high and advance is high the address moves on by
// one word each clock; run low returns it to word 0. addr is the word address
// of the current read, wrap pulses for the clock in which the last word of the
// waveform is addressed. Registered outputs, one step per clock.
module awg_addr_gen #(
  parameter int unsigned AW = 11            // word address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          advance,
  input  logic [AW:0]   len_words,          // waveform length in K-sample words, >= 1
  output logic [AW-1:0] addr,
  output logic          last
);

  assign last = ({1'b0, addr} == len_words - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           addr <= '0;
    else if (!run)        addr <= '0;
    else if (advance)     addr <= last ? '0 : addr + 1'b1;
  end

endmodule
