// delay_line: the tapped delay line of a direct-form FIR filter.
//
// DEPTH registers of W bits form a shift register. When en is high, din enters taps[0] and
// every tap moves one place down, so after the clock edge taps[i] holds x[n-i], where x[n] is
// the sample just accepted. When en is low all taps hold, which lets the filter accept samples
// at any rate up to one per clock. Synchronous active-low reset clears every tap to zero, the
// state of a filter that has seen only zero input.
//
// The delay elements of the direct form follow the filter's design; the enable, the reset
// and its zero value are this design's own choices.
module delay_line #(
  parameter int DEPTH = 29,  // number of taps (filter order + 1)
  parameter int W     = 12   // sample width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
