// sipo_border: serial-in/parallel-out interface of the input border case.
//
// A bank port delivers two words per PA cycle, one per memory cycle. The
// SIPO collects them and hands both to the array together in the following
// PA cycle. It is two register pairs in two clock domains: a pair in the
// memory clock domain shifts in every word from the port, and a pair in the
// PA clock domain copies it on every PA clock edge. That structure follows
// the memory scheme; the shift order is this design's choice.
//
// Timing: words read by the phase-0 and phase-1 addresses of PA cycle c
// appear on dout0 and dout1 during PA cycle c+2. The two clocks must have
// aligned rising edges.
module sipo_border
  import ems_pkg::*;
(
  input  logic  clk_2x,
  input  logic  clk_1x,
  input  word_t din,    // bank port read data
  output word_t dout0,  // word of the phase-0 address
  output word_t dout1   // word of the phase-1 address
);

  word_t sh0, sh1;  // memory clock pair: sh1 is the older word

  always_ff @(posedge clk_2x) begin
    sh0 <= din;
    sh1 <= sh0;
  end

  always_ff @(posedge clk_1x) begin
    dout0 <= sh1;
    dout1 <= sh0;
  end

endmodule
