// sipo_bcast: serial-in/parallel-out register of the input broadcast case.
//
// In the broadcast case each array row needs a whole sub-block of SSP words
// (one per PE of the row) at once. This SIPO, in the memory clock domain,
// shifts in one word from a bank port every time 'en' is set and presents
// the last SSP words in parallel: after SSP shifts, bus[p] holds the p-th
// word shifted in. Storing SSP words per SIPO follows the memory scheme; the
// shift direction is this design's choice.
module sipo_bcast
  import ems_pkg::*;
#(
  parameter int unsigned SSP = 8
) (
  input  logic  clk_2x,
  input  logic  en,
  input  word_t din,
  output word_t bus [SSP]
);

  always_ff @(posedge clk_2x) begin
    if (en) begin
      for (int p = 0; p < SSP - 1; p++) bus[p] <= bus[p+1];
      bus[SSP-1] <= din;
    end
  end

endmodule
