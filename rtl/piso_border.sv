// piso_border: parallel-in/serial-out interface of the output border case.
//
// Takes two words from the array in one PA cycle and sends them to one bank
// port over the two memory cycles of the next PA cycle: din0 in phase 0 and
// din1 in phase 1. It loads both words into a register pair at the end of
// every PA cycle (a memory clock edge with phase = 1) and selects one of
// them by the TAGM's phase. The PISO function follows the memory scheme;
// the register pair and the order of the words are this design's choices.
//
// Timing: words present during PA cycle c are on dout during PA cycle c+1,
// din0 in its first memory cycle and din1 in its second.
module piso_border
  import ems_pkg::*;
(
  input  logic  clk_2x,
  input  logic  phase,   // TAGM T flip-flop
  input  word_t din0,
  input  word_t din1,
  output word_t dout
);

  word_t r0, r1;

  always_ff @(posedge clk_2x) begin
    if (phase) begin
      r0 <= din0;
      r1 <= din1;
    end
  end

  assign dout = phase ? r1 : r0;

endmodule
