// te: transporting element of the output border case.
//
// When the problem size does not fill the partitioned array exactly, results
// of the output border variable are produced by inner processing elements
// (PEs), not by the border ones. A layer of TEs, one per PE and chained like
// the array's own links, moves them to the border: each TE selects either
// its PE's result or its upstream neighbour's TE output, and registers the
// choice, adding one PA cycle per hop. This follows the memory scheme; the
// per-TE select input is how this design exposes the choice.
module te
  import ems_pkg::*;
(
  input  logic  clk_1x,
  input  logic  rst,
  input  logic  sel_pe,   // 1: take the PE result, 0: pass the neighbour's
  input  word_t pe_res,
  input  word_t prev,     // output of the upstream TE (tie to 0 at the far end)
  output word_t out
);

  always_ff @(posedge clk_1x) begin
    if (rst) out <= '0;
    else     out <= sel_pe ? pe_res : prev;
  end

endmodule
