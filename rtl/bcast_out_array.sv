// bcast_out_array: broadcast data array of the output broadcast case.
//
// The mirror of the input broadcast array: it gathers one result from every
// PE of a row into a sub-block of COLS words at the array border, where the
// output broadcast module stores it. 'capture' copies all PE results into
// their hold registers (ROWS*COLS registers), which frees the PEs at once.
// A pipeline then walks from column 0 towards the border column COLS-1: the
// stage of column s appends the hold word of its PE to the s words it gets
// from the stage before, so it stores s+1 words per row, and the last stage
// holds the complete sub-block, word p from column p. The stages and hold
// registers follow the memory scheme; the single capture strobe is this
// design's choice.
//
// Timing: 'capture' high in PA cycle c takes pe_res at the end of c; stage s
// loads at the end of c+1+s; sub[][] is complete and bus_valid high in PA
// cycle c+1+COLS, and sub[][] then stays until the next capture reaches it.
module bcast_out_array
  import ems_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic  clk_1x,
  input  logic  rst,
  input  logic  capture,
  input  word_t pe_res [ROWS][COLS],
  output word_t sub [ROWS][COLS],
  output logic  bus_valid
);

  word_t hold [ROWS][COLS];
  logic  hv;

  always_ff @(posedge clk_1x) begin
    if (capture) hold <= pe_res;
  end
  always_ff @(posedge clk_1x) begin
    if (rst) hv <= 1'b0;
    else     hv <= capture;
  end

  for (genvar s = 0; s < COLS; s++) begin : g_stg
    localparam int unsigned L = s + 1;
    word_t d [ROWS][L];
    logic  v;

    if (s == 0) begin : g_first
      always_ff @(posedge clk_1x) begin
        if (rst) v <= 1'b0;
        else     v <= hv;
      end
      always_ff @(posedge clk_1x) begin
        if (hv)
          for (int r = 0; r < ROWS; r++) d[r][0] <= hold[r][0];
      end
    end else begin : g_next
      always_ff @(posedge clk_1x) begin
        if (rst) v <= 1'b0;
        else     v <= g_stg[s-1].v;
      end
      always_ff @(posedge clk_1x) begin
        if (g_stg[s-1].v)
          for (int r = 0; r < ROWS; r++) begin
            for (int w = 0; w < s; w++) d[r][w] <= g_stg[s-1].d[r][w];
            d[r][s] <= hold[r][s];
          end
      end
    end
  end

  assign sub       = g_stg[COLS-1].d;
  assign bus_valid = g_stg[COLS-1].v;

endmodule
