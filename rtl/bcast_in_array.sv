// bcast_in_array: broadcast data array of the input broadcast case.
//
// Carries ROWS sub-blocks of COLS words from the array border to the PEs.
// All sub-blocks enter together, one per row. At each pipeline stage the
// word for that column's PE is taken into the PE's hold register and the
// rest move on, so stage s stores COLS-s words per row. With the hold
// registers that is ROWS*(1+2+...+COLS) + ROWS*COLS registers in all. This
// organisation follows the memory scheme.
//
// Timing: 'load' high in PA cycle c takes sub[][] at the end of c. Stage 0
// holds it during c+1; the hold registers of column s update at the end of
// PA cycle c+1+s, and pe_valid[s] is high for the cycle after that. A new
// block may be loaded every PA cycle.
module bcast_in_array
  import ems_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic  clk_1x,
  input  logic  rst,
  input  logic  load,
  input  word_t sub [ROWS][COLS],     // sub[r][p]: word for PE (r, p)
  output word_t pe_data [ROWS][COLS], // hold register of PE (r, s)
  output logic  pe_valid [COLS]       // column s hold registers just updated
);

  for (genvar s = 0; s < COLS; s++) begin : g_stg
    localparam int unsigned L = COLS - s;
    word_t d [ROWS][L];
    logic  v;

    if (s == 0) begin : g_first
      always_ff @(posedge clk_1x) begin
        if (rst) v <= 1'b0;
        else     v <= load;
      end
      always_ff @(posedge clk_1x) begin
        if (load) d <= sub;
      end
    end else begin : g_next
      always_ff @(posedge clk_1x) begin
        if (rst) v <= 1'b0;
        else     v <= g_stg[s-1].v;
      end
      always_ff @(posedge clk_1x) begin
        if (g_stg[s-1].v)
          for (int r = 0; r < ROWS; r++)
            for (int w = 0; w < L; w++)
              d[r][w] <= g_stg[s-1].d[r][w+1];
      end
    end

    // Hold registers of column s.
    always_ff @(posedge clk_1x) begin
      if (v)
        for (int r = 0; r < ROWS; r++) pe_data[r][s] <= d[r][0];
    end
    always_ff @(posedge clk_1x) begin
      if (rst) pe_valid[s] <= 1'b0;
      else     pe_valid[s] <= v;
    end
  end

endmodule
