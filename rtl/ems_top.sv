// ems_top: external memory system of an SSP x SSP matrix-multiplication
// processor array (default 8 x 8), with all four memory cases.
//
// The array itself and its controller are outside this module; their
// signals are ports. The memory runs on clk_2x, twice the array clock clk_1x,
// and every bank is dual-ported, so each bank moves four words per array
// cycle. Each variable has SSP/4 banks (two by default) and one module per
// bank:
//   A  input border    : SSP/4 input_border modules feed a_data[p], one word
//                        per border lane p per cycle.
//   B  input broadcast : SSP/4 input_bcast modules fill SSP sub-block buses,
//                        which bcast_in_array spreads so that b_data[r][s]
//                        is the word of PE (r, s).
//   C  output border   : a layer of transporting elements (te) carries
//                        c_res[r][s] along row r to the border, where SSP/4
//                        output_border modules store it.
//   D  output broadcast: bcast_out_array gathers d_res[r][s] into SSP buses
//                        and SSP/4 output_bcast modules store them.
// A, B and C are the three cases the matrix product needs (two input
// variables, one output); D is the fourth case of the scheme, brought out
// side by side with its own ports.
//
// Each variable has its own index bus from the array controller. Every bank
// has a host port (memory clock domain) that takes over bank port 0 while
// the array is idle; host[] index = 2*variable + bank, variables A, B, C, D
// in that order, so host[0..1] are A's banks and host[6..7] D's (for the
// default SSP = 8).
// Timing of each path is that of its modules: A data 2 cycles after its
// index; B buses ready 1 cycle after the last index of a scan, then column s
// of b_data 2+s cycles after that; C words are written 1 cycle after their
// index; D buses valid COLS+1 cycles after d_capture.
module ems_top
  import ems_pkg::*;
#(
  parameter int unsigned SSP   = 8,
  parameter int unsigned FCOL  = 4,
  parameter int unsigned DEPTH = BANK_DEPTH
) (
  input  logic      clk_2x,
  input  logic      clk_1x,
  input  logic      rst,
  input  idx_t      n,
  // variable A, input border
  input  idx_bus_t  idx_a,
  output word_t     a_data [SSP],
  output logic      a_valid,
  // variable B, input broadcast
  input  idx_bus_t  idx_b,
  output word_t     b_data [SSP][SSP],
  output logic      b_valid [SSP],
  // variable C, output border through the transporting elements
  input  idx_bus_t  idx_c,
  input  word_t     c_res [SSP][SSP],
  input  logic      c_sel [SSP][SSP],
  // variable D, output broadcast
  input  idx_bus_t  idx_d,
  input  logic      d_capture,
  input  word_t     d_res [SSP][SSP],
  output logic      d_bus_valid,
  // host access to every bank
  input  host_req_t host [4*(SSP/FCOL)],
  output word_t     host_rdata [4*(SSP/FCOL)]
);

  localparam int unsigned NB = SSP / FCOL;  // banks per variable

  if (FCOL != 4 || SSP % FCOL != 0) begin : g_size_check
    $error("ems_top: FCOL must be 4 and divide SSP");
  end

  // ---------------- A: input border ----------------
  logic a_v [NB];
  for (genvar b = 0; b < NB; b++) begin : g_a
    word_t d4 [4];
    input_border #(.SSP(SSP), .FCOL(FCOL), .BANK(b), .DEPTH(DEPTH)) u_mod (
      .clk_2x, .clk_1x, .rst, .idx(idx_a), .n, .data(d4), .out_valid(a_v[b]),
      .host(host[0*NB+b]), .host_rdata(host_rdata[0*NB+b])
    );
    for (genvar q = 0; q < 4; q++) begin : g_q
      assign a_data[4*b+q] = d4[q];
    end
  end
  assign a_valid = a_v[0];

  // ---------------- B: input broadcast ----------------
  word_t b_sub [SSP][SSP];
  logic  b_rdy [NB];
  for (genvar b = 0; b < NB; b++) begin : g_b
    word_t bus4 [4][SSP];
    input_bcast #(.SSP(SSP), .FCOL(FCOL), .BANK(b), .DEPTH(DEPTH)) u_mod (
      .clk_2x, .clk_1x, .rst, .idx(idx_b), .n, .bus(bus4), .bus_ready(b_rdy[b]),
      .host(host[1*NB+b]), .host_rdata(host_rdata[1*NB+b])
    );
    for (genvar q = 0; q < 4; q++) begin : g_q
      assign b_sub[4*b+q] = bus4[q];
    end
  end

  bcast_in_array #(.ROWS(SSP), .COLS(SSP)) u_b_array (
    .clk_1x, .rst, .load(b_rdy[0]), .sub(b_sub), .pe_data(b_data), .pe_valid(b_valid)
  );

  // ---------------- C: transporting elements + output border ----------------
  word_t c_border [SSP];
  for (genvar r = 0; r < SSP; r++) begin : g_te_row
    word_t chain [SSP+1];
    assign chain[0] = '0;
    for (genvar s = 0; s < SSP; s++) begin : g_te
      te u_te (
        .clk_1x, .rst, .sel_pe(c_sel[r][s]), .pe_res(c_res[r][s]),
        .prev(chain[s]), .out(chain[s+1])
      );
    end
    assign c_border[r] = chain[SSP];
  end

  for (genvar b = 0; b < NB; b++) begin : g_c
    word_t d4 [4];
    for (genvar q = 0; q < 4; q++) begin : g_q
      assign d4[q] = c_border[4*b+q];
    end
    output_border #(.SSP(SSP), .FCOL(FCOL), .BANK(b), .DEPTH(DEPTH)) u_mod (
      .clk_2x, .clk_1x, .rst, .idx(idx_c), .n, .din(d4),
      .host(host[2*NB+b]), .host_rdata(host_rdata[2*NB+b])
    );
  end

  // ---------------- D: output broadcast ----------------
  word_t d_sub [SSP][SSP];
  bcast_out_array #(.ROWS(SSP), .COLS(SSP)) u_d_array (
    .clk_1x, .rst, .capture(d_capture), .pe_res(d_res), .sub(d_sub), .bus_valid(d_bus_valid)
  );

  for (genvar b = 0; b < NB; b++) begin : g_d
    word_t bus4 [4][SSP];
    for (genvar q = 0; q < 4; q++) begin : g_q
      assign bus4[q] = d_sub[4*b+q];
    end
    output_bcast #(.SSP(SSP), .FCOL(FCOL), .BANK(b), .DEPTH(DEPTH)) u_mod (
      .clk_2x, .clk_1x, .rst, .idx(idx_d), .n, .bus(bus4),
      .host(host[3*NB+b]), .host_rdata(host_rdata[3*NB+b])
    );
  end

endmodule
