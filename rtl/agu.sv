// agu: address generator unit for one processor lane of one memory bank.
//
// Computes the bank address of the datum a lane needs from the index bus,
// using the bank addressing formula
//     addr = N*k' + i' - FCOL*N*(tilep + BANK)
// where k' = k + LANE is the lane's own processor index (the AGU is
// replicated once per lane along the array border) and i' is the scanned
// index. The formula itself, and the replication of AGUs per lane, follow the
// memory scheme; its mapping of lanes to k, and FCOL = SSP/2 for a pair of
// banks per variable, are this design's reading of it.
//
// SCAN = 0 (border cases): i' = i from the index bus; the unit is purely
//   combinational and clk_1x/rst are unused.
// SCAN = 1 (broadcast cases): a counter in the PA clock domain scans the
//   other processor index, i' = i + pos, pos = 0..SSP-1. pos restarts at 0 on
//   an index with 'first' set and advances by one on every valid index,
//   wrapping after SSP-1. 'last' flags pos == SSP-1.
// The address is combinational from the index bus (and the counter); the
// bank registers it. Arithmetic is done at 32 bits and truncated to ADDR_W.
module agu
  import ems_pkg::*;
#(
  parameter int unsigned SSP  = 8,   // strip size: lanes per array border
  parameter int unsigned FCOL = 4,   // columns per data block in a bank
  parameter int unsigned BANK = 0,   // bank id within the variable's bank pair
  parameter int unsigned LANE = 0,   // processor index offset of this lane
  parameter bit          SCAN = 1'b0 // 1: scan i with a counter (broadcast)
) (
  input  logic     clk_1x,
  input  logic     rst,
  input  idx_bus_t idx,
  input  idx_t     n,        // problem size N
  output addr_t    addr,
  output logic [$clog2(SSP)-1:0] pos,
  output logic     last
);

  localparam int unsigned PW = $clog2(SSP);

  logic [PW-1:0] cnt;

  if (SCAN) begin : g_scan
    always_comb pos = (idx.valid && idx.first) ? '0 : cnt;

    always_ff @(posedge clk_1x) begin
      if (rst)            cnt <= '0;
      else if (idx.valid) cnt <= (pos == PW'(SSP-1)) ? '0 : pos + 1'b1;
    end
  end else begin : g_noscan
    always_comb pos = '0;
    always_comb cnt = '0;
  end

  assign last = (pos == PW'(SSP-1));

  logic [31:0] ii, kk, nn, sum;
  always_comb begin
    nn  = 32'(n);
    ii  = 32'(idx.i) + 32'(pos);
    kk  = 32'(idx.k) + LANE;
    sum = nn * kk + ii - FCOL * nn * (32'(idx.tilep) + BANK);
    addr = sum[ADDR_W-1:0];
  end

endmodule
