// tagm: two-address generator module (TAGM) for one port of a memory bank.
//
// The bank runs at twice the PA clock, so each port makes two accesses per
// PA cycle. The TAGM holds two AGUs (lanes LANE0 and LANE1) and a T flip-flop
// in the memory clock domain that toggles every memory cycle; a multiplexer
// steered by it passes AGU0's address in the first memory cycle of a PA
// cycle (phase 0) and AGU1's in the second (phase 1). This structure follows
// the memory scheme.
//
// Timing: the T flip-flop is cleared by a reset that is released on a rising
// edge common to both clocks, so phase = 0 in the first half of every PA
// cycle (this design's choice; both clocks must come from one source with
// aligned rising edges). The index bus must be stable for the whole PA cycle.
module tagm
  import ems_pkg::*;
#(
  parameter int unsigned SSP   = 8,
  parameter int unsigned FCOL  = 4,
  parameter int unsigned BANK  = 0,
  parameter int unsigned LANE0 = 0,
  parameter int unsigned LANE1 = 1,
  parameter bit          SCAN  = 1'b0
) (
  input  logic     clk_2x,
  input  logic     clk_1x,
  input  logic     rst,
  input  idx_bus_t idx,
  input  idx_t     n,
  output addr_t    addr,     // to the bank port, registered there
  output logic     phase,    // T flip-flop: 0 first, 1 second memory cycle
  output logic [$clog2(SSP)-1:0] pos,  // scan position (SCAN = 1)
  output logic     last                // pos == SSP-1
);

  addr_t addr0, addr1;
  logic [$clog2(SSP)-1:0] pos1;
  logic last1;

  agu #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE(LANE0), .SCAN(SCAN)) u_agu0 (
    .clk_1x, .rst, .idx, .n, .addr(addr0), .pos(pos), .last(last)
  );
  agu #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE(LANE1), .SCAN(SCAN)) u_agu1 (
    .clk_1x, .rst, .idx, .n, .addr(addr1), .pos(pos1), .last(last1)
  );

  always_ff @(posedge clk_2x) begin
    if (rst) phase <= 1'b0;
    else     phase <= ~phase;
  end

  assign addr = phase ? addr1 : addr0;

  // Both AGUs see the same index bus, so their scan counters stay in step.
  a_scan_in_step: assert property (@(posedge clk_1x) disable iff (rst) pos == pos1 && last == last1);

endmodule
