// output_bcast: output broadcast module, storing four sub-block buses.
//
// Used when every PE produces its own datum of an output variable. The
// broadcast data array brings each row's results to the border as a bus of
// SSP words; this module stores four such buses in one dual-port bank. Each
// port has a TAGM whose AGUs scan the row with their counters (SCAN = 1) and
// a two-PISOs pair that serialises two buses onto the port. Port 1 takes
// bus[2] (phase 0) and bus[3] (phase 1), port 0 takes bus[0] and bus[1];
// bus q is the row with processor index offset 4*BANK + q. The structure
// follows the memory scheme.
//
// Interface: a store is SSP valid index cycles, the first flagged 'first'.
// The buses must hold the sub-blocks in the cycle of that first index; the
// PISOs take them at its end. Each valid index writes one word of every
// bus, one PA cycle later, at the addresses that index gives; the module
// keeps the index bus in a register for that cycle (this design's choice).
// The next store may start right after the last index. The host port
// (memory clock domain) takes over port 0 while host.en is set, to read the
// results while the array is idle.
module output_bcast
  import ems_pkg::*;
#(
  parameter int unsigned SSP   = 8,
  parameter int unsigned FCOL  = 4,
  parameter int unsigned BANK  = 0,
  parameter int unsigned DEPTH = BANK_DEPTH
) (
  input  logic      clk_2x,
  input  logic      clk_1x,
  input  logic      rst,
  input  idx_bus_t  idx,
  input  idx_t      n,
  input  word_t     bus [4][SSP],
  input  host_req_t host,
  output word_t     host_rdata
);

  if (FCOL != 4) begin : g_fcol_check
    $error("output_bcast serves four rows per bank: FCOL must be 4");
  end

  localparam int unsigned LB = FCOL * BANK;

  idx_bus_t idx_d;
  always_ff @(posedge clk_1x) begin
    if (rst) idx_d <= '0;
    else     idx_d <= idx;
  end

  addr_t a0, a1;
  logic  ph0, ph1;
  word_t wd0, wd1, rd0, rd1;
  logic [$clog2(SSP)-1:0] pos0, pos1;
  logic  last0, last1;
  logic  load;

  assign load = idx.valid && idx.first;

  tagm #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE0(LB+0), .LANE1(LB+1), .SCAN(1'b1)) u_tagm0 (
    .clk_2x, .clk_1x, .rst, .idx(idx_d), .n, .addr(a0), .phase(ph0), .pos(pos0), .last(last0)
  );
  tagm #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE0(LB+2), .LANE1(LB+3), .SCAN(1'b1)) u_tagm1 (
    .clk_2x, .clk_1x, .rst, .idx(idx_d), .n, .addr(a1), .phase(ph1), .pos(pos1), .last(last1)
  );

  two_pisos #(.SSP(SSP)) u_pisos0 (
    .clk_2x, .rst, .phase(ph0), .load, .bus0(bus[0]), .bus1(bus[1]),
    .wr_valid(idx_d.valid), .wr_first(idx_d.first), .dout(wd0)
  );
  two_pisos #(.SSP(SSP)) u_pisos1 (
    .clk_2x, .rst, .phase(ph1), .load, .bus0(bus[2]), .bus1(bus[3]),
    .wr_valid(idx_d.valid), .wr_first(idx_d.first), .dout(wd1)
  );

  dp_mem_bank #(.DEPTH(DEPTH)) u_bank (
    .clk_2x,
    .we0(host.en ? host.we : idx_d.valid),
    .addr0(host.en ? host.addr[$clog2(DEPTH)-1:0] : a0[$clog2(DEPTH)-1:0]),
    .wdata0(host.en ? host.wdata : wd0), .rdata0(rd0),
    .we1(idx_d.valid && !host.en), .addr1(a1[$clog2(DEPTH)-1:0]), .wdata1(wd1), .rdata1(rd1)
  );

  assign host_rdata = rd0;

  a_host_idle: assert property (@(posedge clk_1x) disable iff (rst) !(host.en && idx_d.valid));

endmodule
