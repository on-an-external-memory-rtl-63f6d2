// input_bcast: input broadcast module, filling four sub-block buses.
//
// Used when every PE of the array needs its own datum of an input variable,
// sent ahead of the computation. One dual-port bank, one TAGM per port and
// two SIPOs per port. The AGUs scan the processor index along a row with
// their counters (SCAN = 1), so a block scan is SSP valid index cycles, the
// first one flagged 'first'. In each PA cycle every port reads one word for
// each of its two rows; SIPOs shift them in. After the scan, each of the
// four buses holds the SSP words of one row. Port 0 feeds bus[2] (phase 0)
// and bus[3] (phase 1); port 1 feeds bus[0] and bus[1]; bus q belongs to the
// row with processor index offset 4*BANK + q. The structure follows the
// memory scheme; port-to-bus order within a port is this design's choice.
//
// Timing: if the last index of a scan is in PA cycle c, bus_ready is high
// in PA cycle c+1 and the buses are complete at the end of that cycle, when
// the broadcast data array must take them. The next scan may follow at once.
// The host port (memory clock domain) takes over port 0 while host.en is
// set, to fill the bank while the array is idle (this design's addition).
module input_bcast
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
  output word_t     bus [4][SSP],
  output logic      bus_ready,
  input  host_req_t host,
  output word_t     host_rdata
);

  if (FCOL != 4) begin : g_fcol_check
    $error("input_bcast serves four rows per bank: FCOL must be 4");
  end

  localparam int unsigned LB = FCOL * BANK;

  addr_t a0, a1;
  logic  ph0, ph1;
  word_t rd0, rd1;
  logic [$clog2(SSP)-1:0] pos0, pos1;
  logic  last0, last1;

  tagm #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE0(LB+2), .LANE1(LB+3), .SCAN(1'b1)) u_tagm0 (
    .clk_2x, .clk_1x, .rst, .idx, .n, .addr(a0), .phase(ph0), .pos(pos0), .last(last0)
  );
  tagm #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE0(LB+0), .LANE1(LB+1), .SCAN(1'b1)) u_tagm1 (
    .clk_2x, .clk_1x, .rst, .idx, .n, .addr(a1), .phase(ph1), .pos(pos1), .last(last1)
  );

  dp_mem_bank #(.DEPTH(DEPTH)) u_bank (
    .clk_2x,
    .we0(host.en && host.we), .addr0(host.en ? host.addr[$clog2(DEPTH)-1:0] : a0[$clog2(DEPTH)-1:0]),
    .wdata0(host.wdata), .rdata0(rd0),
    .we1(1'b0), .addr1(a1[$clog2(DEPTH)-1:0]), .wdata1('0), .rdata1(rd1)
  );

  assign host_rdata = rd0;

  // The phase-0 word of PA cycle c is on the read port during the second
  // memory cycle and is shifted in at the end of c; the phase-1 word follows
  // one memory cycle later, qualified by the registered valid.
  logic v_late;
  always_ff @(posedge clk_2x) begin
    if (rst)      v_late <= 1'b0;
    else if (ph0) v_late <= idx.valid;
  end

  logic en_p0, en_p1;
  assign en_p0 = ph0 && idx.valid;
  assign en_p1 = !ph0 && v_late;

  sipo_bcast #(.SSP(SSP)) u_sipo_b2 (.clk_2x, .en(en_p0), .din(rd0), .bus(bus[2]));
  sipo_bcast #(.SSP(SSP)) u_sipo_b3 (.clk_2x, .en(en_p1), .din(rd0), .bus(bus[3]));
  sipo_bcast #(.SSP(SSP)) u_sipo_b0 (.clk_2x, .en(en_p0), .din(rd1), .bus(bus[0]));
  sipo_bcast #(.SSP(SSP)) u_sipo_b1 (.clk_2x, .en(en_p1), .din(rd1), .bus(bus[1]));

  always_ff @(posedge clk_1x) begin
    if (rst) bus_ready <= 1'b0;
    else     bus_ready <= idx.valid && last0;
  end

  a_host_idle: assert property (@(posedge clk_1x) disable iff (rst) !(host.en && idx.valid));

endmodule
